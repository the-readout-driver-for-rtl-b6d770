// rod_pkg: types and constants shared by the TGC readout driver (ROD).
//
// The ROD collects event fragments from the front-end links of one muon
// endcap octant, expands the zero-suppressed hit bitmaps, builds one event
// per level-1 accept and ships it to the readout buffer over S-Link.
// This package fixes the word formats that travel between the blocks.
// The numbers of links and fragment processors (13 and 4) follow the
// design description; every word format below is this design's own choice,
// as the description gives no bit layouts.
package rod_pkg;

  localparam int unsigned N_LINKS_DEF = 13;  // front-end links per octant
  localparam int unsigned N_FP_DEF    = 4;   // fragment processors in the farm
  localparam int unsigned LINK_ID_W   = 4;   // enough for 13 links

  // ---------------------------------------------------------------------
  // Front-end link words (32 bits, framed by sof/eof from the receiver)
  //   header : [31:28]=4'hA  [27:24]=front-end error bits
  //            [23:12]=BCID  [11:0]=low 12 bits of the L1ID
  //   data   : [31:30]=word type (see word_type_e)
  //            hit bitmap: [29:16]=channel-group address, [15:0]=bitmap
  //            tracklet / trigger: [29:0] passed on unchanged
  // ---------------------------------------------------------------------
  localparam logic [3:0] FE_HDR_MARK = 4'hA;

  typedef enum logic [1:0] {
    W_HITMAP   = 2'b00,  // zero-suppressed hit bitmap (input) / hit (output)
    W_TRACKLET = 2'b01,  // on-chamber coincidence (2/3, 3/4) tracklet
    W_TRIGGER  = 2'b10,  // HipT / sector logic trigger word
    W_HEADER   = 2'b11   // fragment header (output) / illegal in input data
  } word_type_e;

  typedef struct packed {
    logic [3:0]  mark;
    logic [3:0]  fe_err;
    logic [11:0] bcid;
    logic [11:0] l1id;
  } fe_hdr_t;

  // Decoded hit word written by a fragment processor:
  //   [31:30]=W_HITMAP [29:26]=link [25:12]=address [11:4]=0 [3:0]=channel
  typedef struct packed {
    logic [1:0]  wtype;
    logic [3:0]  link;
    logic [13:0] addr;
    logic [7:0]  zero;
    logic [3:0]  chan;
  } hit_t;

  // Fragment header put by the event builder in front of each fragment:
  //   [31:30]=W_HEADER [29:26]=link [25:16]=flags [15:0]=word count after it
  typedef struct packed {
    logic [1:0]  wtype;
    logic [3:0]  link;
    logic [9:0]  flags;
    logic [15:0] count;
  } frag_hdr_t;

  // Error / status flags carried in control words and fragment headers
  localparam int unsigned F_LINK_ERR  = 0;  // deserializer reported an error
  localparam int unsigned F_NO_HDR    = 1;  // data without a header word
  localparam int unsigned F_TRUNC_IN  = 2;  // fragment cut: too long / new sof / input FIFO full
  localparam int unsigned F_FE_ERR    = 3;  // header carried front-end error bits
  localparam int unsigned F_L1ID_MISS = 4;  // header L1ID differs from the expected one
  localparam int unsigned F_BAD_WORD  = 5;  // illegal word type in the data
  localparam int unsigned F_TRUNC_OUT = 6;  // output limit reached, rest dropped
  localparam int unsigned F_DROPPED   = 7;  // event builder dropped the fragment

  // Control word of a link input record: N words (header included) + flags
  typedef struct packed {
    logic [7:0]  flags;
    logic [7:0]  rsvd;
    logic [15:0] count;
  } link_ctrl_t;

  // Control word of a fragment-processor output record
  typedef struct packed {
    logic [7:0]  flags;
    logic [3:0]  rsvd;
    logic [3:0]  link;
    logic [15:0] count;
  } fp_ctrl_t;

  // Control word of an event record (event builder -> ROB formatter)
  typedef struct packed {
    logic [23:0] l1id;
    logic [11:0] bcid;
    logic [15:0] count;
    logic [15:0] status;
  } ev_ctrl_t;

  // Expected event from the TTC queue
  typedef struct packed {
    logic [23:0] l1id;
    logic [11:0] bcid;
  } ttc_ev_t;

  // Message word: severity/exception code and three bytes of data
  typedef struct packed {
    logic [7:0]  code;
    logic [23:0] data;
  } msg_t;

  localparam logic [7:0] MSG_FRAG_ERR  = 8'h21;  // fragment processor saw an error flag
  localparam logic [7:0] MSG_EV_DROP   = 8'h31;  // event builder dropped a fragment

  // ATLAS ROD format constants and S-Link control words
  localparam logic [31:0] ROD_START_MARK = 32'hEE12_34EE;
  localparam logic [31:0] ROD_HDR_SIZE   = 32'd9;
  localparam logic [31:0] ROD_FMT_VER    = 32'h0301_0000;
  localparam logic [31:0] SLINK_BOF      = 32'hB0F0_0000;
  localparam logic [31:0] SLINK_EOF      = 32'hE0F0_0000;

endpackage
