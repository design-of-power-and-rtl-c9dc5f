// noc_pkg: types and constants shared by the OP3DBFT network.
//
// A flit is the 64-bit channel word of the network plus its sideband:
// head/tail markers and the virtual channel (VC) it travels in. The
// destination PE of a packet rides in the low DEST_W bits of the head
// flit's payload. Credits travel backwards as a valid bit plus a VC id.
// The 64-bit channel, 8 VCs, buffer depth 16 and 64 PEs follow the
// network the design is built for; the placement of the destination in
// the head flit and the credit format are this design's own choices.
package noc_pkg;

  localparam int unsigned FLIT_W  = 64;  // channel width in bits
  localparam int unsigned NUM_VC  = 8;   // virtual channels per port
  localparam int unsigned VC_W    = $clog2(NUM_VC);
  localparam int unsigned NUM_PE  = 64;  // processing elements
  localparam int unsigned DEST_W  = $clog2(NUM_PE);

  // router levels of the fat tree
  typedef enum logic [1:0] {
    LVL_LEAF = 2'd0,   // 16 routers, 4 PEs + 2 parents each
    LVL_MID  = 2'd1,   // 8 routers, 4 leaf children + 1 parent
    LVL_TOP  = 2'd2    // 4 routers, 2 middle children + 1 vertical peer
  } level_e;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [VC_W-1:0]   vc;
    logic [FLIT_W-1:0] data;
  } flit_t;


  typedef struct packed {
    logic            valid;
    logic [VC_W-1:0] vc;
  } credit_t;

  function automatic logic [DEST_W-1:0] flit_dest(flit_t f);
    return f.data[DEST_W-1:0];
  endfunction

endpackage
