// nca_route: nearest-common-ancestor route computation for one OP3DBFT
// router, with round-robin selection between the two up ports.
//
// Each router knows the contiguous range of PEs it can reach downwards
// (min..max). A destination inside that range leaves through the down port
// of the child that covers it; any other destination goes up. Only leaf
// routers have two parents, and there the up port is picked from the
// round-robin bit `rb`: rb=1 selects port 4, rb=0 port 5, and the caller
// toggles rb whenever `rb_used` is high (round-robin output deflection,
// RROD). Middle routers have one parent (port 4). Top routers have two
// children and one vertical port (port 2) to their peer top router in the
// other layer, so a packet for the other layer crosses there and then only
// descends.
//
// Port map (this design's numbering):
//   leaf r  (LEVEL=LVL_LEAF, pos 0..15): ports 0-3 PEs 4r..4r+3, 4-5 parents
//   middle m (LVL_MID, pos 0..7): cluster c=m/2 covers PEs 16c..16c+15,
//            ports 0-3 leaf routers 4c..4c+3, port 4 parent
//   top t   (LVL_TOP, pos 0..3): layer L=t%2 covers PEs 32L..32L+31,
//            ports 0-1 middle routers of clusters 2L, 2L+1, port 2 vertical
// Purely combinational.
module nca_route
  import noc_pkg::*;
#(
  parameter level_e LEVEL = LVL_LEAF
) (
  input  logic [3:0]        pos,     // router index within its level
  input  logic [DEST_W-1:0] dest,
  input  logic              rb,
  output logic [2:0]        port,
  output logic              rb_used
);
  // reachable range and number of down ports of this router
  localparam int unsigned SPAN     = (LEVEL == LVL_LEAF) ? 4  :
                                     (LEVEL == LVL_MID)  ? 16 : 32;
  localparam int unsigned CHILDREN = (LEVEL == LVL_TOP)  ? 2  : 4;
  localparam int unsigned STRIDE   = SPAN / CHILDREN;

  logic [DEST_W-1:0] min_pe;   // lowest PE reachable downwards
  logic [DEST_W-1:0] offs;

  always_comb begin
    unique case (LEVEL)
      LVL_LEAF: min_pe = DEST_W'({pos, 2'b00});          // 4*pos
      LVL_MID:  min_pe = DEST_W'({pos[2:1], 4'b0000});   // 16*(pos/2)
      default:  min_pe = DEST_W'({pos[0], 5'b00000});    // 32*(pos%2)
    endcase
    offs    = dest - min_pe;
    port    = '0;
    rb_used = 1'b0;
    if (dest >= min_pe && int'(offs) < int'(SPAN)) begin
      port = 3'(int'(offs) / int'(STRIDE));
    end else begin
      unique case (LEVEL)
        LVL_LEAF: begin
          port    = rb ? 3'd4 : 3'd5;
          rb_used = 1'b1;
        end
        LVL_MID:  port = 3'd4;
        default:  port = 3'd2;
      endcase
    end
  end
endmodule
