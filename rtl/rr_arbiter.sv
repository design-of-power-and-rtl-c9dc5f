// rr_arbiter: round-robin arbiter.
//
// Grants one of N requesters per cycle, one-hot. Requests above the one
// granted last are preferred (masked request); if there are none the
// lowest request wins. The lowest set bit of a vector x is x & -x. The
// pointer, a mask of the positions above the last grant, moves only when
// `advance` is high and some request was granted, so a grant that is not
// used does not lose its turn. Combinational grant, mask updated on the
// clock.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);
  logic [N-1:0] mask_q;    // ones above the last grant
  logic [N-1:0] masked;

  assign masked = req & mask_q;
  assign gnt    = (masked != '0) ? (masked & (~masked + 1'b1))
                                 : (req & (~req + 1'b1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       mask_q <= '1;
    else if (advance && gnt != '0)    mask_q <= ~((gnt << 1) - 1'b1);
  end
endmodule
