// link_pipe: one direction of a horizontal wire link between two routers.
//
// A long on-chip wire does not fit in one clock period, so it is modelled
// as DELAY register stages: a flit entering in cycle t leaves in cycle
// t+DELAY. The credits that the receiving router returns for this channel
// travel the same wire backwards and take DELAY cycles as well. The link
// holds up to DELAY flits in flight and never stalls; the credit count at
// the sender covers the flits in flight. DELAY defaults to the 13 cycles
// given for both wire lengths of the optimised 2-layer fat tree at
// 2.5 GHz; realising the delay as plain pipeline registers is this
// design's choice.
module link_pipe
  import noc_pkg::*;
#(
  parameter int unsigned DELAY = 13
) (
  input  logic    clk,
  input  logic    rst_n,
  // sender side
  input  logic    in_valid,
  input  flit_t   in_flit,
  output credit_t cr_out,
  // receiver side
  output logic    out_valid,
  output flit_t   out_flit,
  input  credit_t cr_in
);
  logic    v_q  [DELAY];
  flit_t   f_q  [DELAY];
  credit_t c_q  [DELAY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DELAY); i++) begin
        v_q[i] <= 1'b0;
        c_q[i] <= '0;
      end
    end else begin
      v_q[0] <= in_valid;
      c_q[0] <= cr_in;
      for (int i = 1; i < int'(DELAY); i++) begin
        v_q[i] <= v_q[i-1];
        c_q[i] <= c_q[i-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    f_q[0] <= in_flit;
    for (int i = 1; i < int'(DELAY); i++) f_q[i] <= f_q[i-1];
  end

  assign out_valid = v_q[DELAY-1];
  assign out_flit  = f_q[DELAY-1];
  assign cr_out    = c_q[DELAY-1];
endmodule
