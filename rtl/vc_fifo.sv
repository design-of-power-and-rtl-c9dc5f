// vc_fifo: one virtual-channel input buffer of a router.
//
// A circular buffer of DEPTH flits. The oldest flit is always visible on
// `front` (first-word fall-through), so the router can read a head flit's
// destination before it pops it. A push and a pop may happen in the same
// cycle. Overflow is prevented by credit flow control upstream: one credit
// per free slot, so a push into a full buffer is a protocol error and is
// flagged by an assertion. DEPTH defaults to the 16-flit VC buffer of the
// evaluated network; the fall-through read and the error assertion are
// this design's choices.
module vc_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  flit_t din,
  input  logic  pop,
  output flit_t front,
  output logic  empty,
  output logic  full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t         mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;

  assign front = mem[rd_ptr];
  assign empty = (cnt_q == 0);
  assign full  = (cnt_q == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign count = cnt_q;

  function automatic logic [AW-1:0] ptr_inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt_q  <= '0;
    end else begin
      if (push) wr_ptr <= ptr_inc(wr_ptr);
      if (pop)  rd_ptr <= ptr_inc(rd_ptr);
      case ({push, pop})
        2'b10:   cnt_q <= cnt_q + 1'b1;
        2'b01:   cnt_q <= cnt_q - 1'b1;
        default: cnt_q <= cnt_q;
      endcase
    end
  end

  // a credit-respecting sender never overfills, and the router never pops
  // an empty buffer
  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("vc_fifo: push into a full buffer");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("vc_fifo: pop from an empty buffer");
endmodule
