// tb_vc_fifo: self-checking test of the VC input buffer.
//
// Pushes and pops at random against a queue reference model, fills the
// buffer to its 16-flit depth and drains it, and checks front, empty, full
// and count every cycle.
module tb_vc_fifo;
  import noc_pkg::*;
  localparam int unsigned DEPTH = 16;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  push, pop, empty, full;
  flit_t din, front;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  flit_t model [$];

  vc_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic flit_t rand_flit();
    flit_t f;
    f.head = 1'($urandom);
    f.tail = 1'($urandom);
    f.vc   = VC_W'($urandom);
    f.data = {$urandom, $urandom};
    return f;
  endfunction

  task automatic step(bit do_push, bit do_pop);
    push = do_push;
    pop  = do_pop;
    din  = rand_flit();
    @(negedge clk);
    if (do_push) model.push_back(din);
    if (do_pop)  void'(model.pop_front());
    push = 1'b0;
    pop  = 1'b0;
    check(count == model.size(), "count");
    check(empty == (model.size() == 0), "empty");
    check(full == (model.size() == DEPTH), "full");
    if (model.size() != 0) check(front == model[0], "front");
  endtask

  initial begin
    push = 1'b0; pop = 1'b0; din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(empty && !full && count == 0, "reset state");
    // fill to the document's depth, then drain
    for (int i = 0; i < int'(DEPTH); i++) step(1, 0);
    check(full, "full after DEPTH pushes");
    step(1, 1);                     // simultaneous push and pop when full
    for (int i = 0; i < int'(DEPTH); i++) step(0, 1);
    check(empty, "empty after drain");
    // random traffic, never overfilling or underflowing
    for (int i = 0; i < 2000; i++) begin
      bit pu, po;
      pu = ($urandom % 2) && (model.size() < DEPTH);
      po = ($urandom % 2) && (model.size() > 0);
      step(pu, po);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
