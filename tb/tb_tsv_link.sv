// tb_tsv_link: self-checking test of the serialised vertical link.
//
// A sender that obeys `ready` offers random flits as fast as allowed. The
// test checks that every flit arrives intact and in order, exactly
// SER + TSV_DELAY = 3 cycles after it was accepted, that back-to-back flits
// are spaced SER = 2 cycles apart (the 2:1 serialisation halves the link
// rate), that `ready` falls after each accepted flit, and that credits
// cross in TSV_DELAY = 1 cycle.
module tb_tsv_link;
  import noc_pkg::*;
  localparam int unsigned SER = 2, TSV_DELAY = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid, ready;
  flit_t in_flit, out_flit;
  credit_t cr_in, cr_out;
  int checks = 0, failures = 0;
  int cycle = 0, sent = 0, got = 0, stalls = 0;
  flit_t q_f [$];
  int    q_t [$];
  credit_t c_prev;
  int last_acc = -100, min_gap = 1000;

  tsv_link #(.SER(SER), .TSV_DELAY(TSV_DELAY)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  logic may_send;   // the sender's view of `ready` from the previous cycle

  initial begin
    in_valid = 1'b0; in_flit = '0; cr_in = '0; may_send = 1'b0; c_prev = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (cycle = 0; cycle < 800; cycle++) begin
      // a flit may be presented this cycle only if ready was high last cycle
      in_valid     = may_send && (cycle < 700) && ($urandom % 4 != 0);
      in_flit.head = 1'($urandom);
      in_flit.tail = 1'($urandom);
      in_flit.vc   = VC_W'($urandom);
      in_flit.data = {$urandom, $urandom};
      cr_in.valid  = ($urandom % 2 == 0);
      cr_in.vc     = VC_W'($urandom);
      #1;
      if (in_valid) begin
        q_f.push_back(in_flit);
        q_t.push_back(cycle);
        sent++;
        if (cycle - last_acc < min_gap) min_gap = cycle - last_acc;
        last_acc = cycle;
        check(ready == (SER == 1), "ready low right after a flit");
      end
      if (!ready) stalls++;
      if (out_valid) begin
        got++;
        if (q_f.size() == 0) check(0, "flit from nowhere");
        else begin
          check(out_flit == q_f[0], "flit contents/order");
          check(cycle - q_t[0] == int'(SER + TSV_DELAY), "flit latency");
          void'(q_f.pop_front());
          void'(q_t.pop_front());
        end
      end
      if (cycle > 0) check(cr_out == c_prev, "credit crosses in one cycle");
      c_prev   = cr_in;
      may_send = ready;
      @(negedge clk);
    end
    check(sent > 100 && got == sent, "all flits delivered");
    check(min_gap == int'(SER), "flits accepted every SER cycles at best");
    check(stalls > 0, "serialiser stalled the sender");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
