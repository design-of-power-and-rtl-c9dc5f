// tb_link_pipe: self-checking test of the horizontal wire link.
//
// Sends random flits and credits on random cycles and checks that each one
// comes out exactly DELAY (13) cycles later, unchanged, and that nothing
// appears on a cycle when nothing was sent.
module tb_link_pipe;
  import noc_pkg::*;
  localparam int unsigned DELAY = 13;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  flit_t in_flit, out_flit;
  credit_t cr_in, cr_out;
  int checks = 0, failures = 0;
  int cycle = 0;

  // what was sent in each cycle, indexed by cycle number
  logic    sent_v [int];
  flit_t   sent_f [int];
  credit_t sent_c [int];

  link_pipe #(.DELAY(DELAY)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  initial begin
    in_valid = 1'b0; in_flit = '0; cr_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (cycle = 0; cycle < 600; cycle++) begin
      in_valid     = (cycle < 560) && ($urandom % 3 != 0);
      in_flit.head = 1'($urandom);
      in_flit.tail = 1'($urandom);
      in_flit.vc   = VC_W'($urandom);
      in_flit.data = {$urandom, $urandom};
      cr_in.valid  = (cycle < 560) && ($urandom % 2 == 0);
      cr_in.vc     = VC_W'($urandom);
      sent_v[cycle] = in_valid;
      sent_f[cycle] = in_flit;
      sent_c[cycle] = cr_in;
      #1;
      if (cycle >= int'(DELAY)) begin
        check(out_valid == sent_v[cycle-DELAY], "flit valid delay");
        if (out_valid) check(out_flit == sent_f[cycle-DELAY], "flit contents");
        check(cr_out == sent_c[cycle-DELAY], "credit delay");
      end else begin
        check(!out_valid && !cr_out.valid, "nothing before DELAY cycles");
      end
      @(negedge clk);
    end
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
