// tb_nca_route: self-checking test of nearest-common-ancestor routing.
//
// For every router of the 28-router network (leaf 0..15, middle 0..7,
// top 0..3) and every destination PE 0..63 it compares the chosen port
// with a reference written from the topology: down towards the child
// whose PE range holds the destination, otherwise up; on leaf routers the
// up port follows the round-robin bit (rb=1 -> port 4, rb=0 -> port 5).
module tb_nca_route;
  import noc_pkg::*;

  int checks = 0, failures = 0;
  logic [DEST_W-1:0] dest;
  logic              rb;
  logic [2:0] l_port [16];  logic l_used [16];
  logic [2:0] m_port [8];   logic m_used [8];
  logic [2:0] t_port [4];   logic t_used [4];

  for (genvar i = 0; i < 16; i++) begin : g_l
    nca_route #(.LEVEL(LVL_LEAF)) u (.pos(4'(i)), .dest, .rb, .port(l_port[i]), .rb_used(l_used[i]));
  end
  for (genvar i = 0; i < 8; i++) begin : g_m
    nca_route #(.LEVEL(LVL_MID)) u (.pos(4'(i)), .dest, .rb, .port(m_port[i]), .rb_used(m_used[i]));
  end
  for (genvar i = 0; i < 4; i++) begin : g_t
    nca_route #(.LEVEL(LVL_TOP)) u (.pos(4'(i)), .dest, .rb, .port(t_port[i]), .rb_used(t_used[i]));
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s dest=%0d rb=%0d", what, dest, rb);
    end
  endtask

  initial begin
    for (int r = 0; r < 2; r++) begin
      for (int d = 0; d < 64; d++) begin
        dest = DEST_W'(d);
        rb   = 1'(r);
        #1;
        for (int i = 0; i < 16; i++) begin
          int exp_p; bit exp_u;
          if (d / 4 == i) begin exp_p = d % 4; exp_u = 0; end
          else begin exp_p = r ? 4 : 5; exp_u = 1; end
          check(int'(l_port[i]) == exp_p && l_used[i] == exp_u, $sformatf("leaf %0d", i));
        end
        for (int i = 0; i < 8; i++) begin
          int exp_p;
          exp_p = (d / 16 == i / 2) ? (d % 16) / 4 : 4;
          check(int'(m_port[i]) == exp_p && !m_used[i], $sformatf("mid %0d", i));
        end
        for (int i = 0; i < 4; i++) begin
          int exp_p;
          exp_p = (d / 32 == i % 2) ? (d % 32) / 16 : 2;
          check(int'(t_port[i]) == exp_p && !t_used[i], $sformatf("top %0d", i));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
