// tb_bft_router: self-checking test of one leaf router (6 ports, position 0,
// so PEs 0..3 are local and everything else goes up).
//
// Phase 1: a single one-flit packet through the idle router must appear on
//          its output exactly 4 cycles after it was presented.
// Phase 2: four packets for a remote PE, one at a time, must leave through
//          the up ports in round-robin order 5, 4, 5, 4 (RB resets to 0).
// Phase 3: random multi-flit packets on all six inputs and all eight VCs,
//          with senders that obey credits, sinks that withhold credits for
//          long stretches, and port 5 throttled like a serialising link.
// Every flit is checked at the output: right port for its destination,
// flits of a packet in order and not interleaved on one output VC, never
// more than 16 un-credited flits per output VC, every packet delivered
// once, and the two up ports used evenly (round robin).
module tb_bft_router;
  import noc_pkg::*;
  localparam int unsigned P = 6, V = NUM_VC, DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic    in_valid  [P];
  flit_t   in_flit   [P];
  credit_t cr_out    [P];
  logic    out_valid [P];
  flit_t   out_flit  [P];
  credit_t cr_in     [P];
  logic    out_ready [P];

  logic [3:0] pos = 4'd0;
  bft_router #(.LEVEL(LVL_LEAF), .P(P), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // ---------------- packet bookkeeping ----------------
  typedef struct { int id; int dest; int len; int src; } pkt_t;
  pkt_t pkts [$];          // all packets, indexed by id
  int   done [int];        // id -> number of flits received
  int   up_port_of [int];  // id -> up port used

  function automatic flit_t mk_flit(int id, int dest, int idx, int len, int vc);
    flit_t f;
    f.head = (idx == 0);
    f.tail = (idx == len - 1);
    f.vc   = VC_W'(vc);
    f.data = {32'($urandom), 16'(id), 8'(idx), 2'b00, 6'(dest)};
    return f;
  endfunction

  // sender state per input port
  int   s_cred [P][V];
  int   s_pkt  [P];      // current packet id, -1 none
  int   s_idx  [P];
  int   s_vc   [P];
  int   s_q    [P][$];   // queue of packet ids to send
  // sink state per output port
  int   k_owed [P][V];   // flits received, credit not yet returned
  int   k_cur  [P][V];   // packet in progress on this output VC, -1 none
  int   k_next [P][V];   // expected next flit index
  int   k_hold [P];      // cycles left during which the sink withholds credits
  bit   throttle5;
  int   last_v5;
  int   up4 = 0, up5 = 0, credit_stalls = 0, ser_stalls = 0;

  function automatic int exp_port(int dest);
    return (dest < 4) ? dest : -1;   // -1: either up port
  endfunction

  task automatic new_packet(int src, int dest, int len);
    pkt_t k;
    k.id = pkts.size(); k.dest = dest; k.len = len; k.src = src;
    pkts.push_back(k);
    s_q[src].push_back(k.id);
  endtask

  // one clock cycle of the environment
  task automatic env_cycle(bit send_random);
    // sample outputs (registered in the DUT, stable at the negative edge)
    for (int o = 0; o < int'(P); o++) begin
      if (cr_out[o].valid) s_cred[o][cr_out[o].vc]++;
      if (out_valid[o]) begin
        int id, idx, v;
        v   = int'(out_flit[o].vc);
        id  = int'(out_flit[o].data[31:16]);
        idx = int'(out_flit[o].data[15:8]);
        k_owed[o][v]++;
        check(k_owed[o][v] <= int'(DEPTH), "more flits than credits on an output VC");
        if (id < pkts.size()) begin
          int e;
          e = exp_port(pkts[id].dest);
          if (e >= 0) check(o == e, "down port for a local PE");
          else begin
            check(o == 4 || o == 5, "up port for a remote PE");
            if (idx == 0) begin
              up_port_of[id] = o;
              if (o == 4) up4++; else up5++;
            end
          end
          if (out_flit[o].head) begin
            check(k_cur[o][v] < 0, "head while a packet is open on this VC");
            k_cur[o][v] = id; k_next[o][v] = 0;
          end
          check(k_cur[o][v] == id, "flits of two packets interleaved on one VC");
          check(idx == k_next[o][v], "flit order");
          check(out_flit[o].tail == (idx == pkts[id].len - 1), "tail marker");
          k_next[o][v]++;
          if (out_flit[o].tail) k_cur[o][v] = -1;
          done[id] = done.exists(id) ? done[id] + 1 : 1;
        end else check(0, "unknown packet id");
      end
    end
    if (out_valid[5]) begin
      check(!(throttle5 && last_v5 == cycle - 1), "throttled port sent on two cycles in a row");
      last_v5 = cycle;
    end
    // count credit stalls: a VC that is busy but has no credit
    for (int o = 0; o < int'(P); o++)
      for (int v = 0; v < int'(V); v++)
        if (dut.cred_q[o][v] == 0) credit_stalls++;
    // drive inputs
    for (int p = 0; p < int'(P); p++) begin
      in_valid[p] = 1'b0;
      in_flit[p]  = '0;
      if (s_pkt[p] < 0 && s_q[p].size() > 0) begin
        s_pkt[p] = s_q[p].pop_front();
        s_idx[p] = 0;
        s_vc[p]  = (s_vc[p] + 1) % V;
      end
      if (s_pkt[p] >= 0 && s_cred[p][s_vc[p]] > 0 && (!send_random || $urandom % 4 != 0)) begin
        pkt_t k;
        k = pkts[s_pkt[p]];
        in_valid[p] = 1'b1;
        in_flit[p]  = mk_flit(k.id, k.dest, s_idx[p], k.len, s_vc[p]);
        s_cred[p][s_vc[p]]--;
        s_idx[p]++;
        if (s_idx[p] == k.len) s_pkt[p] = -1;
      end
    end
    // sinks return credits, one per cycle per port, unless holding
    for (int o = 0; o < int'(P); o++) begin
      cr_in[o] = '0;
      if (k_hold[o] > 0) k_hold[o]--;
      else if (send_random && $urandom % 200 == 0) k_hold[o] = 60;
      else begin
        for (int v = 0; v < int'(V); v++)
          if (!cr_in[o].valid && k_owed[o][v] > 0) begin
            cr_in[o].valid = 1'b1;
            cr_in[o].vc    = VC_W'(v);
            k_owed[o][v]--;
          end
      end
    end
    for (int o = 0; o < int'(P); o++) out_ready[o] = 1'b1;
    if (throttle5) begin
      out_ready[5] = !out_valid[5];
      if (!out_ready[5]) ser_stalls++;
    end
    @(negedge clk);
    cycle++;
  endtask

  function automatic bit all_done();
    foreach (pkts[i]) if (!done.exists(i) || done[i] != pkts[i].len) return 0;
    for (int p = 0; p < int'(P); p++) if (s_pkt[p] >= 0 || s_q[p].size() != 0) return 0;
    return 1;
  endfunction

  initial begin
    int t0, lat;
    throttle5 = 1'b0; last_v5 = -10;
    for (int p = 0; p < int'(P); p++) begin
      in_valid[p] = 1'b0; in_flit[p] = '0; cr_in[p] = '0; out_ready[p] = 1'b1;
      s_pkt[p] = -1; s_idx[p] = 0; s_vc[p] = V - 1; k_hold[p] = 0;
      for (int v = 0; v < int'(V); v++) begin
        s_cred[p][v] = DEPTH; k_owed[p][v] = 0; k_cur[p][v] = -1; k_next[p][v] = 0;
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---- phase 1: latency through an idle router ----
    new_packet(0, 2, 1);
    t0 = cycle; lat = -1;
    while (cycle < t0 + 20) begin
      if (out_valid[2] && lat < 0) lat = cycle - t0;
      env_cycle(0);
    end
    check(lat == 4, $sformatf("idle router latency 4 cycles (got %0d)", lat));

    // ---- phase 2: round-robin up-port choice ----
    for (int i = 0; i < 4; i++) begin
      new_packet(1, 40, 1);
      repeat (12) env_cycle(0);
    end
    check(up_port_of.exists(1) && up_port_of[1] == 5, "first up packet on port 5");
    check(up_port_of.exists(2) && up_port_of[2] == 4, "second up packet on port 4");
    check(up_port_of.exists(3) && up_port_of[3] == 5, "third up packet on port 5");
    check(up_port_of.exists(4) && up_port_of[4] == 4, "fourth up packet on port 4");

    // ---- phase 3: random traffic ----
    throttle5 = 1'b1;
    for (int i = 0; i < 600; i++) begin
      int src, dest;
      src  = $urandom % P;
      dest = (src >= 4) ? $urandom % 4 : $urandom % 64;
      new_packet(src, dest, 1 + $urandom % 5);
    end
    while (!all_done() && cycle < 60000) env_cycle(1);
    repeat (50) env_cycle(0);
    check(all_done(), "every packet delivered");
    check(up4 > 50 && up5 > 50 && (up5 - up4 <= 1) && (up5 - up4 >= 0),
          $sformatf("round-robin balance of up ports (4:%0d 5:%0d)", up4, up5));
    check(credit_stalls > 0, "credit exhaustion happened");
    check(ser_stalls > 0, "throttled output stalled");
    for (int o = 0; o < int'(P); o++)
      for (int v = 0; v < int'(V); v++)
        check(dut.cred_q[o][v] == DEPTH, "all credits back");
    $display("packets=%0d up4=%0d up5=%0d cycles=%0d", pkts.size(), up4, up5, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
