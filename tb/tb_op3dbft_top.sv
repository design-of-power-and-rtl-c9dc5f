// tb_op3dbft_top: end-to-end test of the whole 64-PE OP3DBFT network at its
// default parameters (16-flit VCs, 13-cycle wires, 2:1 serialised TSVs).
//
// Behavioural PE models inject packets obeying credits and eject flits,
// returning a credit for each one. The test runs:
//  1. zero-load latency probes with one-flit packets, checked against the
//     cycle counts that follow from the structure (4 cycles per router,
//     13 per wire, 3 per vertical link): same leaf 4, same cluster 38,
//     same layer through a top router 72, other layer 79 (both top routers
//     of a pair: 6*4 + 4*13 + 3);
//  2. uniform random, transpose and bit-reversal traffic, each first at
//     the light load the design was evaluated at (0.018 flits/cycle/PE)
//     and then as a heavy burst, with 5-flit packets.
// Every flit is checked on ejection: right PE, flits of a packet in order
// and not interleaved on one VC; at the end every packet must have arrived.
// Mechanisms counted (each must occur): leaf routers using both up ports,
// packets crossing layers on the TSV links, the serialiser holding back a
// top router, credit exhaustion on a wire, packets turning at a middle
// router, packets turning at a top router without crossing layers.
module tb_op3dbft_top;
  import noc_pkg::*;
  localparam int unsigned N = NUM_PE, V = NUM_VC, DEPTH = 16, PKT = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic    pe_in_valid  [N];
  flit_t   pe_in_flit   [N];
  credit_t pe_cr_out    [N];
  logic    pe_out_valid [N];
  flit_t   pe_out_flit  [N];
  credit_t pe_cr_in     [N];

  op3dbft_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  typedef struct { int src; int dest; int len; int t_inj; } pkt_t;
  pkt_t pkts [$];
  int   got  [$];        // flits received per packet
  int   head_lat [$];    // head latency per packet, -1 until it arrives
  int   s_cred [N][V];
  int   s_pkt [N], s_idx [N], s_vc [N];
  int   s_q   [N][$];
  int   k_cur [N][V], k_next [N][V];

  // mechanism counters
  int n_up4 = 0, n_up5 = 0, n_tsv = 0, n_ser_stall = 0, n_credit_stall = 0;
  int n_mid_turn = 0, n_top_turn = 0;

  function automatic flit_t mk_flit(int id, int dest, int idx, int len, int vc);
    flit_t f;
    f.head = (idx == 0);
    f.tail = (idx == len - 1);
    f.vc   = VC_W'(vc);
    f.data = {24'($urandom), 24'(id), 8'(idx), 2'd0, 6'(dest)};  // id [39:16], index [15:8]
    return f;
  endfunction

  function automatic int new_packet(int src, int dest, int len);
    pkt_t k;
    k.src = src; k.dest = dest; k.len = len; k.t_inj = -1;
    pkts.push_back(k);
    got.push_back(0);
    head_lat.push_back(-1);
    s_q[src].push_back(pkts.size() - 1);
    return pkts.size() - 1;
  endfunction

  function automatic int transpose(int s);
    return ((s & 7) << 3) | (s >> 3);
  endfunction
  function automatic int bitrev(int s);
    int r = 0;
    for (int b = 0; b < 6; b++) if (s & (1 << b)) r |= 1 << (5 - b);
    return r;
  endfunction

  task automatic env_cycle();
    // ---- ejection ----
    for (int p = 0; p < int'(N); p++) begin
      pe_cr_in[p] = '0;
      if (pe_cr_out[p].valid) s_cred[p][pe_cr_out[p].vc]++;
      if (pe_out_valid[p]) begin
        int id, idx, v;
        v   = int'(pe_out_flit[p].vc);
        id  = int'(pe_out_flit[p].data[39:16]);
        idx = int'(pe_out_flit[p].data[15:8]);
        pe_cr_in[p].valid = 1'b1;            // consume at once, return credit
        pe_cr_in[p].vc    = VC_W'(v);
        if (id < pkts.size()) begin
          check(pkts[id].dest == p, "flit ejected at the wrong PE");
          if (pe_out_flit[p].head) begin
            check(k_cur[p][v] < 0, "head while a packet is open on this VC");
            k_cur[p][v] = id; k_next[p][v] = 0;
            head_lat[id] = cycle - pkts[id].t_inj;
          end
          check(k_cur[p][v] == id, "packets interleaved on one VC");
          check(idx == k_next[p][v], "flit order");
          check(pe_out_flit[p].tail == (idx == pkts[id].len - 1), "tail marker");
          k_next[p][v]++;
          if (pe_out_flit[p].tail) k_cur[p][v] = -1;
          got[id]++;
        end else check(0, "unknown packet");
      end
    end
    // ---- injection ----
    for (int p = 0; p < int'(N); p++) begin
      pe_in_valid[p] = 1'b0;
      pe_in_flit[p]  = '0;
      if (s_pkt[p] < 0 && s_q[p].size() > 0) begin
        s_pkt[p] = s_q[p].pop_front();
        s_idx[p] = 0;
        s_vc[p]  = (s_vc[p] + 1) % V;
      end
      if (s_pkt[p] >= 0 && s_cred[p][s_vc[p]] > 0) begin
        pkt_t k;
        k = pkts[s_pkt[p]];
        if (s_idx[p] == 0) pkts[s_pkt[p]].t_inj = cycle;
        pe_in_valid[p] = 1'b1;
        pe_in_flit[p]  = mk_flit(s_pkt[p], k.dest, s_idx[p], k.len, s_vc[p]);
        s_cred[p][s_vc[p]]--;
        s_idx[p]++;
        if (s_idx[p] == k.len) s_pkt[p] = -1;
      end
    end
    @(negedge clk);
    cycle++;
  endtask

  // ---- mechanism monitors (sampled inside the network) ----
  for (genvar r = 0; r < 16; r++) begin : g_mon_leaf
    always @(posedge clk) if (rst_n) begin
      if (dut.l_out_v[r][4] && dut.l_out_f[r][4].head) n_up4++;
      if (dut.l_out_v[r][5] && dut.l_out_f[r][5].head) n_up5++;
      for (int v = 0; v < int'(V); v++)
        if (dut.g_leaf[r].u_router.cred_q[4][v] == 0) n_credit_stall++;
    end
  end
  for (genvar t = 0; t < 4; t++) begin : g_mon_top
    always @(posedge clk) if (rst_n) begin
      if (dut.t_out_v[t][2] && dut.t_out_f[t][2].head) n_tsv++;
      if (!dut.t_rdy[t][2]) begin
        for (int p = 0; p < 3; p++)
          for (int v = 0; v < int'(V); v++)
            if (dut.g_top[t].u_router.st_q[p][v] == 2'd2 &&
                dut.g_top[t].u_router.port_q[p][v] == 3'd2)
              n_ser_stall++;
      end
    end
  end

  // source-side classification of the paths taken (from the packet list)
  function automatic void classify();
    foreach (pkts[i]) begin
      if (pkts[i].src / 4 != pkts[i].dest / 4 && pkts[i].src / 16 == pkts[i].dest / 16) n_mid_turn++;
      if (pkts[i].src / 16 != pkts[i].dest / 16 && pkts[i].src / 32 == pkts[i].dest / 32) n_top_turn++;
    end
  endfunction

  function automatic bit all_done();
    foreach (pkts[i]) if (got[i] != pkts[i].len) return 0;
    return 1;
  endfunction

  task automatic drain(int limit);
    int t0 = cycle;
    while (!all_done() && cycle < t0 + limit) env_cycle();
    repeat (100) env_cycle();
  endtask

  task automatic probe(int src, int dest, int exp_lat);
    int id;
    id = new_packet(src, dest, 1);
    drain(500);
    check(head_lat[id] == exp_lat,
          $sformatf("zero-load latency %0d->%0d: %0d, expected %0d", src, dest, head_lat[id], exp_lat));
  endtask

  task automatic traffic(int pattern, int rate_permille, int cycles);
    for (int c = 0; c < cycles; c++) begin
      for (int p = 0; p < int'(N); p++)
        // rate in flits/cycle/PE; one packet is PKT flits
        if (($urandom % (1000 * PKT)) < rate_permille) begin
          int d;
          case (pattern)
            0: d = $urandom % N;
            1: d = transpose(p);
            default: d = bitrev(p);
          endcase
          void'(new_packet(p, d, PKT));
        end
      env_cycle();
    end
  endtask

  initial begin
    for (int p = 0; p < int'(N); p++) begin
      pe_in_valid[p] = 1'b0; pe_in_flit[p] = '0; pe_cr_in[p] = '0;
      s_pkt[p] = -1; s_idx[p] = 0; s_vc[p] = V - 1;
      for (int v = 0; v < int'(V); v++) begin
        s_cred[p][v] = DEPTH; k_cur[p][v] = -1; k_next[p][v] = 0;
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. zero-load latency
    probe(0, 1, 4);
    probe(0, 4, 38);
    probe(0, 20, 72);
    probe(0, 32, 79);
    probe(63, 2, 79);

    // 2. the three traffic patterns, light then heavy
    for (int pat = 0; pat < 3; pat++) begin
      int first, lat_sum, n;
      first = pkts.size();
      traffic(pat, 18, 3000);      // 0.018 flits/cycle/PE
      drain(20000);
      lat_sum = 0; n = 0;
      for (int i = first; i < pkts.size(); i++)
        if (head_lat[i] >= 0) begin lat_sum += head_lat[i]; n++; end
      $display("pattern %0d light load: %0d packets, mean head latency %0d cycles",
               pat, pkts.size() - first, (n > 0) ? lat_sum / n : -1);
      check(n == pkts.size() - first && n > 0, "light-load packets all arrived");
      traffic(pat, 300, 400);      // heavy burst
      drain(40000);
      check(all_done(), $sformatf("pattern %0d: every packet delivered", pat));
    end

    classify();
    $display("mechanisms: up4=%0d up5=%0d tsv=%0d ser_stall=%0d credit_stall=%0d mid_turn=%0d top_turn=%0d",
             n_up4, n_up5, n_tsv, n_ser_stall, n_credit_stall, n_mid_turn, n_top_turn);
    check(n_up4 > 0 && n_up5 > 0, "both up ports of leaf routers used (RROD)");
    check(n_tsv > 0, "packets crossed layers on TSV links");
    check(n_ser_stall > 0, "2:1 serialiser held back a top router");
    check(n_credit_stall > 0, "credit exhaustion on a wire");
    check(n_mid_turn > 0, "packets turned at a middle router");
    check(n_top_turn > 0, "packets turned at a top router without crossing layers");
    for (int p = 0; p < int'(N); p++)
      for (int v = 0; v < int'(V); v++)
        check(s_cred[p][v] == DEPTH, "PE got all injection credits back");
    $display("packets=%0d cycles=%0d", pkts.size(), cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
