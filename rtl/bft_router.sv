// bft_router: input-queued virtual-channel router of the OP3DBFT network.
//
// Every input port holds NUM_VC virtual-channel buffers (vc_fifo) of DEPTH
// flits. A packet (head flit .. tail flit) moves through the router in the
// classic stages:
//   RC  route computation: one nca_route unit per router serves, round
//       robin, the input VCs whose buffer shows a new head flit. The
//       router's round-robin bit RB picks the up port of a leaf router and
//       toggles each time it is used (RROD).
//   VA  VC allocation: per output port, a round-robin arbiter picks one
//       waiting input VC per cycle and hands it the lowest free VC of the
//       next router's input port. That VC stays owned until the tail flit
//       leaves.
//   SA  switch allocation, separable input-first: each input port picks one
//       of its VCs that has a flit, a credit for its output VC and a ready
//       output; each output port then picks one of the requesting inputs.
//   ST  the winner crosses the crossbar into the output register, so a flit
//       granted in cycle t is on the output in cycle t+1 (link traversal
//       follows in link_pipe / tsv_link).
// Flow control is credit based: the router keeps one counter per output VC,
// initialised to DEPTH, decremented per flit sent and incremented per credit
// returned; for every flit it pops it returns a credit upstream (registered).
// `out_ready[o]` low keeps output o from being granted this cycle (used by a
// serialising vertical link).
//
// Minimum latency of a head flit through an idle router: written into the
// buffer in cycle t, RC in t+1, VA in t+2, SA/ST in t+3, on the output in
// t+4. Body flits follow one per cycle.
//
// Following the design: the pipeline stages, 8 VCs per port, 16-flit VC
// buffers, 64-bit flits, NCA routing with round-robin up-port selection.
// This design's own choices: a single RC unit per router, one VA grant per
// output port per cycle, lowest-free-VC selection, separable input-first
// switch allocation, RB reset to 0, credit flow control.
module bft_router
  import noc_pkg::*;
#(
  parameter level_e      LEVEL = LVL_LEAF,
  parameter int unsigned P     = 6,     // ports: leaf 6, middle 5, top 3
  parameter int unsigned DEPTH = 16     // flits per VC buffer
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic [3:0] pos,           // index of this router within its level
  // input channels
  input  logic    in_valid  [P],
  input  flit_t   in_flit   [P],
  output credit_t cr_out    [P],
  // output channels
  output logic    out_valid [P],
  output flit_t   out_flit  [P],
  input  credit_t cr_in     [P],
  input  logic    out_ready [P]
);
  localparam int unsigned V   = NUM_VC;
  localparam int unsigned NV  = P * V;
  localparam int unsigned CW  = $clog2(DEPTH + 1);
  localparam int unsigned PW  = 3;

  typedef enum logic [1:0] {ST_IDLE, ST_VA, ST_ACTIVE} vcst_e;

  // ---------------- input VC buffers ----------------
  flit_t        front  [P][V];
  logic         empty  [P][V];
  logic         full   [P][V];
  logic [CW-1:0] cnt   [P][V];
  logic         pop    [P][V];

  for (genvar p = 0; p < P; p++) begin : g_in
    for (genvar v = 0; v < V; v++) begin : g_vc
      vc_fifo #(.DEPTH(DEPTH)) u_fifo (
        .clk, .rst_n,
        .push  (in_valid[p] && in_flit[p].vc == VC_W'(v)),
        .din   (in_flit[p]),
        .pop   (pop[p][v]),
        .front (front[p][v]),
        .empty (empty[p][v]),
        .full  (full[p][v]),
        .count (cnt[p][v])
      );
    end
  end

  // ---------------- per input VC state ----------------
  vcst_e           st_q   [P][V];
  logic [PW-1:0]   port_q [P][V];
  logic [VC_W-1:0] ovc_q  [P][V];
  logic            rb_q;

  // ---------------- RC ----------------
  logic [NV-1:0]     rc_req, rc_gnt;
  logic [DEST_W-1:0] rc_dest;
  logic [PW-1:0]     rc_port;
  logic              rc_rb_used;

  always_comb begin
    for (int p = 0; p < int'(P); p++)
      for (int v = 0; v < int'(V); v++)
        rc_req[p*V+v] = (st_q[p][v] == ST_IDLE) && !empty[p][v] && front[p][v].head;
  end

  rr_arbiter #(.N(NV)) u_rc_arb (
    .clk, .rst_n, .req(rc_req), .advance(1'b1), .gnt(rc_gnt)
  );

  always_comb begin
    rc_dest = '0;
    for (int p = 0; p < int'(P); p++)
      for (int v = 0; v < int'(V); v++)
        if (rc_gnt[p*V+v]) rc_dest = flit_dest(front[p][v]);
  end

  nca_route #(.LEVEL(LEVEL)) u_route (
    .pos, .dest(rc_dest), .rb(rb_q), .port(rc_port), .rb_used(rc_rb_used)
  );

  // ---------------- VA ----------------
  logic          ovc_busy_q [P][V];
  logic [NV-1:0] va_req [P];
  logic [NV-1:0] va_gnt [P];
  logic          va_has_free [P];
  logic [VC_W-1:0] va_free_vc [P];

  always_comb begin
    for (int o = 0; o < int'(P); o++) begin
      va_has_free[o] = 1'b0;
      va_free_vc[o]  = '0;
      for (int v = int'(V) - 1; v >= 0; v--)
        if (!ovc_busy_q[o][v]) begin
          va_has_free[o] = 1'b1;
          va_free_vc[o]  = VC_W'(v);
        end
      for (int p = 0; p < int'(P); p++)
        for (int v = 0; v < int'(V); v++)
          va_req[o][p*V+v] = va_has_free[o] && (st_q[p][v] == ST_VA) &&
                             (int'(port_q[p][v]) == o);
    end
  end

  for (genvar o = 0; o < P; o++) begin : g_va
    rr_arbiter #(.N(NV)) u_va_arb (
      .clk, .rst_n, .req(va_req[o]), .advance(1'b1), .gnt(va_gnt[o])
    );
  end

  // input VCs granted an output VC this cycle (each requests one port only)
  logic [NV-1:0] va_won;
  always_comb begin
    va_won = '0;
    for (int o = 0; o < int'(P); o++) va_won |= va_gnt[o];
  end

  // ---------------- SA ----------------
  logic [CW-1:0] cred_q [P][V];
  logic [V-1:0]  sai_req [P];
  logic [V-1:0]  sai_gnt [P];
  logic          sai_any [P];
  logic [VC_W-1:0] sai_vc [P];
  logic [PW-1:0] sai_port [P];
  logic [P-1:0]  sao_req [P];
  logic [P-1:0]  sao_gnt [P];
  logic          in_won  [P];
  logic          cred_dec [P][V];

  always_comb begin
    for (int p = 0; p < int'(P); p++) begin
      for (int v = 0; v < int'(V); v++)
        sai_req[p][v] = (st_q[p][v] == ST_ACTIVE) && !empty[p][v] &&
                        (cred_q[port_q[p][v]][ovc_q[p][v]] != 0) &&
                        out_ready[port_q[p][v]];
    end
  end

  for (genvar p = 0; p < P; p++) begin : g_sai
    rr_arbiter #(.N(V)) u_sai_arb (
      .clk, .rst_n, .req(sai_req[p]), .advance(in_won[p]), .gnt(sai_gnt[p])
    );
  end

  always_comb begin
    for (int p = 0; p < int'(P); p++) begin
      sai_any[p]  = |sai_gnt[p];
      sai_vc[p]   = '0;
      sai_port[p] = '0;
      for (int v = 0; v < int'(V); v++)
        if (sai_gnt[p][v]) begin
          sai_vc[p]   = VC_W'(v);
          sai_port[p] = port_q[p][v];
        end
    end
    for (int o = 0; o < int'(P); o++)
      for (int p = 0; p < int'(P); p++)
        sao_req[o][p] = sai_any[p] && (int'(sai_port[p]) == o);
  end

  for (genvar o = 0; o < P; o++) begin : g_sao
    rr_arbiter #(.N(P)) u_sao_arb (
      .clk, .rst_n, .req(sao_req[o]), .advance(1'b1), .gnt(sao_gnt[o])
    );
  end

  always_comb begin
    for (int p = 0; p < int'(P); p++) begin
      in_won[p] = 1'b0;
      for (int o = 0; o < int'(P); o++)
        if (sao_gnt[o][p]) in_won[p] = 1'b1;
      for (int v = 0; v < int'(V); v++)
        pop[p][v] = in_won[p] && (int'(sai_vc[p]) == v);
    end
    // output VC that loses a credit this cycle
    for (int o = 0; o < int'(P); o++)
      for (int v = 0; v < int'(V); v++)
        cred_dec[o][v] = 1'b0;
    for (int p = 0; p < int'(P); p++)
      if (in_won[p]) cred_dec[sai_port[p]][ovc_q[p][sai_vc[p]]] = 1'b1;
  end

  // ---------------- state updates ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rb_q <= 1'b0;
      for (int p = 0; p < int'(P); p++) begin
        out_valid[p] <= 1'b0;
        cr_out[p]    <= '0;
        for (int v = 0; v < int'(V); v++) begin
          st_q[p][v]       <= ST_IDLE;
          port_q[p][v]     <= '0;
          ovc_q[p][v]      <= '0;
          ovc_busy_q[p][v] <= 1'b0;
          cred_q[p][v]     <= CW'(DEPTH);
        end
      end
    end else begin
      // RC
      for (int p = 0; p < int'(P); p++)
        for (int v = 0; v < int'(V); v++)
          if (rc_gnt[p*V+v]) begin
            st_q[p][v]   <= ST_VA;
            port_q[p][v] <= rc_port;
          end
      if (|rc_gnt && rc_rb_used) rb_q <= ~rb_q;

      // VA
      for (int p = 0; p < int'(P); p++)
        for (int v = 0; v < int'(V); v++)
          if (va_won[p*V+v]) begin
            st_q[p][v]  <= ST_ACTIVE;
            ovc_q[p][v] <= va_free_vc[port_q[p][v]];
          end
      for (int o = 0; o < int'(P); o++)
        if (va_gnt[o] != '0) ovc_busy_q[o][va_free_vc[o]] <= 1'b1;

      // SA / ST and credits
      for (int o = 0; o < int'(P); o++) begin
        out_valid[o] <= 1'b0;
        for (int v = 0; v < int'(V); v++) begin
          if (cred_dec[o][v] && !(cr_in[o].valid && int'(cr_in[o].vc) == v))
            cred_q[o][v] <= cred_q[o][v] - 1'b1;
          else if (!cred_dec[o][v] && cr_in[o].valid && int'(cr_in[o].vc) == v)
            cred_q[o][v] <= cred_q[o][v] + 1'b1;
        end
      end
      for (int p = 0; p < int'(P); p++) begin
        cr_out[p] <= '0;
        if (in_won[p]) begin
          cr_out[p].valid <= 1'b1;
          cr_out[p].vc    <= sai_vc[p];
          out_valid[sai_port[p]] <= 1'b1;
          if (front[p][sai_vc[p]].tail) begin
            st_q[p][sai_vc[p]] <= ST_IDLE;
            ovc_busy_q[sai_port[p]][ovc_q[p][sai_vc[p]]] <= 1'b0;
          end
        end
      end
    end
  end

  // crossbar into the output registers
  always_ff @(posedge clk) begin
    for (int p = 0; p < int'(P); p++)
      if (in_won[p]) begin
        out_flit[sai_port[p]]    <= front[p][sai_vc[p]];
        out_flit[sai_port[p]].vc <= ovc_q[p][sai_vc[p]];
      end
  end

  // ---------------- protocol checks ----------------
  for (genvar p = 0; p < P; p++) begin : g_chk
    for (genvar v = 0; v < V; v++) begin : g_chk_vc
      // a packet must start with a head flit
      assert property (@(posedge clk) disable iff (!rst_n)
        (st_q[p][v] == ST_IDLE && !empty[p][v]) |-> front[p][v].head)
        else $error("bft_router: body flit without a packet in progress");
      // the route must name an existing port
      assert property (@(posedge clk) disable iff (!rst_n)
        (st_q[p][v] != ST_IDLE) |-> (int'(port_q[p][v]) < int'(P)))
        else $error("bft_router: route to a port this router lacks");
    end
  end
endmodule
