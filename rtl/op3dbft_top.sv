// op3dbft_top: the optimised two-layer butterfly-fat-tree network (OP3DBFT)
// connecting 64 processing elements (PEs) with 28 routers.
//
// Structure (PE numbers 0..63; layer 0 holds PEs 0..31, layer 1 PEs 32..63):
//   16 leaf routers   r = 0..15, PEs 4r..4r+3 on ports 0-3, and two parents
//                     on ports 4 and 5: the two middle routers of cluster
//                     c = r/4 (middle routers 2c and 2c+1).
//    8 middle routers m = 0..7, cluster c = m/2 (16 PEs), its four leaf
//                     routers on ports 0-3, one parent on port 4.
//    4 top routers    t = 0..3 in layer t%2. Middle router m (cluster c,
//                     j = m%2) connects to top router 2j + c/2 on that top
//                     router's port c%2. Port 2 of top router t is the
//                     vertical link to its peer t^1 in the other layer.
// So each layer is a self-contained fat tree of 8 leaf, 4 middle and 2 top
// routers, and only the two top-router pairs (0,1) and (2,3) cross the
// layers: two vertical links instead of the eight of a plainly stacked fat
// tree. A packet climbs to the nearest common ancestor of source and
// destination, crossing layers at the top if it must, then descends.
//
// Links: every router-to-router connection is a pair of opposite
// unidirectional channels. Horizontal ones are link_pipe with H_DELAY
// cycles; vertical ones are tsv_link (2:1 serialisation, TSV_DELAY).
// PE channels attach straight to the leaf routers (the router's output
// register is their one cycle of delay).
//
// PE interface, per PE p: pe_in_* injects flits into leaf port p%4 and
// pe_cr_out returns one credit per flit the router consumed (each PE starts
// with DEPTH credits per VC); pe_out_* delivers flits, and the PE returns
// one credit on pe_cr_in per flit it takes (it may hold at most DEPTH
// flits per VC un-credited).
//
// Following the design: the OP3DBFT topology (64 PEs, 28 routers, two
// vertical links between top routers), 13-cycle horizontal links, 1-cycle
// TSVs, 2:1 serialisation, 8 VCs of 16 flits, 64-bit channels, NCA routing
// with round-robin up-port selection. This design's choices: the exact
// numbering of routers and ports, and the PE-side credit interface.
module op3dbft_top
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH     = 16,
  parameter int unsigned H_DELAY   = 13,
  parameter int unsigned SER       = 2,
  parameter int unsigned TSV_DELAY = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    pe_in_valid  [NUM_PE],
  input  flit_t   pe_in_flit   [NUM_PE],
  output credit_t pe_cr_out    [NUM_PE],
  output logic    pe_out_valid [NUM_PE],
  output flit_t   pe_out_flit  [NUM_PE],
  input  credit_t pe_cr_in     [NUM_PE]
);
  localparam int unsigned NL = 16, NM = 8, NT = 4;
  localparam int unsigned PL = 6,  PM = 5, PT = 3;

  // leaf routers
  logic    l_in_v [NL][PL];  flit_t l_in_f [NL][PL];  credit_t l_cro [NL][PL];
  logic    l_out_v[NL][PL];  flit_t l_out_f[NL][PL];  credit_t l_cri [NL][PL];
  logic    l_rdy  [NL][PL];
  // middle routers
  logic    m_in_v [NM][PM];  flit_t m_in_f [NM][PM];  credit_t m_cro [NM][PM];
  logic    m_out_v[NM][PM];  flit_t m_out_f[NM][PM];  credit_t m_cri [NM][PM];
  logic    m_rdy  [NM][PM];
  // top routers
  logic    t_in_v [NT][PT];  flit_t t_in_f [NT][PT];  credit_t t_cro [NT][PT];
  logic    t_out_v[NT][PT];  flit_t t_out_f[NT][PT];  credit_t t_cri [NT][PT];
  logic    t_rdy  [NT][PT];

  // ---------------- routers ----------------
  for (genvar r = 0; r < NL; r++) begin : g_leaf
    bft_router #(.LEVEL(LVL_LEAF), .P(PL), .DEPTH(DEPTH)) u_router (
      .clk, .rst_n, .pos(4'(r)),
      .in_valid(l_in_v[r]), .in_flit(l_in_f[r]), .cr_out(l_cro[r]),
      .out_valid(l_out_v[r]), .out_flit(l_out_f[r]), .cr_in(l_cri[r]),
      .out_ready(l_rdy[r])
    );
  end
  for (genvar m = 0; m < NM; m++) begin : g_mid
    bft_router #(.LEVEL(LVL_MID), .P(PM), .DEPTH(DEPTH)) u_router (
      .clk, .rst_n, .pos(4'(m)),
      .in_valid(m_in_v[m]), .in_flit(m_in_f[m]), .cr_out(m_cro[m]),
      .out_valid(m_out_v[m]), .out_flit(m_out_f[m]), .cr_in(m_cri[m]),
      .out_ready(m_rdy[m])
    );
  end
  for (genvar t = 0; t < NT; t++) begin : g_top
    bft_router #(.LEVEL(LVL_TOP), .P(PT), .DEPTH(DEPTH)) u_router (
      .clk, .rst_n, .pos(4'(t)),
      .in_valid(t_in_v[t]), .in_flit(t_in_f[t]), .cr_out(t_cro[t]),
      .out_valid(t_out_v[t]), .out_flit(t_out_f[t]), .cr_in(t_cri[t]),
      .out_ready(t_rdy[t])
    );
  end

  // ---------------- PEs <-> leaf routers ----------------
  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    assign l_in_v[p/4][p%4] = pe_in_valid[p];
    assign l_in_f[p/4][p%4] = pe_in_flit[p];
    assign pe_cr_out[p]     = l_cro[p/4][p%4];
    assign pe_out_valid[p]  = l_out_v[p/4][p%4];
    assign pe_out_flit[p]   = l_out_f[p/4][p%4];
    assign l_cri[p/4][p%4]  = pe_cr_in[p];
    assign l_rdy[p/4][p%4]  = 1'b1;
  end

  // ---------------- leaf <-> middle (horizontal) ----------------
  for (genvar r = 0; r < NL; r++) begin : g_lm
    for (genvar j = 0; j < 2; j++) begin : g_par
      localparam int unsigned M = 2 * (r / 4) + j;  // parent middle router
      localparam int unsigned K = r % 4;            // port on the parent
      link_pipe #(.DELAY(H_DELAY)) u_up (
        .clk, .rst_n,
        .in_valid(l_out_v[r][4+j]), .in_flit(l_out_f[r][4+j]), .cr_out(l_cri[r][4+j]),
        .out_valid(m_in_v[M][K]),   .out_flit(m_in_f[M][K]),   .cr_in(m_cro[M][K])
      );
      link_pipe #(.DELAY(H_DELAY)) u_down (
        .clk, .rst_n,
        .in_valid(m_out_v[M][K]),   .in_flit(m_out_f[M][K]),   .cr_out(m_cri[M][K]),
        .out_valid(l_in_v[r][4+j]), .out_flit(l_in_f[r][4+j]), .cr_in(l_cro[r][4+j])
      );
      assign l_rdy[r][4+j] = 1'b1;
      assign m_rdy[M][K]   = 1'b1;
    end
  end

  // ---------------- middle <-> top (horizontal) ----------------
  for (genvar m = 0; m < NM; m++) begin : g_mt
    localparam int unsigned C = m / 2;
    localparam int unsigned T = 2 * (m % 2) + C / 2;  // parent top router
    localparam int unsigned D = C % 2;                // port on the parent
    link_pipe #(.DELAY(H_DELAY)) u_up (
      .clk, .rst_n,
      .in_valid(m_out_v[m][4]), .in_flit(m_out_f[m][4]), .cr_out(m_cri[m][4]),
      .out_valid(t_in_v[T][D]), .out_flit(t_in_f[T][D]), .cr_in(t_cro[T][D])
    );
    link_pipe #(.DELAY(H_DELAY)) u_down (
      .clk, .rst_n,
      .in_valid(t_out_v[T][D]), .in_flit(t_out_f[T][D]), .cr_out(t_cri[T][D]),
      .out_valid(m_in_v[m][4]), .out_flit(m_in_f[m][4]), .cr_in(m_cro[m][4])
    );
    assign m_rdy[m][4] = 1'b1;
    assign t_rdy[T][D] = 1'b1;
  end

  // ---------------- top <-> top (vertical, TSV) ----------------
  for (genvar t = 0; t < NT; t++) begin : g_tsv
    localparam int unsigned PEER = t ^ 1;
    tsv_link #(.SER(SER), .TSV_DELAY(TSV_DELAY)) u_tsv (
      .clk, .rst_n,
      .in_valid(t_out_v[t][2]),    .in_flit(t_out_f[t][2]),    .ready(t_rdy[t][2]),
      .cr_out(t_cri[t][2]),
      .out_valid(t_in_v[PEER][2]), .out_flit(t_in_f[PEER][2]), .cr_in(t_cro[PEER][2])
    );
  end
endmodule
