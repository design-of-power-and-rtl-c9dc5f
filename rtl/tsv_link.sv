// tsv_link: one direction of a vertical (through-silicon via) link between
// the two layers, with 2:1 data serialisation.
//
// A 64-bit flit is split into SER beats of TSV_W = FLIT_W/SER bits and sent
// one beat per cycle over TSV_W signal TSVs; the TSVs themselves add
// TSV_DELAY cycles. Beside the data TSVs, control TSVs carry with every
// beat a valid bit, a first-beat marker and the flit's head/tail/VC bits.
// The receiver collects the beats and presents the whole flit in the cycle
// its last beat arrives. Credits from the receiving router go back down
// the link on their own TSVs (valid + VC id) with the same TSV_DELAY.
//
// Timing: a flit accepted in cycle c leaves the receiver in cycle
// c + SER + TSV_DELAY (= c+3 for SER=2, TSV_DELAY=1). The link
// accepts one flit every SER cycles. `ready` tells the sending router, one
// cycle ahead, whether a flit may arrive in the next cycle: the router
// registers its output, so a flit it grants in cycle t arrives in t+1.
//
// Following the design: 64-bit channel, 2:1 serialisation onto 32 TSVs,
// one cycle of TSV delay. The control and credit TSVs, the beat format and
// the ready rule are this design's choices.
module tsv_link
  import noc_pkg::*;
#(
  parameter int unsigned SER       = 2,
  parameter int unsigned TSV_DELAY = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  // sender side (lower-numbered router's output)
  input  logic    in_valid,
  input  flit_t   in_flit,
  output logic    ready,
  output credit_t cr_out,
  // receiver side
  output logic    out_valid,
  output flit_t   out_flit,
  input  credit_t cr_in
);
  localparam int unsigned TSV_W = FLIT_W / SER;
  localparam int unsigned BW    = (SER > 1) ? $clog2(SER) : 1;

  // what one beat puts on the TSVs
  typedef struct packed {
    logic              valid;
    logic              first;
    logic              head;
    logic              tail;
    logic [VC_W-1:0]   vc;
    logic [TSV_W-1:0]  data;
  } beat_t;

  // ---------------- serialiser ----------------
  flit_t         hold_q;      // flit being sent
  logic [BW:0]   rem_q;       // beats still to send after the one on the TSVs
  logic [BW-1:0] idx_q;       // index of the next beat to send
  beat_t         drv_q;       // beat driven onto the TSVs this cycle

  function automatic beat_t make_beat(flit_t f, int unsigned i, logic first);
    beat_t b;
    b.valid = 1'b1;
    b.first = first;
    b.head  = f.head;
    b.tail  = f.tail;
    b.vc    = f.vc;
    b.data  = f.data[i*TSV_W +: TSV_W];
    return b;
  endfunction

  assign ready = in_valid ? (SER == 1) : (rem_q <= 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q <= '0;
      idx_q <= '0;
      drv_q <= '0;
    end else if (in_valid) begin
      drv_q <= make_beat(in_flit, 0, 1'b1);
      rem_q <= (BW+1)'(SER - 1);
      idx_q <= BW'(1 % SER);
    end else if (rem_q != 0) begin
      drv_q <= make_beat(hold_q, int'(idx_q), 1'b0);
      rem_q <= rem_q - 1'b1;
      idx_q <= idx_q + 1'b1;
    end else begin
      drv_q <= '0;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) hold_q <= in_flit;
  end

  // ---------------- TSV delay, both directions ----------------
  beat_t   tsv_q [TSV_DELAY];
  credit_t crd_q [TSV_DELAY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(TSV_DELAY); i++) begin
        tsv_q[i] <= '0;
        crd_q[i] <= '0;
      end
    end else begin
      tsv_q[0] <= drv_q;
      crd_q[0] <= cr_in;
      for (int i = 1; i < int'(TSV_DELAY); i++) begin
        tsv_q[i] <= tsv_q[i-1];
        crd_q[i] <= crd_q[i-1];
      end
    end
  end

  assign cr_out = crd_q[TSV_DELAY-1];

  // ---------------- deserialiser ----------------
  beat_t                  rx;
  logic [BW-1:0]          ridx_q;
  logic [FLIT_W-1:0]      acc_q;
  logic [BW-1:0]          ridx;
  logic [FLIT_W-1:0]      acc;

  assign rx = tsv_q[TSV_DELAY-1];

  always_comb begin
    ridx = rx.first ? '0 : ridx_q;
    acc  = acc_q;
    acc[int'(ridx)*TSV_W +: TSV_W] = rx.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ridx_q <= '0;
      acc_q  <= '0;
    end else if (rx.valid) begin
      ridx_q <= ridx + 1'b1;
      acc_q  <= acc;
    end
  end

  assign out_valid     = rx.valid && (int'(ridx) == int'(SER) - 1);
  assign out_flit.head = rx.head;
  assign out_flit.tail = rx.tail;
  assign out_flit.vc   = rx.vc;
  assign out_flit.data = acc;

  // the sender must respect `ready`: no new flit while beats are pending
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> (rem_q == 0))
    else $error("tsv_link: flit offered while the serialiser is busy");
endmodule
