// direct_stage: iteration stage built directly from the transition
//   < (valid(in) & reset(succ)) | (reset(in) & valid(succ))  ->  out := F(in) >
//
// The stage input is the pair of dual-rail words a and b (together "in"); the
// kernel F is one dual-rail NAND gate per bit, out[i] = NAND(a[i], b[i]). A
// ring chooses what a and b are by wiring. Completion detectors on a and b
// give valid(in) and reset(in); the successor's valid/reset come in as two
// signals (a ring computes them with dr_completion, a split combines two
// successors). The precondition opens a transparent latch behind F, so out
// takes F(in) while the precondition holds and keeps its value otherwise.
// Because F gives a reset word for a reset input, the same latch performs
// both evaluation and reset. No assumption about delays is needed.
//
// rst_n (active low, asynchronous) sets out to the reset word, or to the
// valid word ld_val when ld is high: this is how a ring is given its initial
// state; the reset and load ports belong to this implementation.
module direct_stage
  import st_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic            rst_n,
  input  logic            ld,
  input  logic [W-1:0]    ld_val,
  input  dr_t  [W-1:0]    a,
  input  dr_t  [W-1:0]    b,
  input  logic            succ_valid,
  input  logic            succ_rst,
  output dr_t  [W-1:0]    y
);

  logic a_valid, a_rst, b_valid, b_rst;
  logic in_valid, in_rst, en;
  dr_t [W-1:0] fy;

  dr_completion #(.W(W)) u_ca (.x(a), .valid(a_valid), .rst(a_rst));
  dr_completion #(.W(W)) u_cb (.x(b), .valid(b_valid), .rst(b_rst));

  assign in_valid = a_valid & b_valid;
  assign in_rst   = a_rst & b_rst;
  assign en       = (in_valid & succ_rst) | (in_rst & succ_valid);

  for (genvar i = 0; i < W; i++) begin : g_f
    dr_nand2 u_nand (.rst_n(rst_n), .a(a[i]), .b(b[i]), .y(fy[i]));
  end

  always_latch begin
    if (!rst_n) begin
      for (int i = 0; i < W; i++) y[i] = ld ? dr_enc(ld_val[i]) : '0;
    end else if (en) begin
      y = fy;
    end
  end

endmodule
