// iter_ring: self-timed iteration ring of N stages.
//
// A tail-recursive computation y_i = F(y_{i-1}) is folded onto a small ring:
// a wave of valid values (the crest) followed by reset values (the trough)
// travels around it, each stage computing the next element of the sequence
// from its predecessor's value once its successor is reset, and resetting once
// its predecessor is reset and its successor holds the new value. At any time
// the valid stages form one contiguous run, and stage j's m-th valid value
// is F^(j + m*N)(ld_val).
//
// Kernel: every stage computes out[i] = NAND(a[i], b[i]); the ring wires
// a = in and b[i] = in[i+1] for i < W-1, b[W-1] = in[W-1], so that
//   F(y)[i] = ~(y[i] & y[i+1]),   F(y)[W-1] = ~y[W-1].
// STYLE picks the stage circuit:
//   ST_DIRECT precondition + latch (direct_stage), delay-independent
//   ST_CMOS   merged NAND/latch with status memory (cmos_stage), delay-independent
//   ST_OPT    slow-pair reset, needs reset faster than evaluation (opt_stage)
//   ST_CONC   as ST_OPT with early reset release, for N = 3 (opt_stage)
//   ST_SLOW   as ST_CMOS, but successor status and input reset taken from the
//             slow pair only; needs that pair to be last to change (cmos_stage)
// SLOW_BIT names the pair that is slowest to change, used by ST_OPT/ST_CONC/ST_SLOW.
//
// Interface: stage j drives y_o[j]; the successor reads it on y_fwd_i[j] and
// the predecessor on y_bwd_i[j], and likewise r_o/r_i carry the reset controls
// of ST_CONC. The interconnect is therefore outside this module; tie each
// receiver to its driver for a direct netlist. fight[j] flags a violated delay
// assumption in ST_OPT/ST_CONC stages (always 0 otherwise). rst_n (active low,
// asynchronous) loads ld_val into stage 0 and the reset word elsewhere; the
// ring then runs by itself, without a clock.
module iter_ring
  import st_pkg::*;
#(
  parameter int unsigned N        = 5,
  parameter int unsigned W        = 8,
  parameter style_e      STYLE    = ST_DIRECT,
  parameter int unsigned SLOW_BIT = W - 1
) (
  input  logic          rst_n,
  input  logic [W-1:0]  ld_val,
  output dr_t  [W-1:0]  y_o     [N],
  input  dr_t  [W-1:0]  y_fwd_i [N],
  input  dr_t  [W-1:0]  y_bwd_i [N],
  output logic [N-1:0]  r_o,
  input  logic [N-1:0]  r_i,
  output logic [N-1:0]  fight
);

  for (genvar j = 0; j < N; j++) begin : g_stage
    localparam int unsigned PRED = (j + N - 1) % N;
    localparam int unsigned SUCC = (j + 1) % N;

    dr_t [W-1:0] a, b;

    assign a = y_fwd_i[PRED];
    for (genvar i = 0; i < W; i++) begin : g_b
      assign b[i] = (i == W - 1) ? y_fwd_i[PRED][i] : y_fwd_i[PRED][(i + 1) % W];
    end

    if (STYLE == ST_DIRECT || STYLE == ST_CMOS) begin : g_full
      logic s_valid, s_rst;
      dr_completion #(.W(W)) u_succ (.x(y_bwd_i[SUCC]), .valid(s_valid), .rst(s_rst));
      assign r_o[j]   = 1'b0;
      assign fight[j] = 1'b0;
      if (STYLE == ST_DIRECT) begin : g_direct
        direct_stage #(.W(W)) u_stage (
          .rst_n(rst_n), .ld(j == 0), .ld_val(ld_val), .a(a), .b(b),
          .succ_valid(s_valid), .succ_rst(s_rst), .y(y_o[j]));
      end else begin : g_cmos
        cmos_stage #(.W(W)) u_stage (
          .rst_n(rst_n), .ld(j == 0), .ld_val(ld_val), .a(a), .b(b),
          .succ_valid(s_valid), .succ_rst(s_rst), .y(y_o[j]));
      end
    end else if (STYLE == ST_SLOW) begin : g_slow
      logic s_any;
      assign s_any    = y_bwd_i[SUCC][SLOW_BIT].t | y_bwd_i[SUCC][SLOW_BIT].f;
      assign r_o[j]   = 1'b0;
      assign fight[j] = 1'b0;
      cmos_stage #(.W(W), .SLOW_RESET(1'b1), .SLOW_BIT(SLOW_BIT)) u_stage (
        .rst_n(rst_n), .ld(j == 0), .ld_val(ld_val), .a(a), .b(b),
        .succ_valid(s_any), .succ_rst(~s_any), .y(y_o[j]));
    end else begin : g_opt
      opt_stage #(.W(W), .EARLY_RELEASE(STYLE == ST_CONC)) u_stage (
        .rst_n(rst_n), .ld(j == 0), .ld_val(ld_val), .a(a), .b(b),
        .succ_slow(y_bwd_i[SUCC][SLOW_BIT]), .succ_r(r_i[SUCC]),
        .r(r_o[j]), .y(y_o[j]), .fight(fight[j]));
    end
  end

endmodule
