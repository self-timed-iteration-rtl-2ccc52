// opt_stage: iteration stage simplified by known timing relations.
//
// Assumes that resetting (with its wire propagation) is always faster than
// evaluating, and that one bit of every word, the slow pair, is the last to
// become valid and the last to become reset. Then:
//  * the stage is reset by r = valid(succ.slow) = succ.slow.t | succ.slow.f,
//    which precharges both rails of every bit (one NOR gate instead of a
//    full completion tree and status memory);
//  * evaluation is not gated by the successor, and precharge does not wait
//    for the inputs to reset: y.f rises on a.t & b.t, y.t on a.f | b.f.
// With EARLY_RELEASE = 1 the reset control becomes
//   r = valid(succ.slow) & !succ.r
// held on a dynamic node: set while the successor is valid and not itself
// being reset, cleared as soon as the successor's own reset starts. The stage
// may then evaluate while its successor is still resetting, which gives
// concurrency in a ring of only three stages.
//
// The invariants of the iteration are kept only by those delays, not by the
// logic. When a rail's pull-up and pull-down would both conduct (the delay
// assumption is broken) the node keeps its value and fight is raised; a
// testbench can watch it. rst_n (active low, asynchronous) loads the reset
// word or, with ld, the valid word ld_val; r then follows its formula.
// For EARLY_RELEASE = 0 the r output is the plain reset control and succ_r is
// not used.
module opt_stage
  import st_pkg::*;
#(
  parameter int unsigned W             = 8,
  parameter bit          EARLY_RELEASE = 1'b0
) (
  input  logic            rst_n,
  input  logic            ld,
  input  logic [W-1:0]    ld_val,
  input  dr_t  [W-1:0]    a,
  input  dr_t  [W-1:0]    b,
  input  dr_t             succ_slow,
  input  logic            succ_r,
  output logic            r,
  output dr_t  [W-1:0]    y,
  output logic            fight
);

  logic         slow_valid;
  logic [W-1:0] pd_t, pd_f;

  assign slow_valid = succ_slow.t | succ_slow.f;

  if (EARLY_RELEASE) begin : g_early
    // r-bar node: pulled low (r = 1) by succ.r-bar & valid(slow), pulled high
    // (r = 0) by succ.r.
    always_latch begin
      if (!rst_n)          r = slow_valid & ~succ_r;
      else if (succ_r)     r = 1'b0;
      else if (slow_valid) r = 1'b1;
    end
  end else begin : g_plain
    assign r = slow_valid;
  end

  for (genvar i = 0; i < W; i++) begin : g_cell
    assign pd_f[i] = a[i].t & b[i].t;
    assign pd_t[i] = a[i].f | b[i].f;

    always_latch begin
      if (!rst_n)              y[i].f = ld & ~ld_val[i];
      else if (pd_f[i] & ~r)   y[i].f = 1'b1;
      else if (r & ~pd_f[i])   y[i].f = 1'b0;
    end

    always_latch begin
      if (!rst_n)              y[i].t = ld & ld_val[i];
      else if (pd_t[i] & ~r)   y[i].t = 1'b1;
      else if (r & ~pd_t[i])   y[i].t = 1'b0;
    end
  end

  assign fight = rst_n & r & |(pd_t | pd_f);

endmodule
