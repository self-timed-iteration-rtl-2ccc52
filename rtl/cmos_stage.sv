// cmos_stage: iteration stage with the kernel and the latch merged.
//
// Each output rail is a dynamic node with a pull-down network that evaluates
// the NAND and a pull-up that precharges it, both gated by st, the memory of
// whether the successor was last valid (dr_status). Per bit:
//   y.f rises when a.t & b.t & !st        falls when !a.t & !b.t & st
//   y.t rises when (a.f | b.f) & !st      falls when !a.f & !b.f & st
// and otherwise keeps its value. The input valid/reset tests are implicit in
// these stacks (a rail can only be precharged once the inputs that discharge
// it are reset), and st replaces the two successor tests. Like the direct
// stage this needs no delay assumption between stages. The per-bit NAND of
// a and b is the kernel; a ring decides by wiring what a and b are.
//
// With SLOW_RESET = 1 the pull-up stacks no longer confirm that every input
// rail feeding them is reset: each node is precharged once the input's slow
// pair (SLOW_BIT) is reset, which is correct when that pair is known to be the
// last input to reset. A ring using this form also derives succ_valid and
// succ_rst from the successor's slow pair alone.
//
// rst_n (active low, asynchronous) loads the reset word, or the valid word
// ld_val when ld is high; meanwhile st follows valid(succ).
module cmos_stage
  import st_pkg::*;
#(
  parameter int unsigned W          = 8,
  parameter bit          SLOW_RESET = 1'b0,
  parameter int unsigned SLOW_BIT   = W - 1
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

  logic st;

  dr_status u_st (.rst_n(rst_n), .valid(succ_valid), .rst(succ_rst), .status(st));

  // input slow pair reset (used only with SLOW_RESET)
  logic in_slow_rst;
  assign in_slow_rst = ~a[SLOW_BIT].t & ~a[SLOW_BIT].f;

  for (genvar i = 0; i < W; i++) begin : g_cell
    logic init_t, init_f, pre_f, pre_t;
    assign pre_f = SLOW_RESET ? in_slow_rst : (~a[i].t & ~b[i].t);
    assign pre_t = SLOW_RESET ? in_slow_rst : (~a[i].f & ~b[i].f);
    assign init_t = ld & ld_val[i];
    assign init_f = ld & ~ld_val[i];

    // node I: output false rail
    always_latch begin
      if (!rst_n)                        y[i].f = init_f;
      else if (a[i].t & b[i].t & ~st)    y[i].f = 1'b1;
      else if (pre_f & st)               y[i].f = 1'b0;
    end

    // node J: output true rail
    always_latch begin
      if (!rst_n)                        y[i].t = init_t;
      else if ((a[i].f | b[i].f) & ~st)  y[i].t = 1'b1;
      else if (pre_t & st)               y[i].t = 1'b0;
    end
  end

endmodule
