// tb_ring_env: one iter_ring with modelled interconnect and a scoreboard.
//
// Forward and backward copies of every stage output (and the reset-control
// wires) pass through separate delay models. For the delay-independent styles
// rise and fall delays are drawn from the same wide range; for ST_OPT and
// ST_CONC every fall delay is shorter than every rise delay and bit SLOW_BIT
// is the slowest pair, as those circuits require. rst_n is held low for 200
// time units, then the ring runs; 'fights' counts cycles of broken delay
// assumptions reported by the ring. Timed rings: rise 27..28 (slow pair 29),
// fall 1..4 (slow 5) forward; 1..3 backward and on the reset controls.
module tb_ring_env
  import st_pkg::*;
#(
  parameter int unsigned N     = 5,
  parameter int unsigned W     = 8,
  parameter style_e      STYLE = ST_DIRECT,
  parameter int unsigned SEED  = 1
) (
  input  logic [W-1:0] ld,
  input  logic         rst_n,
  input  logic         en,
  output int           evals,
  output int           checks,
  output int           failures,
  output int           fights,
  output int           overlaps
);

  localparam bit TIMED = (STYLE == ST_OPT) || (STYLE == ST_CONC) || (STYLE == ST_SLOW);
  localparam int unsigned RMIN = TIMED ? 27 : 1;
  localparam int unsigned RMAX = TIMED ? 28 : 40;
  localparam int unsigned FMIN = 1;
  localparam int unsigned FMAX = TIMED ? 4 : 40;
  localparam int          SLOWB = TIMED ? int'(W) - 1 : -1;

  dr_t [W-1:0] y_o [N], y_fwd [N], y_bwd [N];
  logic [N-1:0] r_o, r_d, fight;

  iter_ring #(.N(N), .W(W), .STYLE(STYLE)) dut (
    .rst_n(rst_n), .ld_val(ld), .y_o(y_o), .y_fwd_i(y_fwd), .y_bwd_i(y_bwd),
    .r_o(r_o), .r_i(r_d), .fight(fight));

  tb_dr_wires #(.N(N), .W(W), .SEED(SEED), .RMIN(RMIN), .RMAX(RMAX), .FMIN(FMIN),
                .FMAX(FMAX), .SLOW(SLOWB)) u_fwd (.a(y_o), .y(y_fwd));
  tb_dr_wires #(.N(N), .W(W), .SEED(SEED + 5000), .RMIN(TIMED ? 1 : RMIN), .RMAX(TIMED ? 3 : RMAX),
                .FMIN(FMIN), .FMAX(TIMED ? 3 : FMAX), .SLOW(SLOWB)) u_bwd (.a(y_o), .y(y_bwd));
  tb_wire #(.NB(N), .SEED(SEED + 9000), .RMIN(1), .RMAX(3), .FMIN(1), .FMAX(3)) u_r (.a(r_o), .y(r_d));

  tb_ring_check #(.N(N), .W(W), .STRICT(STYLE == ST_DIRECT)) u_chk (
    .en(en), .ld(ld), .y(y_o), .evals(evals), .checks(checks), .failures(failures));

  // Concurrency: every delay of this model sits in the wires, so a stage's
  // transition is in progress from the change of its output until the change
  // has reached its successor. 'overlaps' counts the moments at which an
  // evaluation and a reset are in progress at the same time.
  function automatic logic w_valid(input dr_t [W-1:0] v);
    for (int i = 0; i < W; i++) if (!(v[i].t | v[i].f)) return 1'b0;
    return 1'b1;
  endfunction
  function automatic logic w_rst(input dr_t [W-1:0] v);
    for (int i = 0; i < W; i++) if (v[i].t | v[i].f) return 1'b0;
    return 1'b1;
  endfunction

  logic [N-1:0] ev_act, rs_act;
  logic         both, both_q;
  for (genvar j = 0; j < N; j++) begin : g_act
    assign ev_act[j] = w_valid(y_o[j]) & ~w_valid(y_fwd[j]);
    assign rs_act[j] = w_rst(y_o[j]) & ~w_rst(y_fwd[j]);
  end
  assign both = |ev_act & |rs_act;
  initial begin overlaps = 0; both_q = 1'b0; end
  always @(both) begin
    if (en && both && !both_q) overlaps++;
    both_q = both;
  end

  initial fights = 0;
  always @(posedge |fight) if (en) begin
    fights++;
    if (fights < 4) $display("fight %m %b at %0t", fight, $time);
  end

endmodule
