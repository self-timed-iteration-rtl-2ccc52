// st_top: the self-timed iteration circuits side by side.
//
// Holds every circuit of the design, each on its own ports, sharing only the
// asynchronous active-low reset rst_n:
//   osc_  ring_osc   ring oscillator of N C-elements
//   dir_  iter_ring  N-stage iteration ring, direct stages (precondition+latch)
//   cmos_ iter_ring  N-stage ring, merged NAND/latch stages with status memory
//   slow_ iter_ring  N-stage ring, CMOS stages with slow-pair status and reset
//   opt_  iter_ring  N-stage ring, slow-pair reset (reset faster than evaluate)
//   conc_ iter_ring  3-stage ring, early reset release for concurrency
//   par_  par_loop   loop with split/join and two parallel paths
//   io_   io_loops   two loops exchanging values through I/O elements
//   cc_   comb_chain unrolled chain of N kernel copies (no iteration)
// There is no clock anywhere: every circuit starts iterating when rst_n rises
// and runs as fast as its gates and wires allow.
//
// All interconnect wires between stages are brought out: every stage output
// appears on a *_y_o port and is read back on *_y_fwd_i (by its successor) and
// *_y_bwd_i (by its predecessor); likewise conc_r_o/conc_r_i and io_tx_o/
// io_rx_i. A netlist closes the loops by tying each receiver to its driver
// (io_rx_i[0] to io_tx_o[1] and vice versa); a testbench can insert any wire
// delays. *_ld_val give the initial values; *_fight flag broken delay
// assumptions of the timing-optimised rings.
module st_top
  import st_pkg::*;
#(
  parameter int unsigned W = 8,
  parameter int unsigned N = 5
) (
  input  logic          rst_n,
  // ring oscillator
  output logic [N-1:0]  osc_y_o,
  input  logic [N-1:0]  osc_y_fwd_i,
  input  logic [N-1:0]  osc_y_bwd_i,
  // direct-stage ring
  input  logic [W-1:0]  dir_ld_val,
  output dr_t  [W-1:0]  dir_y_o     [N],
  input  dr_t  [W-1:0]  dir_y_fwd_i [N],
  input  dr_t  [W-1:0]  dir_y_bwd_i [N],
  // merged CMOS-stage ring
  input  logic [W-1:0]  cmos_ld_val,
  output dr_t  [W-1:0]  cmos_y_o     [N],
  input  dr_t  [W-1:0]  cmos_y_fwd_i [N],
  input  dr_t  [W-1:0]  cmos_y_bwd_i [N],
  // timing-optimised ring
  input  logic [W-1:0]  slow_ld_val,
  output dr_t  [W-1:0]  slow_y_o     [N],
  input  dr_t  [W-1:0]  slow_y_fwd_i [N],
  input  dr_t  [W-1:0]  slow_y_bwd_i [N],
  input  logic [W-1:0]  opt_ld_val,
  output dr_t  [W-1:0]  opt_y_o     [N],
  input  dr_t  [W-1:0]  opt_y_fwd_i [N],
  input  dr_t  [W-1:0]  opt_y_bwd_i [N],
  output logic [N-1:0]  opt_fight,
  // three-stage ring with early reset release
  input  logic [W-1:0]  conc_ld_val,
  output dr_t  [W-1:0]  conc_y_o     [3],
  input  dr_t  [W-1:0]  conc_y_fwd_i [3],
  input  dr_t  [W-1:0]  conc_y_bwd_i [3],
  output logic [2:0]    conc_r_o,
  input  logic [2:0]    conc_r_i,
  output logic [2:0]    conc_fight,
  // loop with parallel paths
  input  logic [W-1:0]  par_ld_val,
  output dr_t  [W-1:0]  par_y_o     [8],
  input  dr_t  [W-1:0]  par_y_fwd_i [8],
  input  dr_t  [W-1:0]  par_y_bwd_i [8],
  // communicating loops
  input  logic [W-1:0]  io_ld_val  [2],
  output dr_t  [W-1:0]  io_y_o     [2][6],
  input  dr_t  [W-1:0]  io_y_fwd_i [2][6],
  input  dr_t  [W-1:0]  io_y_bwd_i [2][6],
  output dr_t  [W-1:0]  io_tx_o    [2],
  input  dr_t  [W-1:0]  io_rx_i    [2],
  // unrolled chain
  input  dr_t  [W-1:0]  cc_x,
  output dr_t  [W-1:0]  cc_y,
  output logic          cc_y_valid,
  output logic          cc_y_rst
);

  ring_osc #(.N(N)) u_osc (
    .rst_n(rst_n), .y_o(osc_y_o), .y_fwd_i(osc_y_fwd_i), .y_bwd_i(osc_y_bwd_i));

  // The direct and CMOS rings have no reset-control wires or fight flags.
  logic [N-1:0] dir_r_unused, dir_fight_unused, cmos_r_unused, cmos_fight_unused;
  logic [N-1:0] slow_r_unused, slow_fight_unused;
  logic [N-1:0] opt_r_o;

  iter_ring #(.N(N), .W(W), .STYLE(ST_DIRECT)) u_dir (
    .rst_n(rst_n), .ld_val(dir_ld_val), .y_o(dir_y_o), .y_fwd_i(dir_y_fwd_i),
    .y_bwd_i(dir_y_bwd_i), .r_o(dir_r_unused), .r_i(dir_r_unused), .fight(dir_fight_unused));

  iter_ring #(.N(N), .W(W), .STYLE(ST_CMOS)) u_cmos (
    .rst_n(rst_n), .ld_val(cmos_ld_val), .y_o(cmos_y_o), .y_fwd_i(cmos_y_fwd_i),
    .y_bwd_i(cmos_y_bwd_i), .r_o(cmos_r_unused), .r_i(cmos_r_unused), .fight(cmos_fight_unused));

  iter_ring #(.N(N), .W(W), .STYLE(ST_SLOW)) u_slow (
    .rst_n(rst_n), .ld_val(slow_ld_val), .y_o(slow_y_o), .y_fwd_i(slow_y_fwd_i),
    .y_bwd_i(slow_y_bwd_i), .r_o(slow_r_unused), .r_i(slow_r_unused), .fight(slow_fight_unused));

  // In the plain optimised ring r is local to each stage (computed from the
  // successor's slow pair), so no r wires leave the ring.
  iter_ring #(.N(N), .W(W), .STYLE(ST_OPT)) u_opt (
    .rst_n(rst_n), .ld_val(opt_ld_val), .y_o(opt_y_o), .y_fwd_i(opt_y_fwd_i),
    .y_bwd_i(opt_y_bwd_i), .r_o(opt_r_o), .r_i(opt_r_o), .fight(opt_fight));

  iter_ring #(.N(3), .W(W), .STYLE(ST_CONC)) u_conc (
    .rst_n(rst_n), .ld_val(conc_ld_val), .y_o(conc_y_o), .y_fwd_i(conc_y_fwd_i),
    .y_bwd_i(conc_y_bwd_i), .r_o(conc_r_o), .r_i(conc_r_i), .fight(conc_fight));

  par_loop #(.W(W)) u_par (
    .rst_n(rst_n), .ld_val(par_ld_val), .y_o(par_y_o), .y_fwd_i(par_y_fwd_i),
    .y_bwd_i(par_y_bwd_i));

  io_loops #(.W(W)) u_io (
    .rst_n(rst_n), .ld_val(io_ld_val), .y_o(io_y_o), .y_fwd_i(io_y_fwd_i),
    .y_bwd_i(io_y_bwd_i), .tx_o(io_tx_o), .rx_i(io_rx_i));

  comb_chain #(.W(W), .K(N)) u_cc (
    .rst_n(rst_n), .x(cc_x), .y(cc_y), .y_valid(cc_y_valid), .y_rst(cc_y_rst));

endmodule
