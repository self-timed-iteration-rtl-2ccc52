// tb_st_top: end-to-end test of st_top at its default parameters.
//
// Closes every loop of the top through wire delay models and runs all
// circuits at once from one reset:
//   oscillator, direct and CMOS rings, parallel-path loop, I/O loops: random
//   rise/fall delays 1..40 on every wire;
//   slow-status CMOS ring, slow-pair ring and three-stage early-release
//   ring: rise 27..28 (slow
//   pair 29), fall 1..4 (slow 5) forward, 1..3 backward and on r wires, so
//   that resetting is faster than evaluating and the slow pair is the last
//   to change, as those circuits assume.
// Every value is checked against the reference models. Each mechanism must
// happen at least once (counted and printed): oscillation, evaluation in
// every ring, concurrent reset/evaluation in every ring, early reset
// release in the three-stage ring, split and join waits, copy and exchange.
// The unrolled chain is driven with random words alongside the rings.
// Broken delay assumptions (fight flags) count as failures.
module tb_st_top;
  import st_pkg::*;
  import st_ref_pkg::*;
  localparam int W = 8;
  localparam int N = 5;
  localparam int MIN_EVALS = 40;

  logic rst_n, en;
  logic [W-1:0] dir_ld, cmos_ld, slow_ld, opt_ld, conc_ld, par_ld;
  logic [W-1:0] io_ld [2];

  logic [N-1:0] osc_y, osc_yf, osc_yb;
  dr_t [W-1:0] dir_y [N], dir_yf [N], dir_yb [N];
  dr_t [W-1:0] cmos_y [N], cmos_yf [N], cmos_yb [N];
  dr_t [W-1:0] slow_y [N], slow_yf [N], slow_yb [N];
  dr_t [W-1:0] opt_y [N], opt_yf [N], opt_yb [N];
  logic [N-1:0] opt_fight;
  dr_t [W-1:0] conc_y [3], conc_yf [3], conc_yb [3];
  logic [2:0] conc_r, conc_rd, conc_fight;
  dr_t [W-1:0] par_y [8], par_yf [8], par_yb [8];
  dr_t [W-1:0] io_y [2][6], io_yf [2][6], io_yb [2][6];
  dr_t [W-1:0] io_tx [2], io_rx [2], io_txs [2];
  dr_t [W-1:0] cc_x, cc_y;
  logic cc_valid, cc_rst;

  st_top dut (
    .rst_n(rst_n),
    .osc_y_o(osc_y), .osc_y_fwd_i(osc_yf), .osc_y_bwd_i(osc_yb),
    .dir_ld_val(dir_ld), .dir_y_o(dir_y), .dir_y_fwd_i(dir_yf), .dir_y_bwd_i(dir_yb),
    .cmos_ld_val(cmos_ld), .cmos_y_o(cmos_y), .cmos_y_fwd_i(cmos_yf), .cmos_y_bwd_i(cmos_yb),
    .slow_ld_val(slow_ld), .slow_y_o(slow_y), .slow_y_fwd_i(slow_yf), .slow_y_bwd_i(slow_yb),
    .opt_ld_val(opt_ld), .opt_y_o(opt_y), .opt_y_fwd_i(opt_yf), .opt_y_bwd_i(opt_yb), .opt_fight(opt_fight),
    .conc_ld_val(conc_ld), .conc_y_o(conc_y), .conc_y_fwd_i(conc_yf), .conc_y_bwd_i(conc_yb),
    .conc_r_o(conc_r), .conc_r_i(conc_rd), .conc_fight(conc_fight),
    .par_ld_val(par_ld), .par_y_o(par_y), .par_y_fwd_i(par_yf), .par_y_bwd_i(par_yb),
    .io_ld_val(io_ld), .io_y_o(io_y), .io_y_fwd_i(io_yf), .io_y_bwd_i(io_yb),
    .io_tx_o(io_tx), .io_rx_i(io_rx),
    .cc_x(cc_x), .cc_y(cc_y), .cc_y_valid(cc_valid), .cc_y_rst(cc_rst));

  // ---------------- interconnect models
  tb_wire #(.NB(N), .SEED(1), .RMIN(1), .RMAX(40), .FMIN(1), .FMAX(40)) w_osc_f (.a(osc_y), .y(osc_yf));
  tb_wire #(.NB(N), .SEED(2), .RMIN(1), .RMAX(40), .FMIN(1), .FMAX(40)) w_osc_b (.a(osc_y), .y(osc_yb));
  tb_dr_wires #(.N(N), .W(W), .SEED(10), .RMIN(1), .RMAX(40), .FMIN(1), .FMAX(40)) w_dir_f (.a(dir_y), .y(dir_yf));
  tb_dr_wires #(.N(N), .W(W), .SEED(20), .RMIN(1), .RMAX(40), .FMIN(1), .FMAX(40)) w_dir_b (.a(dir_y), .y(dir_yb));
  tb_dr_wires #(.N(N), .W(W), .SEED(30), .RMIN(1), .RMAX(40), .FMIN(1), .FMAX(40)) w_cmos_f (.a(cmos_y), .y(cmos_yf));
  tb_dr_wires #(.N(N), .W(W), .SEED(40), .RMIN(1), .RMAX(40), .FMIN(1), .FMAX(40)) w_cmos_b (.a(cmos_y), .y(cmos_yb));
  tb_dr_wires #(.N(N), .W(W), .SEED(150), .RMIN(27), .RMAX(28), .FMIN(1), .FMAX(4), .SLOW(W - 1)) w_slow_f (.a(slow_y), .y(slow_yf));
  tb_dr_wires #(.N(N), .W(W), .SEED(160), .RMIN(1), .RMAX(3), .FMIN(1), .FMAX(3), .SLOW(W - 1)) w_slow_b (.a(slow_y), .y(slow_yb));
  tb_dr_wires #(.N(N), .W(W), .SEED(50), .RMIN(27), .RMAX(28), .FMIN(1), .FMAX(4), .SLOW(W - 1)) w_opt_f (.a(opt_y), .y(opt_yf));
  tb_dr_wires #(.N(N), .W(W), .SEED(60), .RMIN(1), .RMAX(3), .FMIN(1), .FMAX(3), .SLOW(W - 1)) w_opt_b (.a(opt_y), .y(opt_yb));
  tb_dr_wires #(.N(3), .W(W), .SEED(70), .RMIN(27), .RMAX(28), .FMIN(1), .FMAX(4), .SLOW(W - 1)) w_conc_f (.a(conc_y), .y(conc_yf));
  tb_dr_wires #(.N(3), .W(W), .SEED(80), .RMIN(1), .RMAX(3), .FMIN(1), .FMAX(3), .SLOW(W - 1)) w_conc_b (.a(conc_y), .y(conc_yb));
  tb_wire #(.NB(3), .SEED(90), .RMIN(1), .RMAX(3), .FMIN(1), .FMAX(3)) w_conc_r (.a(conc_r), .y(conc_rd));
  tb_dr_wires #(.N(8), .W(W), .SEED(100), .RMIN(1), .RMAX(40), .FMIN(1), .FMAX(40)) w_par_f (.a(par_y), .y(par_yf));
  tb_dr_wires #(.N(8), .W(W), .SEED(110), .RMIN(1), .RMAX(40), .FMIN(1), .FMAX(40)) w_par_b (.a(par_y), .y(par_yb));
  for (genvar l = 0; l < 2; l++) begin : g_io
    tb_dr_wires #(.N(6), .W(W), .SEED(120 + l), .RMIN(1), .RMAX(40), .FMIN(1), .FMAX(40)) w_f (.a(io_y[l]), .y(io_yf[l]));
    tb_dr_wires #(.N(6), .W(W), .SEED(130 + l), .RMIN(1), .RMAX(40), .FMIN(1), .FMAX(40)) w_b (.a(io_y[l]), .y(io_yb[l]));
  end
  assign io_txs[0] = io_tx[1];
  assign io_txs[1] = io_tx[0];
  tb_dr_wires #(.N(2), .W(W), .SEED(140), .RMIN(1), .RMAX(40), .FMIN(1), .FMAX(40)) w_x (.a(io_txs), .y(io_rx));

  // ---------------- scoreboards
  int osc_tg [N];
  int osc_ck, osc_fl;
  int ev [5], ck [5], fl [5];
  int par_ev, par_ck, par_fl, par_jw, par_sw;
  int io_ev, io_ck, io_fl, io_cp, io_xc;

  tb_osc_check #(.N(N)) c_osc (.en(en), .y(osc_y), .toggles(osc_tg), .checks(osc_ck), .failures(osc_fl));
  tb_ring_check #(.N(N), .W(W), .STRICT(1'b1)) c_dir  (.en(en), .ld(dir_ld),  .y(dir_y),  .evals(ev[0]), .checks(ck[0]), .failures(fl[0]));
  tb_ring_check #(.N(N), .W(W), .STRICT(1'b0)) c_cmos (.en(en), .ld(cmos_ld), .y(cmos_y), .evals(ev[1]), .checks(ck[1]), .failures(fl[1]));
  tb_ring_check #(.N(N), .W(W), .STRICT(1'b0)) c_opt  (.en(en), .ld(opt_ld),  .y(opt_y),  .evals(ev[2]), .checks(ck[2]), .failures(fl[2]));
  tb_ring_check #(.N(3), .W(W), .STRICT(1'b0)) c_conc (.en(en), .ld(conc_ld), .y(conc_y), .evals(ev[3]), .checks(ck[3]), .failures(fl[3]));
  tb_ring_check #(.N(N), .W(W), .STRICT(1'b0)) c_slow (.en(en), .ld(slow_ld), .y(slow_y), .evals(ev[4]), .checks(ck[4]), .failures(fl[4]));
  tb_par_check #(.W(W)) c_par (.en(en), .ld(par_ld), .y(par_y), .yb(par_yb), .evals(par_ev), .checks(par_ck),
                               .failures(par_fl), .join_waits(par_jw), .split_waits(par_sw));
  tb_io_check #(.W(W)) c_io (.en(en), .ld(io_ld), .y(io_y), .evals(io_ev), .checks(io_ck), .failures(io_fl),
                             .copies(io_cp), .exchanges(io_xc));

  // ---------------- mechanism counters
  function automatic logic w_valid(input dr_t [W-1:0] v);
    for (int i = 0; i < W; i++) if (!(v[i].t | v[i].f)) return 1'b0;
    return 1'b1;
  endfunction
  function automatic logic w_rst(input dr_t [W-1:0] v);
    for (int i = 0; i < W; i++) if (v[i].t | v[i].f) return 1'b0;
    return 1'b1;
  endfunction

  // concurrency: an evaluation and a reset both still travelling to the
  // successor (all delay of this model is in the wires)
  int ovl [5];
  int fights, early;
  logic [4:0] both, both_q;
  always_comb begin
    logic e [5], r [5];
    for (int s = 0; s < 5; s++) begin e[s] = 1'b0; r[s] = 1'b0; end
    for (int j = 0; j < N; j++) begin
      e[0] |= w_valid(dir_y[j])  & ~w_valid(dir_yf[j]);  r[0] |= w_rst(dir_y[j])  & ~w_rst(dir_yf[j]);
      e[1] |= w_valid(cmos_y[j]) & ~w_valid(cmos_yf[j]); r[1] |= w_rst(cmos_y[j]) & ~w_rst(cmos_yf[j]);
      e[2] |= w_valid(opt_y[j])  & ~w_valid(opt_yf[j]);  r[2] |= w_rst(opt_y[j])  & ~w_rst(opt_yf[j]);
      e[4] |= w_valid(slow_y[j]) & ~w_valid(slow_yf[j]); r[4] |= w_rst(slow_y[j]) & ~w_rst(slow_yf[j]);
    end
    for (int j = 0; j < 3; j++) begin
      e[3] |= w_valid(conc_y[j]) & ~w_valid(conc_yf[j]); r[3] |= w_rst(conc_y[j]) & ~w_rst(conc_yf[j]);
    end
    for (int s = 0; s < 5; s++) both[s] = e[s] & r[s];
  end

  initial begin
    for (int s = 0; s < 5; s++) ovl[s] = 0;
    both_q = '0; fights = 0; early = 0;
  end
  always @(both) begin
    for (int s = 0; s < 5; s++) if (en && both[s] && !both_q[s]) ovl[s]++;
    both_q = both;
  end
  always @(posedge (|opt_fight | |conc_fight)) if (en) fights++;

  // early release: r of a three-stage-ring stage falls while its successor's
  // slow pair, as this stage sees it, is still valid (the release comes
  // from the successor's r, not from the successor having reset)
  for (genvar j = 0; j < 3; j++) begin : g_early
    always @(negedge conc_r[j]) begin
      if (en && (conc_yb[(j + 1) % 3][W-1].t | conc_yb[(j + 1) % 3][W-1].f)) early++;
    end
  end

  // unrolled chain: random words applied bit by bit, result compared with
  // F^N of the word, output reset checked after the input is reset
  int cc_ev, cc_ck, cc_fl;
  initial begin
    cc_ev = 0; cc_ck = 0; cc_fl = 0; cc_x = '0;
    wait (en);
    forever begin
      automatic logic [W-1:0] v = W'($urandom);
      automatic logic [63:0] e = 64'(v);
      for (int k = 0; k < N; k++) e = f_ring(e, W);
      for (int i = 0; i < W; i++) #($urandom_range(1, 20)) cc_x[i] = dr_enc(v[i]);
      #20 cc_ck++;
      if (!cc_valid) begin cc_fl++; $display("ERROR chain not complete"); end
      for (int i = 0; i < W; i++) begin
        cc_ck++;
        if (cc_y[i].t !== e[i] || cc_y[i].f !== ~e[i]) begin cc_fl++; $display("ERROR chain bit %0d", i); end
      end
      cc_ev++;
      for (int i = 0; i < W; i++) #($urandom_range(1, 20)) cc_x[i] = '0;
      #20 cc_ck++;
      if (!cc_rst) begin cc_fl++; $display("ERROR chain not reset"); end
    end
  end

  task automatic need(input int count, input string what, inout int f, inout int c);
    c++;
    $display("  %-34s %0d", what, count);
    if (count == 0) begin f++; $display("ERROR mechanism never happened: %s", what); end
  endtask

  task automatic finish(input int extra);
    automatic int f = extra + osc_fl + par_fl + io_fl + cc_fl;
    automatic int c = osc_ck + par_ck + io_ck + cc_ck;
    for (int s = 0; s < 5; s++) begin f += fl[s]; c += ck[s]; end
    $display("mechanisms:");
    need(osc_tg[0], "oscillator toggles (stage 0)", f, c);
    need(ev[0], "direct ring evaluations", f, c);
    need(ev[1], "CMOS ring evaluations", f, c);
    need(ev[4], "slow-status CMOS ring evaluations", f, c);
    need(ev[2], "slow-pair ring evaluations", f, c);
    need(ev[3], "three-stage ring evaluations", f, c);
    need(ovl[0], "direct ring reset/eval overlap", f, c);
    need(ovl[1], "CMOS ring reset/eval overlap", f, c);
    need(ovl[4], "slow-status CMOS ring reset/eval overlap", f, c);
    need(ovl[2], "slow-pair ring reset/eval overlap", f, c);
    need(ovl[3], "three-stage ring reset/eval overlap", f, c);
    need(early, "early reset releases", f, c);
    need(par_jw, "join waits", f, c);
    need(par_sw, "split waits", f, c);
    need(io_cp, "I/O copies", f, c);
    need(io_xc, "I/O exchanges", f, c);
    need(cc_ev, "unrolled chain evaluations", f, c);
    c++;
    if (fights != 0) begin f++; $display("ERROR delay assumption broken %0d times", fights); end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  endtask

  initial begin
    dir_ld = 8'hA5; cmos_ld = 8'h3C; slow_ld = 8'hE2; opt_ld = 8'h96; conc_ld = 8'h71; par_ld = 8'h5B;
    io_ld[0] = 8'h3A; io_ld[1] = 8'h4D;
    rst_n = 0; en = 0;
    #200 rst_n = 1; en = 1;
    wait (ev[0] >= MIN_EVALS && ev[1] >= MIN_EVALS && ev[2] >= MIN_EVALS && ev[3] >= MIN_EVALS && ev[4] >= MIN_EVALS &&
          par_ev >= 8 * 10 && io_cp >= 3 && io_xc >= 3 && osc_tg[0] >= 50);
    #10 finish(0);
  end

  initial begin
    #1000000;
    $display("ERROR watchdog");
    finish(1);
  end
endmodule
