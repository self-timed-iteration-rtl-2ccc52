// tb_iter_ring: self-checking test of iter_ring in all four stage styles.
//
// Four rings (direct and CMOS stages with N = 5 and random wire delays,
// slow-pair stages with N = 5, early-release stages with N = 3, the last two
// with fall delays shorter than rise delays) start from the same value and
// run freely. Every value each stage produces is compared with the reference
// F^k(ld); the test requires at least MIN_EVALS values from every ring, and
// no broken delay assumption in the timed rings, and that every ring (the
// three-stage one included) resets one stage while another evaluates.
module tb_iter_ring;
  import st_pkg::*;

  localparam int unsigned W         = 8;
  localparam int          MIN_EVALS = 60;

  logic [W-1:0] ld;
  logic         rst_n, en;
  int ev [5], ck [5], fl [5], fg [5], ov [5];
  int checks, failures;

  tb_ring_env #(.N(5), .W(W), .STYLE(ST_DIRECT), .SEED(11)) e_dir  (.ld(ld), .rst_n(rst_n), .en(en), .evals(ev[0]), .checks(ck[0]), .failures(fl[0]), .fights(fg[0]), .overlaps(ov[0]));
  tb_ring_env #(.N(5), .W(W), .STYLE(ST_CMOS),   .SEED(23)) e_cmos (.ld(ld), .rst_n(rst_n), .en(en), .evals(ev[1]), .checks(ck[1]), .failures(fl[1]), .fights(fg[1]), .overlaps(ov[1]));
  tb_ring_env #(.N(5), .W(W), .STYLE(ST_OPT),    .SEED(37)) e_opt  (.ld(ld), .rst_n(rst_n), .en(en), .evals(ev[2]), .checks(ck[2]), .failures(fl[2]), .fights(fg[2]), .overlaps(ov[2]));
  tb_ring_env #(.N(3), .W(W), .STYLE(ST_CONC),   .SEED(41)) e_conc (.ld(ld), .rst_n(rst_n), .en(en), .evals(ev[3]), .checks(ck[3]), .failures(fl[3]), .fights(fg[3]), .overlaps(ov[3]));
  tb_ring_env #(.N(5), .W(W), .STYLE(ST_SLOW),   .SEED(53)) e_slow (.ld(ld), .rst_n(rst_n), .en(en), .evals(ev[4]), .checks(ck[4]), .failures(fl[4]), .fights(fg[4]), .overlaps(ov[4]));

  task automatic finish();
    checks = 0; failures = 0;
    for (int s = 0; s < 5; s++) begin
      checks   += ck[s] + 2;
      failures += fl[s];
      if (ev[s] < MIN_EVALS) begin
        failures++;
        $display("ERROR ring %0d produced only %0d values", s, ev[s]);
      end
      if (fg[s] != 0) begin
        failures++;
        $display("ERROR ring %0d broke its delay assumption %0d times", s, fg[s]);
      end
      if (ov[s] == 0) begin
        failures++;
        $display("ERROR ring %0d never reset one stage while evaluating another", s);
      end
      $display("ring %0d: %0d values, %0d checks, %0d failures, %0d overlaps", s, ev[s], ck[s], fl[s], ov[s]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    ld = 8'hA5; rst_n = 1'b0; en = 1'b0;
    #200 en = 1'b1;
    rst_n = 1'b1;
    wait (ev[0] >= MIN_EVALS && ev[1] >= MIN_EVALS && ev[2] >= MIN_EVALS && ev[3] >= MIN_EVALS && ev[4] >= MIN_EVALS);
    #100 finish();
  end

  // watchdog
  initial begin
    #200000;
    $display("ERROR watchdog expired");
    failures = 1;
    finish();
  end

endmodule
