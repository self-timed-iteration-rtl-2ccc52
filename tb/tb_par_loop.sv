// tb_par_loop: the loop with parallel paths, every wire with its own random
// rise and fall delay (1..40). All stage values are checked against the
// model of tb_par_check; the test needs 30 revolutions and requires that
// the join waited for a slower operand and the split for a slower branch.
module tb_par_loop;
  import st_pkg::*;
  localparam int W = 8;
  localparam int MIN_EVALS = 8 * 30;
  logic rst_n, en;
  logic [W-1:0] ld;
  dr_t [W-1:0] y [8], yf [8], yb [8];
  int evals, checks, failures, jw, sw;

  par_loop dut (.rst_n(rst_n), .ld_val(ld), .y_o(y), .y_fwd_i(yf), .y_bwd_i(yb));
  tb_dr_wires #(.N(8), .W(W), .SEED(71), .RMIN(1), .RMAX(40), .FMIN(1), .FMAX(40)) u_f (.a(y), .y(yf));
  tb_dr_wires #(.N(8), .W(W), .SEED(79), .RMIN(1), .RMAX(40), .FMIN(1), .FMAX(40)) u_b (.a(y), .y(yb));
  tb_par_check #(.W(W)) u_chk (.en(en), .ld(ld), .y(y), .yb(yb), .evals(evals), .checks(checks),
                               .failures(failures), .join_waits(jw), .split_waits(sw));

  task automatic finish(input int extra);
    automatic int f = failures + extra;
    if (jw == 0) begin f++; $display("ERROR join never waited"); end
    if (sw == 0) begin f++; $display("ERROR split never waited"); end
    if (evals < MIN_EVALS) begin f++; $display("ERROR only %0d values", evals); end
    $display("values=%0d join_waits=%0d split_waits=%0d", evals, jw, sw);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 3, f);
    $finish;
  endtask

  initial begin
    ld = 8'h5B; rst_n = 0; en = 0;
    #200 rst_n = 1; en = 1;
    wait (evals >= MIN_EVALS);
    #10 finish(0);
  end

  initial begin
    #500000;
    $display("ERROR watchdog");
    finish(1);
  end
endmodule
