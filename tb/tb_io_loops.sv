// tb_io_loops: two loops with I/O elements, every wire (including the two
// exchange links) with random delays 1..40. Values of all twelve stages are
// checked against the model of tb_io_check; the test needs MIN_REV
// passes through the I/O elements, with both copies and exchanges.
module tb_io_loops;
  import st_pkg::*;
  localparam int W = 8;
  localparam int MIN_REV = 20;
  logic rst_n, en;
  logic [W-1:0] ld [2];
  dr_t [W-1:0] y [2][6], yf [2][6], yb [2][6];
  dr_t [W-1:0] tx [2], rx [2], txs [2];
  int evals, checks, failures, copies, exchanges;

  io_loops dut (.rst_n(rst_n), .ld_val(ld), .y_o(y), .y_fwd_i(yf), .y_bwd_i(yb),
                         .tx_o(tx), .rx_i(rx));
  for (genvar l = 0; l < 2; l++) begin : g_w
    tb_dr_wires #(.N(6), .W(W), .SEED(101 + l), .RMIN(1), .RMAX(40), .FMIN(1), .FMAX(40)) u_f (.a(y[l]), .y(yf[l]));
    tb_dr_wires #(.N(6), .W(W), .SEED(203 + l), .RMIN(1), .RMAX(40), .FMIN(1), .FMAX(40)) u_b (.a(y[l]), .y(yb[l]));
  end
  assign txs[0] = tx[1];
  assign txs[1] = tx[0];
  tb_dr_wires #(.N(2), .W(W), .SEED(307), .RMIN(1), .RMAX(40), .FMIN(1), .FMAX(40)) u_x (.a(txs), .y(rx));
  tb_io_check #(.W(W)) u_chk (.en(en), .ld(ld), .y(y), .evals(evals), .checks(checks),
                              .failures(failures), .copies(copies), .exchanges(exchanges));

  task automatic finish(input int extra);
    automatic int f = failures + extra;
    if (copies == 0)    begin f++; $display("ERROR no copy"); end
    if (exchanges == 0) begin f++; $display("ERROR no exchange"); end
    if (copies + exchanges < MIN_REV) begin f++; $display("ERROR only %0d revolutions", copies + exchanges); end
    $display("values=%0d copies=%0d exchanges=%0d", evals, copies, exchanges);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 3, f);
    $finish;
  endtask

  initial begin
    ld[0] = 8'h3A; ld[1] = 8'h4D;   // equal mode bits (bit 7), different data
    rst_n = 0; en = 0;
    #200 rst_n = 1; en = 1;
    wait (copies + exchanges >= MIN_REV);
    #10 finish(0);
  end

  initial begin
    #500000;
    $display("ERROR watchdog");
    finish(1);
  end
endmodule
