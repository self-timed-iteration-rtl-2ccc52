// tb_ring_osc: the ring oscillator with random wire delays (forward and
// backward copies of each output delayed independently, 1..30 units). It
// must keep one crest and one trough at all times and keep oscillating:
// every stage must toggle at least MIN_TOGGLES times.
module tb_ring_osc;
  localparam int N = 5;
  localparam int MIN_TOGGLES = 100;
  logic rst_n, en;
  logic [N-1:0] y, yf, yb;
  int toggles [N];
  int checks, failures;

  ring_osc dut (.rst_n(rst_n), .y_o(y), .y_fwd_i(yf), .y_bwd_i(yb));
  tb_wire #(.NB(N), .SEED(3), .RMIN(1), .RMAX(30), .FMIN(1), .FMAX(30)) u_f (.a(y), .y(yf));
  tb_wire #(.NB(N), .SEED(8), .RMIN(1), .RMAX(30), .FMIN(1), .FMAX(30)) u_b (.a(y), .y(yb));
  tb_osc_check #(.N(N)) u_chk (.en(en), .y(y), .toggles(toggles), .checks(checks), .failures(failures));

  task automatic finish(input int extra);
    automatic int f = failures + extra;
    automatic int c = checks;
    for (int j = 0; j < N; j++) begin
      c++;
      if (toggles[j] < MIN_TOGGLES) begin f++; $display("ERROR stage %0d toggled %0d times", j, toggles[j]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  endtask

  initial begin
    rst_n = 0; en = 0;
    #100 rst_n = 1; en = 1;
    wait (toggles[0] >= MIN_TOGGLES && toggles[N-1] >= MIN_TOGGLES);
    #10 finish(0);
  end

  initial begin
    #200000;
    $display("ERROR watchdog");
    finish(1);
  end
endmodule
