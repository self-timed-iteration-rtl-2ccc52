// tb_comb_chain: self-checking test of the unrolled chain at its default
// size. Each round drives the input rails of a random word from reset to
// valid one bit at a time in random order, then back to reset in random
// order. After every single input change it checks that any output bit that
// is already valid carries its final value (no glitch reaches the output)
// and that no bit has both rails high; once the input is complete it checks
// y = F^K(x) against the reference model and that y_valid is set; once the
// input is reset again it checks that y_rst is set. Counts rounds in which
// the output became valid before the last input bit arrived (early
// completion through a controlling NAND input) and requires at least one.
module tb_comb_chain;
  import st_pkg::*;
  import st_ref_pkg::*;
  localparam int W = 8;
  localparam int K = 5;

  logic rst_n;
  dr_t [W-1:0] x, y;
  logic y_valid, y_rst;
  int checks = 0, failures = 0, early = 0;

  comb_chain dut (.rst_n(rst_n), .x(x), .y(y), .y_valid(y_valid), .y_rst(y_rst));

  function automatic logic [63:0] fk(input logic [63:0] v, input int n);
    for (int i = 0; i < n; i++) v = f_ring(v, W);
    return v;
  endfunction

  task automatic check_partial(input logic [W-1:0] exp);
    for (int i = 0; i < W; i++) begin
      checks++;
      if (y[i].t & y[i].f) begin failures++; $display("ERROR bit %0d both rails high", i); end
      else if ((y[i].t | y[i].f) && y[i].t !== exp[i]) begin
        failures++; $display("ERROR bit %0d valid with wrong value", i);
      end
    end
  endtask

  initial begin
    rst_n = 0; x = '0;
    #1 rst_n = 1;
    for (int r = 0; r < 300; r++) begin
      automatic logic [W-1:0] v = W'($urandom);
      automatic logic [W-1:0] exp = W'(fk(64'(v), K));
      automatic int ord [W];
      for (int i = 0; i < W; i++) ord[i] = i;
      ord.shuffle();
      #1;
      for (int n = 0; n < W; n++) begin
        x[ord[n]] = dr_enc(v[ord[n]]);
        #1 check_partial(exp);
        if (n < W - 1 && y_valid) early++;
      end
      checks++;
      if (!y_valid || y_rst) begin failures++; $display("ERROR output not complete"); end
      for (int i = 0; i < W; i++) begin
        checks++;
        if (y[i].t !== exp[i] || y[i].f !== ~exp[i]) begin
          failures++; $display("ERROR x=%h bit %0d: got t=%b f=%b want %b", v, i, y[i].t, y[i].f, exp[i]);
        end
      end
      ord.shuffle();
      for (int n = 0; n < W; n++) begin
        x[ord[n]] = '0;
        #1 check_partial(exp);
      end
      checks++;
      if (!y_rst || y_valid) begin failures++; $display("ERROR output not reset"); end
    end
    $display("early completions %0d", early);
    checks++;
    if (early == 0) begin failures++; $display("ERROR early completion never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("ERROR watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
