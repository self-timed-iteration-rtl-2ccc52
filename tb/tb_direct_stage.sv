// tb_direct_stage: walks one stage through many handshake rounds.
// Each round: with the successor between phases the stage must ignore a
// valid input; once the successor reports reset it must output NAND(a, b);
// with the successor valid it must keep that value while the input resets
// bit by bit, and reset only when the whole input is reset. Also checks the
// load at reset.
module tb_direct_stage;
  import st_pkg::*;
  localparam int W = 8;
  logic rst_n, ld, sv, sr;
  logic [W-1:0] ld_val;
  dr_t [W-1:0] a, b, y;
  int checks = 0, failures = 0;

  direct_stage dut (.rst_n(rst_n), .ld(ld), .ld_val(ld_val), .a(a), .b(b),
                             .succ_valid(sv), .succ_rst(sr), .y(y));

  function automatic dr_t [W-1:0] enc(input logic [W-1:0] v);
    dr_t [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = dr_enc(v[i]);
    return r;
  endfunction

  task automatic expect_y(input dr_t [W-1:0] e, input string what);
    #1 checks++;
    if (y !== e) begin failures++; $display("ERROR %s: y=%h expected %h", what, y, e); end
  endtask

  initial begin
    a = '0; b = '0; sv = 0; sr = 1; ld = 1; ld_val = 8'h3C; rst_n = 0;
    expect_y(enc(8'h3C), "load");
    ld = 0; #1 rst_n = 0; expect_y('0, "reset");
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      automatic logic [W-1:0] va = W'($urandom), vb = W'($urandom);
      automatic dr_t [W-1:0] ev = enc(~(va & vb));
      // successor in transition: no evaluation
      sv = 0; sr = 0;
      for (int i = 0; i < W; i++) begin a[i] = dr_enc(va[i]); #1; b[i] = dr_enc(vb[i]); #1; end
      expect_y('0, "hold reset while successor not reset");
      sr = 1;
      expect_y(ev, "evaluate");
      sr = 0; sv = 1;
      for (int i = 0; i < W; i++) begin
        a[i] = '0;
        expect_y(ev, "hold while input partly reset");
        b[i] = '0;
        if (i < W - 1) expect_y(ev, "hold while input partly reset");
      end
      expect_y('0, "reset");
      sv = 0;
      expect_y('0, "stay reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("ERROR watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
