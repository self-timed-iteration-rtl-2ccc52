// tb_cmos_stage: handshake rounds for the merged NAND/latch stage. The
// status memory must block evaluation until the successor has been seen
// reset (and keep doing so through the successor's in-between state), the
// output must be NAND(a, b), must hold while the successor is valid and the
// input is only partly reset, and reset when the input is reset.
module tb_cmos_stage;
  import st_pkg::*;
  localparam int W = 8;
  logic rst_n, ld, sv, sr;
  logic [W-1:0] ld_val;
  dr_t [W-1:0] a, b, y;
  int checks = 0, failures = 0;

  cmos_stage dut (.rst_n(rst_n), .ld(ld), .ld_val(ld_val), .a(a), .b(b),
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
    a = '0; b = '0; sv = 1; sr = 0; ld = 1; ld_val = 8'hC5; rst_n = 0;
    expect_y(enc(8'hC5), "load");
    ld = 0; expect_y('0, "reset");
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      automatic logic [W-1:0] va = W'($urandom), vb = W'($urandom);
      automatic dr_t [W-1:0] ev = enc(~(va & vb));
      // successor last valid: input must not evaluate
      for (int i = 0; i < W; i++) begin a[i] = dr_enc(va[i]); #1; b[i] = dr_enc(vb[i]); #1; end
      expect_y('0, "blocked while successor valid");
      sv = 0;
      expect_y('0, "blocked while successor in transition");
      sr = 1;
      expect_y(ev, "evaluate");
      sr = 0;
      expect_y(ev, "hold");
      sv = 1;
      expect_y(ev, "hold with input valid");
      for (int i = 0; i < W - 1; i++) begin a[i] = '0; b[i] = '0; end
      expect_y(partial(ev), "partial input reset");
      a[W-1] = '0; b[W-1] = '0;
      expect_y('0, "reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // With bits 0..W-2 of both operands reset and bit W-1 still valid, only
  // the rails whose pull-up is held off by bit W-1 keep their value: output
  // bit W-1 (operands a[W-1], b[W-1]) stays valid, all others are reset.
  function automatic dr_t [W-1:0] partial(input dr_t [W-1:0] ev);
    dr_t [W-1:0] r;
    r = '0;
    r[W-1] = ev[W-1];
    return r;
  endfunction

  initial begin
    #1000000;
    $display("ERROR watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
