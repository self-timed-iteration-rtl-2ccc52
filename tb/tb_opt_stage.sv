// tb_opt_stage: the timing-optimised stage in both forms.
// Plain form: the output evaluates as soon as the operands are
// valid, is precharged while the successor's slow pair is valid, and 'fight'
// rises when an evaluating input meets an active reset.
// Early-release form: r is set by a valid slow pair while the successor is not
// being reset, cleared when the successor's r rises, and held otherwise.
module tb_opt_stage;
  import st_pkg::*;
  localparam int W = 8;
  logic rst_n, succ_r;
  dr_t slow;
  dr_t [W-1:0] a, b, y0, y1;
  logic r0, r1, f0, f1;
  int checks = 0, failures = 0;

  opt_stage dut0 (.rst_n(rst_n), .ld(1'b0), .ld_val('0), .a(a), .b(b),
    .succ_slow(slow), .succ_r(succ_r), .r(r0), .y(y0), .fight(f0));
  opt_stage #(.EARLY_RELEASE(1'b1)) dut1 (.rst_n(rst_n), .ld(1'b0), .ld_val('0), .a(a), .b(b),
    .succ_slow(slow), .succ_r(succ_r), .r(r1), .y(y1), .fight(f1));

  function automatic dr_t [W-1:0] enc(input logic [W-1:0] v);
    dr_t [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = dr_enc(v[i]);
    return r;
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("ERROR %s at %0t", what, $time); end
  endtask

  initial begin
    a = '0; b = '0; slow = '0; succ_r = 0; rst_n = 0;
    #1 rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      automatic logic [W-1:0] va = W'($urandom), vb = W'($urandom);
      automatic dr_t [W-1:0] ev = enc(~(va & vb));
      a = enc(va); b = enc(vb);
      #1 chk(y0 === ev && y1 === ev, "evaluate");
      chk(!f0 && !f1, "no fight while evaluating");
      // successor becomes valid while inputs are still valid: fight, hold
      slow = dr_enc(1'($urandom));
      #1 chk(r0 && r1, "r set by valid slow pair");
      chk(f0 && f1, "fight flagged");
      chk(y0 === ev && y1 === ev, "hold during fight");
      a = '0; b = '0;
      #1 chk(y0 === '0 && y1 === '0, "precharge");
      chk(!f0 && !f1, "no fight after input reset");
      // early release: successor starts its own reset
      succ_r = 1;
      #1 chk(r0 && !r1, "early release clears r");
      slow = '0;
      #1 chk(!r0 && !r1, "r clear after successor reset");
      succ_r = 0;
      #1 chk(!r1, "r held low without valid successor");
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
