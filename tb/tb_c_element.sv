// tb_c_element: checks the Muller C-element against its truth table
// (LL -> L, HH -> H, mixed -> unchanged) from both previous output values,
// and the reset.
module tb_c_element;
  logic rst_n, rst_val, a, b, y;
  int checks = 0, failures = 0;

  c_element dut (.rst_n(rst_n), .rst_val(rst_val), .a(a), .b(b), .y(y));

  task automatic chk(input logic exp, input string what);
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("ERROR %s: y=%b expected %b", what, y, exp);
    end
  endtask

  initial begin
    rst_n = 0; rst_val = 1; a = 0; b = 0;
    chk(1'b1, "reset to 1");
    rst_val = 0; chk(1'b0, "reset to 0");
    rst_n = 1;
    for (int prev = 0; prev < 2; prev++) begin
      // establish previous output
      a = prev[0]; b = prev[0]; chk(prev[0], "agree");
      a = ~prev[0]; b = prev[0]; chk(prev[0], "hold a");
      a = prev[0]; b = ~prev[0]; chk(prev[0], "hold b");
      a = ~prev[0]; b = ~prev[0]; chk(~prev[0], "switch");
      a = prev[0]; chk(~prev[0], "hold after switch");
    end
    for (int k = 0; k < 200; k++) begin
      automatic logic exp;
      automatic logic na = 1'($urandom), nb = 1'($urandom);
      exp = (na == nb) ? na : y;
      a = na; b = nb;
      chk(exp, "random");
    end
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
