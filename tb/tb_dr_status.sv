// tb_dr_status: status must follow the last completed phase (valid -> 1,
// reset -> 0) and hold through the in-between state; during reset it follows
// valid.
module tb_dr_status;
  logic rst_n, valid, rst, status;
  logic model;
  int checks = 0, failures = 0;

  dr_status dut (.rst_n(rst_n), .valid(valid), .rst(rst), .status(status));

  initial begin
    rst_n = 0; valid = 1; rst = 0;
    #1 checks++; if (status !== 1'b1) begin failures++; $display("ERROR reset follow 1"); end
    valid = 0; rst = 1;
    #1 checks++; if (status !== 1'b0) begin failures++; $display("ERROR reset follow 0"); end
    rst_n = 1; model = 0;
    for (int k = 0; k < 1000; k++) begin
      automatic int s = $urandom % 3;   // 0 between, 1 valid, 2 reset
      valid = (s == 1);
      rst   = (s == 2);
      if (s == 1) model = 1;
      if (s == 2) model = 0;
      #1 checks++;
      if (status !== model) begin failures++; $display("ERROR step %0d: status %b expected %b", k, status, model); end
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
