// tb_io_element: copy and exchange rounds through one I/O element, with the
// other element's side (rx) driven by the testbench. Copy: y = x once the
// successor is reset; tx stays reset. Exchange: tx = x; y waits for rx and
// then equals rx; after the input resets, y waits for rx to reset too.
module tb_io_element;
  import st_pkg::*;
  localparam int W = 8;
  logic rst_n, sv, sr;
  dr_t [W-1:0] x, rx, tx, y;
  int checks = 0, failures = 0;
  int copies = 0, exchanges = 0;

  io_element dut (.rst_n(rst_n), .x(x), .succ_valid(sv), .succ_rst(sr),
    .rx(rx), .tx(tx), .y(y));

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
    x = '0; rx = '0; sv = 0; sr = 1; rst_n = 0;
    #1 rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      automatic logic [W-1:0] vx = W'($urandom), vr = W'($urandom);
      automatic logic xchg = 1'($urandom);
      vx[W-1] = xchg; vr[W-1] = 1'b1;
      x = enc(vx);
      #1;
      if (!xchg) begin
        copies++;
        chk(tx === '0, "tx reset in copy mode");
        chk(y === enc(vx), "copy");
      end else begin
        exchanges++;
        chk(tx === enc(vx), "tx carries x");
        chk(y === '0, "wait for partner");
        rx = enc(vr);
        #1 chk(y === enc(vr), "exchange");
      end
      sr = 0; sv = 1;
      x = '0;
      #1 chk(tx === '0, "tx reset with x");
      if (xchg) begin
        chk(y === enc(vr), "wait for partner reset");
        rx = '0;
      end
      #1 chk(y === '0, "reset");
      sv = 0; sr = 1;
    end
    chk(copies > 0 && exchanges > 0, "both modes exercised");
    $display("copies=%0d exchanges=%0d", copies, exchanges);
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
