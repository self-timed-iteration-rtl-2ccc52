// st_ref_pkg: reference model of the iteration kernel for the testbenches.
//
// f_ring is the function computed by one ring stage on a W-bit value
// (W <= 64): F(y)[i] = ~(y[i] & y[i+1]) for i < W-1 and F(y)[W-1] = ~y[W-1].
// f_join is the join stage: bitwise NAND of its two operands.
package st_ref_pkg;

  function automatic logic [63:0] f_ring(input logic [63:0] y, input int w);
    logic [63:0] r;
    r = '0;
    for (int i = 0; i < w; i++) begin
      if (i == w - 1) r[i] = ~y[i];
      else            r[i] = ~(y[i] & y[i + 1]);
    end
    return r;
  endfunction

  function automatic logic [63:0] f_join(input logic [63:0] c, input logic [63:0] d, input int w);
    logic [63:0] m;
    m = (w >= 64) ? '1 : ((64'd1 << w) - 64'd1);
    return ~(c & d) & m;
  endfunction

endpackage
