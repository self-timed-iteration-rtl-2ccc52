// tb_wire: behavioural model of a bundle of NB interconnect wires.
//
// Each wire i copies a[i] to y[i] with its own rise delay and fall delay,
// drawn once from a hash of (SEED, i) in [RMIN, RMAX] and [FMIN, FMAX]. The
// wire at index SLOW (if any) gets RMAX+1 and FMAX+1, making it the last to
// rise and the last to fall. This is transport delay: every input change is
// replayed. Testbench only; it stands for the arbitrary wire delays that the
// self-timed circuits must tolerate.
module tb_wire #(
  parameter int unsigned NB   = 1,
  parameter int unsigned SEED = 1,
  parameter int unsigned RMIN = 1,
  parameter int unsigned RMAX = 20,
  parameter int unsigned FMIN = 1,
  parameter int unsigned FMAX = 20,
  parameter int          SLOW = -1
) (
  input  logic [NB-1:0] a,
  output logic [NB-1:0] y
);

  function automatic int unsigned hash(input int unsigned s, input int unsigned i);
    int unsigned x;
    x = s * 32'h9E37_79B9 ^ (i + 32'd1) * 32'h85EB_CA6B;
    x = x ^ (x >> 13);
    x = x * 32'hC2B2_AE35;
    x = x ^ (x >> 16);
    return x;
  endfunction

  for (genvar i = 0; i < NB; i++) begin : g_w
    localparam int unsigned R = (i == SLOW) ? RMAX + 1 : RMIN + hash(SEED, 2 * i) % (RMAX - RMIN + 1);
    localparam int unsigned F = (i == SLOW) ? FMAX + 1 : FMIN + hash(SEED, 2 * i + 1) % (FMAX - FMIN + 1);

    initial begin
      y[i] = 1'b0;
      #1 y[i] = a[i];
    end

    always @(a[i]) begin
      if (a[i]) y[i] <= #(R) 1'b1;
      else      y[i] <= #(F) 1'b0;
    end
  end

endmodule
