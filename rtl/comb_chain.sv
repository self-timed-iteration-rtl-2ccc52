// comb_chain: fully combinational (unrolled) form of the iteration, kept as
// the reference against which the ring is the area-saving alternative.
//
// K copies of the kernel F are chained with no latches and no handshake:
// y = F^K(x). The data path is dual rail, so the chain is a self-timed block
// on its own: when x goes from reset to valid the output becomes valid once
// every copy has evaluated, and when x returns to reset the output returns
// to reset. Completion is seen at the output (y_valid / y_rst), with no
// matched delay line.
//
// The kernel is the one used by all rings of this design: bitwise dual-rail
// NAND of a bit and its upper neighbour, the top bit NANDed with itself
// (F(y)[i] = ~(y[i] & y[i+1]), F(y)[W-1] = ~y[W-1]).
//
// Interface: rst_n (active low, asynchronous) clears the C-element nodes of
// the gates; x is the dual-rail input word; y the dual-rail result.
// Timing: purely combinational apart from the state held inside each gate's
// false rail (a C-element); the caller must keep x monotonic (reset -> valid
// -> reset).
//
// The chain is the textbook unrolled form of the iteration; the kernel, the widths and the
// reset are this design's own choices.
module comb_chain #(
  parameter int unsigned W = 8,
  parameter int unsigned K = 5
) (
  input  logic                 rst_n,
  input  st_pkg::dr_t [W-1:0]  x,
  output st_pkg::dr_t [W-1:0]  y,
  output logic                 y_valid,
  output logic                 y_rst
);
  import st_pkg::*;

  dr_t [W-1:0] v [K+1];

  assign v[0] = x;

  for (genvar k = 0; k < K; k++) begin : g_step
    for (genvar i = 0; i < W; i++) begin : g_bit
      dr_nand2 u_nand (
        .rst_n(rst_n),
        .a    (v[k][i]),
        .b    (v[k][(i == W - 1) ? i : i + 1]),
        .y    (v[k+1][i])
      );
    end
  end

  assign y = v[K];

  dr_completion #(.W(W)) u_done (.x(y), .valid(y_valid), .rst(y_rst));

endmodule
