// tb_dr_wires: N dual-rail words of W bits carried by tb_wire delay models.
// Word j uses seed SEED + 97*j; SLOW selects a slow bit position in every
// word (both of its rails are made the slowest of the word), -1 for none.
module tb_dr_wires
  import st_pkg::*;
#(
  parameter int unsigned N    = 1,
  parameter int unsigned W    = 8,
  parameter int unsigned SEED = 1,
  parameter int unsigned RMIN = 1,
  parameter int unsigned RMAX = 20,
  parameter int unsigned FMIN = 1,
  parameter int unsigned FMAX = 20,
  parameter int          SLOW = -1
) (
  input  dr_t [W-1:0] a [N],
  output dr_t [W-1:0] y [N]
);

  for (genvar j = 0; j < N; j++) begin : g_word
    for (genvar r = 0; r < 2; r++) begin : g_rail
      logic [W-1:0] ain, yout;
      for (genvar i = 0; i < W; i++) begin : g_bit
        assign ain[i] = (r == 0) ? a[j][i].t : a[j][i].f;
        if (r == 0) begin : g_t
          assign y[j][i].t = yout[i];
        end else begin : g_f
          assign y[j][i].f = yout[i];
        end
      end
      tb_wire #(.NB(W), .SEED(SEED + 97 * j + 13 * r), .RMIN(RMIN), .RMAX(RMAX),
                .FMIN(FMIN), .FMAX(FMAX), .SLOW(SLOW)) u_w (.a(ain), .y(yout));
    end
  end

endmodule
