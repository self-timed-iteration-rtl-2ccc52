// tb_ring_check: scoreboard for an N-stage iteration ring.
//
// Watches the stage outputs y (stage drivers). Whenever stage j turns valid
// it checks that
//   * the value equals F^(j + m*N)(ld), m being the number of values stage j
//     has produced since reset (stage 0 starts with the loaded value, m = 1),
//   * its successor is reset (the crest never overtakes the trough); with
//     STRICT = 0 only that the successor is not completely valid, since the
//     merged NAND stages may start evaluating bits of the next value from a
//     partly valid input,
// and at every change that no pair has both rails high. Counting starts when
// en rises, which must happen after reset with the ring still at rest.
module tb_ring_check
  import st_pkg::*;
#(
  parameter int unsigned N = 5,
  parameter int unsigned W      = 8,
  parameter bit          STRICT = 1'b1
) (
  input  logic          en,
  input  logic [W-1:0]  ld,
  input  dr_t  [W-1:0]  y [N],
  output int            evals,
  output int            checks,
  output int            failures
);

  int cnt [N];

  function automatic logic is_valid(input dr_t [W-1:0] v);
    for (int i = 0; i < W; i++) if (!(v[i].t | v[i].f)) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic is_rst(input dr_t [W-1:0] v);
    for (int i = 0; i < W; i++) if (v[i].t | v[i].f) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic [W-1:0] decode(input dr_t [W-1:0] v);
    logic [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = v[i].t;
    return r;
  endfunction

  function automatic logic [W-1:0] expect_at(input int k);
    logic [63:0] v;
    v = 64'(ld);
    for (int s = 0; s < k; s++) v = st_ref_pkg::f_ring(v, W);
    return v[W-1:0];
  endfunction

  initial begin
    evals = 0; checks = 0; failures = 0;
    for (int j = 0; j < N; j++) cnt[j] = (j == 0) ? 1 : 0;
  end

  for (genvar j = 0; j < N; j++) begin : g_mon
    logic was_valid = 1'b0;
    always @(y[j]) begin
      if (en) begin
        for (int i = 0; i < W; i++) begin
          if (y[j][i].t & y[j][i].f) begin
            failures++;
            $display("ERROR %m: both rails high on bit %0d at %0t", i, $time);
          end
        end
        if (is_valid(y[j]) && !was_valid) begin
          automatic int k = j + cnt[j] * N;
          automatic logic [W-1:0] e = expect_at(k);
          checks += 2;
          evals++;
          if (decode(y[j]) !== e) begin
            failures++;
            $display("ERROR %m: stage %0d value %0d is %h, expected F^%0d = %h at %0t",
                     j, cnt[j], decode(y[j]), k, e, $time);
          end
          if (STRICT ? !is_rst(y[(j + 1) % N]) : is_valid(y[(j + 1) % N])) begin
            failures++;
            $display("ERROR %m: stage %0d valid while successor not reset at %0t", j, $time);
          end
          cnt[j]++;
        end
      end
      was_valid = is_valid(y[j]);
    end
  end

endmodule
