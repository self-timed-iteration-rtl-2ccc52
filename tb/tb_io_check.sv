// tb_io_check: scoreboard for io_loops. For loop l and revolution m, with
// v_l[m] the value of stage 0 (v_l[0] = ld[l]):
//   stage k (k = 0..4) holds F^k(v_l[m]); x_l = F^4(v_l[m]);
//   the I/O element outputs x_l when bit W-1 of x_l is 0 (copy) and
//   x_(1-l) when it is 1 (exchange); v_l[m+1] = F(I/O output).
// Every stage's valid values are compared with this model; copies and
// exchanges are counted at the I/O element of loop 0.
module tb_io_check
  import st_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic          en,
  input  logic [W-1:0]  ld [2],
  input  dr_t  [W-1:0]  y  [2][6],
  output int            evals,
  output int            checks,
  output int            failures,
  output int            copies,
  output int            exchanges
);

  int cnt [2][6];

  function automatic logic is_valid(input dr_t [W-1:0] v);
    for (int i = 0; i < W; i++) if (!(v[i].t | v[i].f)) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic [W-1:0] decode(input dr_t [W-1:0] v);
    logic [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = v[i].t;
    return r;
  endfunction

  function automatic logic [W-1:0] f1(input logic [W-1:0] v);
    logic [63:0] r = st_ref_pkg::f_ring(64'(v), W);
    return r[W-1:0];
  endfunction

  function automatic logic [W-1:0] fk(input logic [W-1:0] v, input int k);
    logic [W-1:0] r = v;
    for (int s = 0; s < k; s++) r = f1(r);
    return r;
  endfunction

  function automatic logic [W-1:0] model(input int l, input int k, input int m);
    logic [W-1:0] v [2], x [2], o [2];
    v[0] = ld[0]; v[1] = ld[1];
    for (int r = 0; r <= m; r++) begin
      x[0] = fk(v[0], 4); x[1] = fk(v[1], 4);
      for (int q = 0; q < 2; q++) o[q] = x[q][W-1] ? x[1-q] : x[q];
      if (r < m) begin v[0] = f1(o[0]); v[1] = f1(o[1]); end
    end
    return (k == 5) ? o[l] : fk(v[l], k);
  endfunction

  initial begin
    evals = 0; checks = 0; failures = 0; copies = 0; exchanges = 0;
    for (int l = 0; l < 2; l++) for (int k = 0; k < 6; k++) cnt[l][k] = (k == 0) ? 1 : 0;
  end

  for (genvar l = 0; l < 2; l++) begin : g_l
    for (genvar k = 0; k < 6; k++) begin : g_k
      logic was_valid = 1'b0;
      always @(y[l][k]) begin
        if (en && is_valid(y[l][k]) && !was_valid) begin
          automatic logic [W-1:0] e = model(l, k, cnt[l][k]);
          checks++;
          evals++;
          if (decode(y[l][k]) !== e) begin
            failures++;
            $display("ERROR io loop %0d stage %0d value %0d is %h, expected %h at %0t",
                     l, k, cnt[l][k], decode(y[l][k]), e, $time);
          end
          if (l == 0 && k == 5) begin
            if (fk(model(0, 0, cnt[0][5]), 4) & (W'(1) << (W - 1))) exchanges++;
            else copies++;
          end
          cnt[l][k]++;
        end
        was_valid = is_valid(y[l][k]);
      end
    end
  end

endmodule
