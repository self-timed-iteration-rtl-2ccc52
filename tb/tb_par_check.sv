// tb_par_check: scoreboard for par_loop. Stage outputs (index 0 p, 1 a,
// 2 c, 3 b, 4 b2, 5 d, 6 q, 7 q2) are compared, each time a stage turns
// valid, with the model
//   a = F(p), c = F(a), b = F(p), b2 = F(b), d = F(b2), q = NAND(c, d),
//   q2 = F(q), next p = F(q2),
// starting from p = ld. It also counts how often the join had one operand
// valid while the other was not (join_waits) and how often p's split saw one
// branch valid (on the copies yb that travel back to p) while the other was
// not (split_waits).
module tb_par_check
  import st_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic          en,
  input  logic [W-1:0]  ld,
  input  dr_t  [W-1:0]  y [8],
  input  dr_t  [W-1:0]  yb [8],
  output int            evals,
  output int            checks,
  output int            failures,
  output int            join_waits,
  output int            split_waits
);

  int cnt [8];

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

  // value of stage s in revolution m
  function automatic logic [W-1:0] model(input int s, input int m);
    logic [W-1:0] p, a, c, b, b2, d, q, q2;
    p = ld;
    for (int k = 0; k <= m; k++) begin
      a = f1(p); c = f1(a); b = f1(p); b2 = f1(b); d = f1(b2);
      q = ~(c & d); q2 = f1(q);
      if (k < m) p = f1(q2);
    end
    case (s)
      0: return p;  1: return a;  2: return c;  3: return b;
      4: return b2; 5: return d;  6: return q;  default: return q2;
    endcase
  endfunction

  initial begin
    evals = 0; checks = 0; failures = 0; join_waits = 0; split_waits = 0;
    for (int s = 0; s < 8; s++) cnt[s] = (s == 0) ? 1 : 0;
  end

  for (genvar s = 0; s < 8; s++) begin : g_mon
    logic was_valid = 1'b0;
    always @(y[s]) begin
      if (en && is_valid(y[s]) && !was_valid) begin
        automatic logic [W-1:0] e = model(s, cnt[s]);
        checks++;
        evals++;
        if (decode(y[s]) !== e) begin
          failures++;
          $display("ERROR par stage %0d value %0d is %h, expected %h at %0t", s, cnt[s], decode(y[s]), e, $time);
        end
        if ((s == 2 && !is_valid(y[5])) || (s == 5 && !is_valid(y[2]))) join_waits++;
        cnt[s]++;
      end
      was_valid = is_valid(y[s]);
    end
  end

  logic split_diff = 1'b0;
  always @(yb[1] or yb[3]) begin
    if (en && (is_valid(yb[1]) != is_valid(yb[3])) && !split_diff) split_waits++;
    split_diff = is_valid(yb[1]) != is_valid(yb[3]);
  end

endmodule
