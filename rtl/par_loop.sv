// par_loop: self-timed loop with two parallel data paths.
//
// Eight direct stages: p feeds both a and b through a split; path one is
// a -> c, path two is b -> b2 -> d; the join concatenates c and d as the input
// of q; q -> q2 -> p closes the loop. The split (dr_split) reports its
// successor valid only when both a and b are valid, and reset only when both
// are reset. The join needs no gates: q's operands are a = c and b = d, so q
// computes NAND(c, d) bitwise, and q's completion is returned to both c and d.
// All other stages use the ring kernel F(y)[i] = ~(y[i] & y[i+1]),
// F(y)[W-1] = ~y[W-1]. The two paths run concurrently.
//
// Stage indices in y_o/y_fwd_i/y_bwd_i: 0 p, 1 a, 2 c, 3 b, 4 b2, 5 d, 6 q,
// 7 q2. As in iter_ring, each output leaves on y_o and is received on
// y_fwd_i (by its successors) and y_bwd_i (by its predecessors); tie them
// together for a direct netlist. rst_n (active low, asynchronous) loads ld_val
// into p and resets every other stage.
module par_loop
  import st_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic          rst_n,
  input  logic [W-1:0]  ld_val,
  output dr_t  [W-1:0]  y_o     [8],
  input  dr_t  [W-1:0]  y_fwd_i [8],
  input  dr_t  [W-1:0]  y_bwd_i [8]
);

  localparam int unsigned P = 0, A = 1, C = 2, B = 3, B2 = 4, D = 5, Q = 6, Q2 = 7;

  // Kernel operand wiring of an ordinary stage fed by stage k.
  function automatic dr_t [W-1:0] rot_b(input dr_t [W-1:0] v);
    dr_t [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = (i == W - 1) ? v[i] : v[(i + 1) % W];
    return r;
  endfunction

  logic [7:0] cv, cr;   // completion of each stage output, as seen by predecessors
  logic       s_valid, s_rst;

  for (genvar k = 0; k < 8; k++) begin : g_cmp
    dr_completion #(.W(W)) u_c (.x(y_bwd_i[k]), .valid(cv[k]), .rst(cr[k]));
  end

  dr_split u_split (.a_valid(cv[A]), .a_rst(cr[A]), .b_valid(cv[B]), .b_rst(cr[B]),
                    .s_valid(s_valid), .s_rst(s_rst));

  direct_stage #(.W(W)) u_p (.rst_n(rst_n), .ld(1'b1), .ld_val(ld_val),
    .a(y_fwd_i[Q2]), .b(rot_b(y_fwd_i[Q2])), .succ_valid(s_valid), .succ_rst(s_rst), .y(y_o[P]));
  direct_stage #(.W(W)) u_a (.rst_n(rst_n), .ld(1'b0), .ld_val(ld_val),
    .a(y_fwd_i[P]), .b(rot_b(y_fwd_i[P])), .succ_valid(cv[C]), .succ_rst(cr[C]), .y(y_o[A]));
  direct_stage #(.W(W)) u_c (.rst_n(rst_n), .ld(1'b0), .ld_val(ld_val),
    .a(y_fwd_i[A]), .b(rot_b(y_fwd_i[A])), .succ_valid(cv[Q]), .succ_rst(cr[Q]), .y(y_o[C]));
  direct_stage #(.W(W)) u_b (.rst_n(rst_n), .ld(1'b0), .ld_val(ld_val),
    .a(y_fwd_i[P]), .b(rot_b(y_fwd_i[P])), .succ_valid(cv[B2]), .succ_rst(cr[B2]), .y(y_o[B]));
  direct_stage #(.W(W)) u_b2 (.rst_n(rst_n), .ld(1'b0), .ld_val(ld_val),
    .a(y_fwd_i[B]), .b(rot_b(y_fwd_i[B])), .succ_valid(cv[D]), .succ_rst(cr[D]), .y(y_o[B2]));
  direct_stage #(.W(W)) u_d (.rst_n(rst_n), .ld(1'b0), .ld_val(ld_val),
    .a(y_fwd_i[B2]), .b(rot_b(y_fwd_i[B2])), .succ_valid(cv[Q]), .succ_rst(cr[Q]), .y(y_o[D]));
  // join: q's input is the concatenation {c, d}
  direct_stage #(.W(W)) u_q (.rst_n(rst_n), .ld(1'b0), .ld_val(ld_val),
    .a(y_fwd_i[C]), .b(y_fwd_i[D]), .succ_valid(cv[Q2]), .succ_rst(cr[Q2]), .y(y_o[Q]));
  direct_stage #(.W(W)) u_q2 (.rst_n(rst_n), .ld(1'b0), .ld_val(ld_val),
    .a(y_fwd_i[Q]), .b(rot_b(y_fwd_i[Q])), .succ_valid(cv[P]), .succ_rst(cr[P]), .y(y_o[Q2]));

endmodule
