// io_loops: two self-timed loops that exchange values through I/O elements.
//
// Each loop L (0 and 1) is six stages: five direct stages (index 0 = y, the
// stage after the I/O element, then 1, 2, 3, and 4 = x, the stage before it)
// and the I/O element (index 5). The direct stages use the ring kernel
// F(v)[i] = ~(v[i] & v[i+1]), F(v)[W-1] = ~v[W-1]; the I/O element copies or
// exchanges. Because bit W-1 is inverted by each of the five stages, the
// mode bit seen by the I/O element alternates every revolution, so a loop
// alternates between copying and exchanging; the two loops stay in step as
// long as they start with equal mode bits.
//
// Ports: y_o[L][k] drives the output of stage k of loop L, y_fwd_i[L][k] and
// y_bwd_i[L][k] are its copies at the successor and the predecessor. tx_o[L]
// is the value offered by loop L's I/O element and rx_i[L] what that element
// receives (connect rx_i[0] to tx_o[1] and rx_i[1] to tx_o[0]). rst_n (active
// low, asynchronous) loads ld_val[L] into stage y of loop L and resets the
// rest.
module io_loops
  import st_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic          rst_n,
  input  logic [W-1:0]  ld_val  [2],
  output dr_t  [W-1:0]  y_o     [2][6],
  input  dr_t  [W-1:0]  y_fwd_i [2][6],
  input  dr_t  [W-1:0]  y_bwd_i [2][6],
  output dr_t  [W-1:0]  tx_o    [2],
  input  dr_t  [W-1:0]  rx_i    [2]
);

  localparam int unsigned IO = 5;

  for (genvar l = 0; l < 2; l++) begin : g_loop
    logic [5:0] cv, cr;

    for (genvar k = 0; k < 6; k++) begin : g_cmp
      dr_completion #(.W(W)) u_c (.x(y_bwd_i[l][k]), .valid(cv[k]), .rst(cr[k]));
    end

    for (genvar k = 0; k < 5; k++) begin : g_stage
      localparam int unsigned PRED = (k + 5) % 6;
      dr_t [W-1:0] b;
      for (genvar i = 0; i < W; i++) begin : g_b
        assign b[i] = (i == W - 1) ? y_fwd_i[l][PRED][i] : y_fwd_i[l][PRED][(i + 1) % W];
      end
      direct_stage #(.W(W)) u_stage (
        .rst_n(rst_n), .ld(k == 0), .ld_val(ld_val[l]),
        .a(y_fwd_i[l][PRED]), .b(b),
        .succ_valid(cv[k + 1]), .succ_rst(cr[k + 1]), .y(y_o[l][k]));
    end

    io_element #(.W(W), .MODE_BIT(W - 1)) u_io (
      .rst_n(rst_n), .x(y_fwd_i[l][4]), .succ_valid(cv[0]), .succ_rst(cr[0]),
      .rx(rx_i[l]), .tx(tx_o[l]), .y(y_o[l][IO]));
  end

endmodule
