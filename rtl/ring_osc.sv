// ring_osc: self-timed ring oscillator of N Muller C-elements.
//
// Stage j takes its first input from stage j-1 and its second input from the
// inverted output of stage j+1 (indices modulo N). A stage can only become 1
// when its successor is 0 and only become 0 when its successor is 1, so the
// run of ones (the crest) and the run of zeros (the trough) can never
// overtake each other and the ring never dies out, whatever the gate and wire
// delays. N >= 3 is required; the path has no net inversion, so N may be even
// or odd.
//
// Interface: each stage output leaves on y_o and comes back on two receiver
// ports, y_fwd_i (the copy read by the successor) and y_bwd_i (the copy read
// by the predecessor), so that the interconnect, and with it every wire
// delay, lies outside this module. Connect y_fwd_i = y_bwd_i = y_o for a
// direct netlist. rst_n (active low, asynchronous) sets stage 0 to 1 and all
// others to 0, a state with one crest and one trough; the ring runs as soon
// as rst_n is released.
module ring_osc #(
  parameter int unsigned N = 5
) (
  input  logic         rst_n,
  output logic [N-1:0] y_o,
  input  logic [N-1:0] y_fwd_i,
  input  logic [N-1:0] y_bwd_i
);

  for (genvar j = 0; j < N; j++) begin : g_stage
    localparam int unsigned PRED = (j + N - 1) % N;
    localparam int unsigned SUCC = (j + 1) % N;
    c_element u_c (
      .rst_n  (rst_n),
      .rst_val(j == 0),
      .a      (y_fwd_i[PRED]),
      .b      (~y_bwd_i[SUCC]),
      .y      (y_o[j])
    );
  end

endmodule
