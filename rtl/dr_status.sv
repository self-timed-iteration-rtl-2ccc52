// dr_status: memory of the last completed phase of a dual-rail word.
//
// status is 1 when the watched word was last valid and 0 when it was last
// reset; during a transition it keeps its value. It is a C-element of
// valid(X) and not reset(X), which is how the design combines the two
// successor tests of a stage into the single signal "st".
//
// While rst_n is low the output follows valid(X), so a ring comes out of reset
// with each status consistent with its successor's initial value (this reset
// is this implementation's addition).
module dr_status (
  input  logic rst_n,
  input  logic valid,
  input  logic rst,
  output logic status
);

  c_element u_c (
    .rst_n  (rst_n),
    .rst_val(valid),
    .a      (valid),
    .b      (~rst),
    .y      (status)
  );

endmodule
