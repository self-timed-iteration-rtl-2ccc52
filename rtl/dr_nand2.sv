// dr_nand2: self-completion-indicating two-input NAND gate (dual rail).
//
// y is reset while both inputs are reset. y.t (output true) rises as soon as
// either input's false rail rises, since one false input decides the NAND;
// y.f (output false) rises only when both true rails are high. The y.f half is
// a series pull-up and series pull-down on one dynamic node, so it keeps its
// value when exactly one true rail is high: that is a C-element of a.t and
// b.t. The y.t half has a series pull-up and parallel pull-down and is
// therefore a plain OR of the false rails. All transitions are monotonic:
// reset -> valid -> reset.
//
// rst_n (active low, asynchronous) clears the dynamic node; it is an addition
// for a defined start.
module dr_nand2 (
  input  logic        rst_n,
  input  st_pkg::dr_t a,
  input  st_pkg::dr_t b,
  output st_pkg::dr_t y
);

  c_element u_false_rail (
    .rst_n  (rst_n),
    .rst_val(1'b0),
    .a      (a.t),
    .b      (b.t),
    .y      (y.f)
  );

  assign y.t = a.f | b.f;

endmodule
