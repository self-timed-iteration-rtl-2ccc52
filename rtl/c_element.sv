// c_element: Muller C-element.
//
// The output copies the inputs when they agree (both low -> low, both high ->
// high) and keeps its value when they differ. In CMOS this is a series
// P-stack and a series N-stack onto one node with an output inverter; here it
// is a latch whose enable is "inputs agree". Used with an inverted second
// input as the stage of the ring oscillator, and as the memory of the status
// detector.
//
// rst_n is an asynchronous active-low reset that forces y = rst_val; it is an
// addition of this implementation so that rings start in a defined state.
// There is no clock: y changes as soon as the inputs agree.
module c_element (
  input  logic rst_n,
  input  logic rst_val,
  input  logic a,
  input  logic b,
  output logic y
);

  always_latch begin
    if (!rst_n)      y = rst_val;
    else if (a == b) y = a;
  end

endmodule
