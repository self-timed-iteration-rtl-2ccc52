// dr_split: split operator of a loop with parallel paths.
//
// A stage whose value is sent to two successors a and b sees a successor that
// is valid only when both are valid and reset only when both are reset. The
// data itself fans out by wiring; this block combines the two completion
// results that travel back. Combinational.
module dr_split (
  input  logic a_valid,
  input  logic a_rst,
  input  logic b_valid,
  input  logic b_rst,
  output logic s_valid,
  output logic s_rst
);

  assign s_valid = a_valid & b_valid;
  assign s_rst   = a_rst & b_rst;

endmodule
