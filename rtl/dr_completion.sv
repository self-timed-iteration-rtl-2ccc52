// dr_completion: completion detector of a dual-rail word.
//
// valid is the AND over all bits of (t | f): every pair carries a value.
// rst is the complement of the OR over all bits of (t | f): every pair is back
// to the reset value. While the word is changing both outputs are low. These
// are the "valid?" and "reset?" tests of a direct iteration stage.
// Purely combinational.
module dr_completion #(
  parameter int unsigned W = 8
) (
  input  st_pkg::dr_t [W-1:0] x,
  output logic                valid,
  output logic                rst
);

  logic [W-1:0] any;

  always_comb begin
    for (int i = 0; i < W; i++) any[i] = st_pkg::dr_any(x[i]);
    valid = &any;
    rst   = ~|any;
  end

endmodule
