// mcsa_bec: binary to excess-1 converter (BEC) of the modified carry-select
// adder.
//
// Produces x + 1 (modulo 2^W) with a chain of XOR gates and a running AND:
// bit 0 is inverted and bit i flips when all lower bits are 1. Purely
// combinational. In the adder it replaces the second ripple-carry adder of a
// classic carry-select group: W is the group width plus one (the group's
// carry), 3 for the 2-bit groups.
module mcsa_bec #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);
  always_comb begin
    logic all_ones;
    all_ones = 1'b1;
    for (int i = 0; i < int'(W); i++) begin
      y[i]     = x[i] ^ all_ones;
      all_ones = all_ones & x[i];
    end
  end
endmodule
