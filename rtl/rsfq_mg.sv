// rsfq_mg: partial-product generation module MGn of the RSFQ multiplier
// (MG1..MG4, n = N = number of partial products).
//
// On an operand-ready pulse rdy the module's N clocked AND gates take their
// multiplicand bit a[i] and multiplier bit b[i]. The N products leave one per
// micro-step (12.5 ps apart) on the single output line m: product i appears
// i+1 cycles after rdy. In the circuit the spacing comes from JJ delay lines in
// the clock path of each AND gate and the outputs are merged by confluence
// buffers; here the stored products are shifted out. A new rdy may come every
// N cycles or later (every 4 in the multiplier); it reloads all N gates.
module rsfq_mg #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rdy,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         m
);
  logic [N-1:0] pp;

  always_ff @(posedge clk) begin
    if (!rst_n)   pp <= '0;
    else if (rdy) pp <= a & b;
    else          pp <= pp >> 1;
  end

  assign m = pp[0];

  initial assert (N >= 1 && N <= 4) else $error("rsfq_mg: N must be 1..4");
endmodule
