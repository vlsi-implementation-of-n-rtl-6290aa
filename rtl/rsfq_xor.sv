// rsfq_xor: clocked RSFQ XOR gate.
//
// Each input stores whether a pulse arrived since the last clock. A clock
// pulse on rd emits, in the same micro-step, a pulse on q when exactly one of
// the two inputs received a pulse, and clears both. Input pulses in the clock
// cycle are kept for the next clock. Used for the most significant product
// bit of the ripple-carry adder, where the original circuit has a clocked
// XOR; the cycle-level behaviour is this model's.
module rsfq_xor (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  input  logic rd,
  output logic q
);
  logic sa, sb;

  assign q = rd & (sa ^ sb);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sa <= 1'b0;
      sb <= 1'b0;
    end else if (rd) begin
      sa <= a;
      sb <= b;
    end else begin
      sa <= sa | a;
      sb <= sb | b;
    end
  end
endmodule
