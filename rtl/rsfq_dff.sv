// rsfq_dff: RSFQ D flip-flop with destructive read-out.
//
// A pulse on d sets the stored bit; a clock pulse on rd emits the stored bit
// on q in the same micro-step and clears it. A d pulse in the read cycle is
// kept for the next read. In the [4:2] compressor it buffers the carry of the
// (3,2) counter until the compressor's output clock, as in the original
// circuit; the read-then-store order in the read cycle is this model's choice.
module rsfq_dff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  input  logic rd,
  output logic q
);
  logic st;

  assign q = rd & st;

  always_ff @(posedge clk) begin
    if (!rst_n)  st <= 1'b0;
    else if (rd) st <= d;
    else         st <= st | d;
  end
endmodule
