// rsfq_t1: T1 (toggle flip-flop) cell, the counting element of the RSFQ
// (4,3) and (3,2) counters and of the final ripple-carry adder.
//
// The cell holds one bit, the parity of the pulses received on t since it was
// last read. Every second input pulse (the one that finds the bit set) emits a
// carry pulse on c at once, in the same micro-step, as the asynchronous carry
// output of the real cell does. A read-clock pulse on rd emits the stored
// parity on s in the same micro-step and clears the cell. A pulse on t in the
// read cycle belongs to the next operation: the cell is read first and then
// toggled, so it produces no carry. That ordering is this model's choice; it
// lets one operation be read while the next one starts, as in the
// overlapped 4-step schedule. At most one pulse per micro-step can arrive on
// t: merging of several sources is done upstream by confluence buffers.
module rsfq_t1 (
  input  logic clk,
  input  logic rst_n,
  input  logic t,     // input pulse
  input  logic rd,    // read clock pulse
  output logic c,     // carry pulse, on every second input pulse
  output logic s      // sum (parity) pulse, in the read cycle
);
  logic q;

  assign s = rd & q;
  assign c = t & q & ~rd;

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= 1'b0;
    else if (rd) q <= t;
    else         q <= q ^ t;
  end
endmodule
