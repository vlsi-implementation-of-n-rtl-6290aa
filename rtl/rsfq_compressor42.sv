// rsfq_compressor42: asynchronous, data-driven, wave-pipelined [4:2]
// carry-save compressor built from two T1 cells and a DFF.
//
// An operation starts in the cycle start is high (slot 0). Up to four partial
// products arrive one per micro-step on din in slots 0..3. The (4,3) counter
// (first T1) counts them: every second pulse leaves at once on c_int_out as an
// inter-column carry to the next column, and the parity is read by the
// co-flow clock in slot 4. The (3,2) counter (second T1) receives, merged on
// one line, the inter-column carries of the lower column (slots 1..3, from a
// compressor started in the same cycle) and the parity (slot 4); it is read
// in slot 5, and its carry, buffered in a DFF, is read at the same time. Sum
// and carry leave as pulses in slot 6, when done is high: six micro-steps per
// operation. The next operation may start four slots later, so its counting
// overlaps the previous adding steps. Conservation per operation:
//   pulses(din) + pulses(c_int_in) = 2*pulses(c_int_out) + 2*carry + sum.
// The structure follows the document; the slot at which each read clock
// fires is this model's choice.
module rsfq_compressor42
  import rsfq_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,      // co-flow clock: slot 0 of an operation
  input  logic din,        // serial partial products, slots 0..3
  input  logic c_int_in,   // inter-column carries from the lower column
  output logic c_int_out,  // inter-column carries to the higher column
  output logic sum,        // slot 6
  output logic carry,      // slot 6, weight of the next column
  output logic done        // slot 6 marker
);
  logic rd_43, rd_32;
  logic s_int, t_32, c_32, s_32, c_buf;

  rsfq_delay #(.DELAY(SLOTS_PER_OP),     .WIDTH(1)) u_clk43 (.clk, .rst_n, .d(start), .q(rd_43));
  rsfq_delay #(.DELAY(SLOTS_PER_OP + 1), .WIDTH(1)) u_clk32 (.clk, .rst_n, .d(start), .q(rd_32));
  rsfq_delay #(.DELAY(COMP_LATENCY),     .WIDTH(1)) u_done  (.clk, .rst_n, .d(start), .q(done));

  // (4,3) counter
  rsfq_t1 u_t1_43 (.clk, .rst_n, .t(din), .rd(rd_43), .c(c_int_out), .s(s_int));

  // confluence buffer and (3,2) counter
  assign t_32 = c_int_in | s_int;
  rsfq_t1 u_t1_32 (.clk, .rst_n, .t(t_32), .rd(rd_32), .c(c_32), .s(s_32));

  // carry buffer
  rsfq_dff u_dff (.clk, .rst_n, .d(c_32), .rd(rd_32), .q(c_buf));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum   <= 1'b0;
      carry <= 1'b0;
    end else begin
      sum   <= s_32;
      carry <= c_buf;
    end
  end

  // Two pulses must never meet at the confluence buffer.
  always_ff @(posedge clk)
    if (rst_n) assert (!(c_int_in && s_int))
      else $error("rsfq_compressor42: inter-column carry collides with the internal sum");
endmodule
