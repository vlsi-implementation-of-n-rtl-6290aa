// rsfq_rca3: wave-pipelined 3-bit ripple-carry adder forming product bits
// p5..p7 from the carry-save pairs (S5,C5), (S6,C6), (S7,C7).
//
// In the cycle start is high (slot 0) the sums s[i] arrive; the carries c[i]
// are delayed to slot 1 and merged with them by confluence buffers. Column 5:
// a T1 cell counts S5 and C5; its carry, delayed to slot 2, joins the column-6
// line. Column 6: a T1 counts S6, C6 and that carry; its carry goes to a
// clocked XOR. Column 7: a T1 counts S7 and C7, its carry (weight 256) is
// dropped, and its parity, read in slot 3, is the other XOR input. The T1
// cells are read in slot 3, the XOR in slot 4, and p is registered so that
// all three bits appear together in slot 5 with done. A new addition may
// start every 4 cycles. The cell structure follows the document; the slots
// are this model's choice. p = (s + c) mod 8.
module rsfq_rca3
  import rsfq_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [2:0] s,      // S5, S6, S7
  input  logic [2:0] c,      // C5, C6, C7
  output logic [2:0] p,      // p5, p6, p7
  output logic       done
);
  logic [2:0] c_d;
  logic       rd_t1, rd_xor;
  logic       k5, k5_d, k6, k7_unused;
  logic [2:0] t1_in, t1_s;
  logic       p7;
  logic [1:0] p56;

  rsfq_delay #(.DELAY(1), .WIDTH(3)) u_dly_c  (.clk, .rst_n, .d(c),  .q(c_d));
  rsfq_delay #(.DELAY(1), .WIDTH(1)) u_dly_k5 (.clk, .rst_n, .d(k5), .q(k5_d));
  rsfq_delay #(.DELAY(3), .WIDTH(1)) u_clk_t1 (.clk, .rst_n, .d(start), .q(rd_t1));
  rsfq_delay #(.DELAY(4), .WIDTH(1)) u_clk_x  (.clk, .rst_n, .d(start), .q(rd_xor));
  rsfq_delay #(.DELAY(RCA_LATENCY), .WIDTH(1)) u_done (.clk, .rst_n, .d(start), .q(done));

  assign t1_in[0] = s[0] | c_d[0];
  assign t1_in[1] = s[1] | c_d[1] | k5_d;
  assign t1_in[2] = s[2] | c_d[2];

  rsfq_t1 u_t1_5 (.clk, .rst_n, .t(t1_in[0]), .rd(rd_t1), .c(k5),        .s(t1_s[0]));
  rsfq_t1 u_t1_6 (.clk, .rst_n, .t(t1_in[1]), .rd(rd_t1), .c(k6),        .s(t1_s[1]));
  rsfq_t1 u_t1_7 (.clk, .rst_n, .t(t1_in[2]), .rd(rd_t1), .c(k7_unused), .s(t1_s[2]));

  rsfq_xor u_xor7 (.clk, .rst_n, .a(k6), .b(t1_s[2]), .rd(rd_xor), .q(p7));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p56 <= '0;
      p   <= '0;
    end else begin
      if (rd_t1)  p56 <= t1_s[1:0];
      if (rd_xor) p   <= {p7, p56};
    end
  end
endmodule
