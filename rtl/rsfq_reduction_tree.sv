// rsfq_reduction_tree: two-level carry-save partial-product reduction tree of
// the 8x8 modulo-256 multiplier.
//
// Level 1 has one [4:2] compressor per column fed by the upper PP lines
// (columns 0..7) and a second one for columns 4..7 fed by the lower PP lines:
// twelve compressors, each reducing up to four PPs to a sum and a carry.
// Inter-column carries run from column to column inside each row. For each
// column, confluence buffers merge onto one line the four level-1 results of
// weight 2^k, one micro-step apart: slot 0 the upper sum of column k, slot 1
// the upper carry of column k-1, slot 2 the lower carry of column k-1, slot 3
// the lower sum of column k. A level-2 compressor per column (eight in all)
// reduces that line to sum[k] and carry[k] (weight 2^(k+1)).
// Everything of weight 256 or more (column-7 carries) is dropped: the product
// is modulo 256. sum[4:0] are final product bits; the level-2 carries of
// columns 0..3 can never be set. Timing: level-1 outputs 6 cycles after
// start, level-2 outputs (done high) 12 cycles after start; a new operation
// every 4 cycles. The level and slot assignment follows the document's
// figures; the slot order of the merged line is this model's choice.
module rsfq_reduction_tree
  import rsfq_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] u_line,
  input  logic [3:0] l_line,
  output logic [7:0] sum,
  output logic [7:0] carry,
  output logic       done
);
  // level 1
  logic [7:0] u_cint, u_sum, u_carry, u_done;
  logic [7:4] l_cint, l_sum, l_carry;
  logic [7:4] l_done;

  for (genvar k = 0; k < 8; k++) begin : g_l1_upper
    rsfq_compressor42 u_c (
      .clk, .rst_n, .start, .din(u_line[k]),
      .c_int_in ((k == 0) ? 1'b0 : u_cint[(k == 0) ? 0 : k-1]),
      .c_int_out(u_cint[k]), .sum(u_sum[k]), .carry(u_carry[k]), .done(u_done[k])
    );
  end

  for (genvar k = 4; k < 8; k++) begin : g_l1_lower
    rsfq_compressor42 u_c (
      .clk, .rst_n, .start, .din(l_line[k-4]),
      .c_int_in ((k == 4) ? 1'b0 : l_cint[(k == 4) ? 4 : k-1]),
      .c_int_out(l_cint[k]), .sum(l_sum[k]), .carry(l_carry[k]), .done(l_done[k])
    );
  end

  // confluence buffers: one serial line per column into level 2
  logic [7:0] slot_a, slot_b, slot_c, slot_d;
  logic [7:0] slot_b_d, slot_c_d, slot_d_d;
  logic [7:0] l2_line;

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      slot_a[k] = u_sum[k];
      slot_b[k] = (k >= 1) ? u_carry[(k >= 1) ? k-1 : 0] : 1'b0;
      slot_c[k] = (k >= 5) ? l_carry[(k >= 5) ? k-1 : 4] : 1'b0;
      slot_d[k] = (k >= 4) ? l_sum[(k >= 4) ? k : 4]     : 1'b0;
    end
  end

  rsfq_delay #(.DELAY(1), .WIDTH(8)) u_dly_b (.clk, .rst_n, .d(slot_b), .q(slot_b_d));
  rsfq_delay #(.DELAY(2), .WIDTH(8)) u_dly_c (.clk, .rst_n, .d(slot_c), .q(slot_c_d));
  rsfq_delay #(.DELAY(3), .WIDTH(8)) u_dly_d (.clk, .rst_n, .d(slot_d), .q(slot_d_d));

  assign l2_line = slot_a | slot_b_d | slot_c_d | slot_d_d;

  // level 2
  logic [7:0] s_cint, s_done;

  for (genvar k = 0; k < 8; k++) begin : g_l2
    rsfq_compressor42 u_c (
      .clk, .rst_n, .start(u_done[0]), .din(l2_line[k]),
      .c_int_in ((k == 0) ? 1'b0 : s_cint[(k == 0) ? 0 : k-1]),
      .c_int_out(s_cint[k]), .sum(sum[k]), .carry(carry[k]), .done(s_done[k])
    );
  end

  assign done = s_done[0];

  // The low level-2 carries have nowhere to go and must stay clear.
  always_ff @(posedge clk)
    if (rst_n) assert (carry[3:0] == 4'b0)
      else $error("rsfq_reduction_tree: carry out of a low column");
endmodule
