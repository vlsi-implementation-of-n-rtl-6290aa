// rsfq_mult8x8: pulse-level model of the 8x8-bit unsigned RSFQ multiplier
// that computes the eight least significant bits of the product (a*b mod 256).
//
// Three stages, all driven by pulses travelling with the data:
//   rsfq_ppg             36 clocked-AND partial products in 12 MG modules,
//                        sent serially, one per 12.5-ps micro-step;
//   rsfq_reduction_tree  two levels of wave-pipelined [4:2] compressors,
//                        producing p0..p4 and carry-save pairs for p5..p7;
//   rsfq_rca3            3-bit ripple-carry adder for p5..p7.
// One clock cycle is one micro-step (80 GHz). A pulse on in_valid with the
// operands starts an operation; operations may follow every 4 cycles (the
// 50-ps, 20-GHz rate of the document) or with any larger gap. The product
// appears MULT_LATENCY = 18 cycles later with a one-cycle p_valid pulse.
// p0..p4 are ready earlier and are delayed here to line up with p5..p7, an
// alignment the document does not have. Reset is synchronous, active low.
module rsfq_mult8x8
  import rsfq_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         p_valid,
  output logic [W-1:0] p
);
  logic [7:0] u_line;
  logic [3:0] l_line;
  logic       tree_start, tree_done;
  logic [7:0] tree_sum, tree_carry;
  logic [4:0] p_low;
  logic [2:0] p_high;

  rsfq_ppg u_ppg (
    .clk, .rst_n, .rdy(in_valid), .a, .b,
    .u_line, .l_line, .start(tree_start)
  );

  rsfq_reduction_tree u_tree (
    .clk, .rst_n, .start(tree_start), .u_line, .l_line,
    .sum(tree_sum), .carry(tree_carry), .done(tree_done)
  );

  rsfq_rca3 u_rca (
    .clk, .rst_n, .start(tree_done),
    .s(tree_sum[7:5]), .c(tree_carry[6:4]),
    .p(p_high), .done(p_valid)
  );

  rsfq_delay #(.DELAY(RCA_LATENCY), .WIDTH(5)) u_align (
    .clk, .rst_n, .d(tree_sum[4:0]), .q(p_low)
  );

  assign p = {p_high, p_low};

  // Issue rule: one operation per four micro-steps at most.
  logic [2:0] since_issue;
  always_ff @(posedge clk) begin
    if (!rst_n)                   since_issue <= 3'd4;
    else if (in_valid)            since_issue <= 3'd1;
    else if (since_issue != 3'd4) since_issue <= since_issue + 3'd1;
  end
  always_ff @(posedge clk)
    if (rst_n && in_valid) assert (since_issue >= 3'(SLOTS_PER_OP))
      else $error("rsfq_mult8x8: operations closer than four micro-steps");

  initial assert (W == 8) else $error("rsfq_mult8x8: the tree is built for W = 8");
endmodule
