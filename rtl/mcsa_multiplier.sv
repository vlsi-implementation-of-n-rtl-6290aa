// mcsa_multiplier: combinational N x M unsigned multiplier whose partial
// products are summed with modified carry-select adders.
//
// Row i of the partial-product array is a & b[i], shifted left by i, N+M bits
// wide. The rows are added one after another by M-1 mcsa_adder instances of
// width N+M (carry-in 0, carry-out unused since the product fits in N+M bits).
// p = a * b, available after the combinational delay; no clock. Using
// carry-select adders with BEC for the partial-product additions and the 4x4
// default follow the document; the row-by-row accumulation is this design's
// own choice.
module mcsa_multiplier #(
  parameter int unsigned N = 4,
  parameter int unsigned M = 4
) (
  input  logic [N-1:0]   a,
  input  logic [M-1:0]   b,
  output logic [N+M-1:0] p
);
  localparam int unsigned PW = N + M;

  logic [PW-1:0] pp  [M];
  logic [PW-1:0] acc [M];

  for (genvar i = 0; i < int'(M); i++) begin : g_pp
    assign pp[i] = PW'(a & {N{b[i]}}) << i;
  end

  assign acc[0] = pp[0];

  for (genvar i = 1; i < int'(M); i++) begin : g_add
    logic cout_unused;
    mcsa_adder #(.WIDTH(PW), .GROUP(2)) u_add (
      .x(acc[i-1]), .y(pp[i]), .cin(1'b0), .s(acc[i]), .cout(cout_unused)
    );
  end

  assign p = acc[M-1];
endmodule
