// multiplier_top: the two multipliers of this design side by side.
//
//   u_rsfq  rsfq_mult8x8: pulse-level model of the 8x8 modulo-256 RSFQ
//           multiplier, clocked at one cycle per 12.5-ps micro-step, one
//           operation per 4 cycles, product 18 cycles after in_valid.
//   u_nm    mcsa_multiplier: combinational N x M multiplier (4x4 here) that
//           adds its partial products with carry-select adders using
//           binary to excess-1 converters; full N+M-bit product.
// The two share nothing but this wrapper. The DC-to-SFQ and SFQ-to-DC
// converters around the RSFQ core are not modelled: their signals are the
// plain ports a, b, in_valid, p and p_valid.
module multiplier_top #(
  parameter int unsigned NM_N = 4,
  parameter int unsigned NM_M = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // RSFQ 8x8 modulo-256 multiplier
  input  logic                 in_valid,
  input  logic [7:0]           a,
  input  logic [7:0]           b,
  output logic                 p_valid,
  output logic [7:0]           p,
  // N x M carry-select multiplier
  input  logic [NM_N-1:0]      nm_a,
  input  logic [NM_M-1:0]      nm_b,
  output logic [NM_N+NM_M-1:0] nm_p
);
  rsfq_mult8x8 u_rsfq (
    .clk, .rst_n, .in_valid, .a, .b, .p_valid, .p
  );

  mcsa_multiplier #(.N(NM_N), .M(NM_M)) u_nm (
    .a(nm_a), .b(nm_b), .p(nm_p)
  );
endmodule
