// rsfq_ppg: partial product generator (PPG) of the 8x8 modulo-256 multiplier.
//
// The 36 partial products a[j]&b[i] with i+j <= 7 are formed by 12 MG modules
// in three groups, all fired by the same operand-ready pulse:
//   upper group, columns 0..7: column k uses b[0..min(k,3)]; four MG4 for
//     columns 7..4 (16 PPs) and MG4, MG3, MG2, MG1 for columns 3..0 (10 PPs);
//   lower group, columns 4..7: MG1, MG2, MG3, MG4 using b[4..7] (10 PPs).
// Each MG drives one serial line to a first-level [4:2] compressor: u_line[k]
// for the upper MG of column k, l_line[k-4] for the lower one. PP i of an MG
// is in slot i; slot 0 is the cycle in which start is high, one cycle after
// rdy. The grouping follows the document; the zero-skew operand distribution
// (every MG fires in the same cycle) is this model's simplification of the
// document's tuned distribution network.
module rsfq_ppg
  import rsfq_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rdy,
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] u_line,
  output logic [3:0] l_line,
  output logic       start
);
  for (genvar k = 0; k < 8; k++) begin : g_upper
    localparam int unsigned NU = (k < 4) ? k + 1 : 4;
    logic [NU-1:0] av, bv;
    for (genvar i = 0; i < int'(NU); i++) begin : g_bit
      assign av[i] = a[k-i];
      assign bv[i] = b[i];
    end
    rsfq_mg #(.N(NU)) u_mg (
      .clk, .rst_n, .rdy, .a(av), .b(bv), .m(u_line[k])
    );
  end

  for (genvar k = 4; k < 8; k++) begin : g_lower
    localparam int unsigned NL = k - 3;
    logic [NL-1:0] av, bv;
    for (genvar i = 0; i < int'(NL); i++) begin : g_bit
      assign av[i] = a[k-4-i];
      assign bv[i] = b[4+i];
    end
    rsfq_mg #(.N(NL)) u_mg (
      .clk, .rst_n, .rdy, .a(av), .b(bv), .m(l_line[k-4])
    );
  end

  rsfq_delay #(.DELAY(PPG_LATENCY), .WIDTH(1)) u_start (
    .clk, .rst_n, .d(rdy), .q(start)
  );
endmodule
