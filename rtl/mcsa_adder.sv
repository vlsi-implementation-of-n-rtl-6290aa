// mcsa_adder: modified carry-select adder (carry-select adder with binary to
// excess-1 converters).
//
// The operands are cut into groups of GROUP bits (2 by default). The lowest
// group is a ripple-carry adder with the adder's carry-in. Every higher group
// has one ripple-carry adder that assumes carry-in 0; its GROUP+1-bit result
// (sum and carry) goes to a BEC that forms the same result plus one, the value
// for carry-in 1. A multiplexer driven by the carry out of the group below
// picks one of the two, so the carry ripples only through the multiplexers.
// The top group may be narrower when GROUP does not divide WIDTH. Purely
// combinational: s and cout follow x, y and cin after the gate delay.
// The 2-bit group with a 3-bit BEC and a multiplexer follows the document;
// the adder width is a parameter.
module mcsa_adder #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned GROUP = 2
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  localparam int unsigned NG = (WIDTH + GROUP - 1) / GROUP;

  logic [NG:0] gc;   // carry into each group
  assign gc[0] = cin;

  for (genvar g = 0; g < int'(NG); g++) begin : g_grp
    localparam int unsigned LO = g * GROUP;
    localparam int unsigned GW = (LO + GROUP <= WIDTH) ? GROUP : WIDTH - LO;

    logic [GW:0] r0;   // ripple-carry result with carry-in 0 (cin for group 0)

    always_comb begin
      logic cy;
      cy = (g == 0) ? cin : 1'b0;
      for (int i = 0; i < int'(GW); i++) begin
        r0[i] = x[LO+i] ^ y[LO+i] ^ cy;
        cy    = (x[LO+i] & y[LO+i]) | (cy & (x[LO+i] ^ y[LO+i]));
      end
      r0[GW] = cy;
    end

    if (g == 0) begin : g_rca
      assign s[LO +: GW] = r0[GW-1:0];
      assign gc[1]       = r0[GW];
    end else begin : g_sel
      logic [GW:0] r1;
      mcsa_bec #(.W(GW + 1)) u_bec (.x(r0), .y(r1));
      assign s[LO +: GW] = gc[g] ? r1[GW-1:0] : r0[GW-1:0];
      assign gc[g+1]     = gc[g] ? r1[GW]     : r0[GW];
    end
  end

  assign cout = gc[NG];
endmodule
