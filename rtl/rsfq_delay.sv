// rsfq_delay: JJ-based delay line of the pulse-level model.
//
// Delays a bundle of WIDTH pulse wires by DELAY micro-steps (clock cycles),
// the role Josephson transmission lines and delay cells play in the RSFQ
// circuit. DELAY = 0 is a plain wire. The line is a shift register cleared by
// the synchronous active-low reset; it holds up to DELAY pulses in flight.
// The delay lines come from the original circuit; their lengths in
// micro-steps are this model's choice.
module rsfq_delay #(
  parameter int unsigned DELAY = 1,
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DELAY == 0) begin : g_wire
    assign q = d;
  end else begin : g_line
    logic [WIDTH-1:0] stage [DELAY];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(DELAY); i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < int'(DELAY); i++) stage[i] <= stage[i-1];
      end
    end
    assign q = stage[DELAY-1];
  end
endmodule
