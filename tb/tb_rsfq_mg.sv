// tb_rsfq_mg: self-checking test of the MG partial-product module.
// Instantiates MG4 and MG2 and fires them with random operands, mostly every
// 4 cycles (the fastest rate) and sometimes with larger gaps. A per-cycle
// scoreboard holds the expected line: PP i = a[i]&b[i] exactly i+1 cycles
// after rdy, no pulse in any other cycle.
module tb_rsfq_mg;
  localparam int CYCLES = 2000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rdy = 1'b0;
  logic [3:0] a4 = '0, b4 = '0;
  logic [1:0] a2 = '0, b2 = '0;
  logic m4, m2;
  logic exp4 [CYCLES+8];
  logic exp2 [CYCLES+8];
  int checks = 0, failures = 0, ops = 0;

  rsfq_mg #(.N(4)) dut4 (.clk, .rst_n, .rdy, .a(a4), .b(b4), .m(m4));
  rsfq_mg #(.N(2)) dut2 (.clk, .rst_n, .rdy, .a(a2), .b(b2), .m(m2));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int next_issue;
    foreach (exp4[i]) begin exp4[i] = 1'b0; exp2[i] = 1'b0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    next_issue = 3;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      #1;
      checks += 2;
      if (m4 !== exp4[cyc]) begin
        failures++;
        $display("cycle %0d: MG4 line %0b, expected %0b", cyc, m4, exp4[cyc]);
      end
      if (m2 !== exp2[cyc]) begin
        failures++;
        $display("cycle %0d: MG2 line %0b, expected %0b", cyc, m2, exp2[cyc]);
      end
      a4 = 4'($urandom); b4 = 4'($urandom);
      a2 = 2'($urandom); b2 = 2'($urandom);
      rdy = (cyc == next_issue) && (cyc < CYCLES - 8);
      if (rdy) begin
        ops++;
        for (int i = 0; i < 4; i++) exp4[cyc+1+i] = a4[i] & b4[i];
        for (int i = 0; i < 2; i++) exp2[cyc+1+i] = a2[i] & b2[i];
        next_issue = cyc + 4 + (($urandom_range(0, 3) == 0) ? $urandom_range(1, 5) : 0);
      end
    end
    checks++;
    if (ops < 300) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
