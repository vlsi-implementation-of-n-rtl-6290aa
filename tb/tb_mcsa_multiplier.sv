// tb_mcsa_multiplier: self-checking test of the N x M carry-select
// multiplier. Checks all 256 products of the default 4x4 multiplier and all
// products of a 5x3 instance against integer multiplication.
module tb_mcsa_multiplier;
  logic [3:0] a = '0, b = '0;
  logic [7:0] p;
  logic [4:0] a5 = '0;
  logic [2:0] b3 = '0;
  logic [7:0] p53;
  int checks = 0, failures = 0;

  mcsa_multiplier dut (.a, .b, .p);
  mcsa_multiplier #(.N(5), .M(3)) dut53 (.a(a5), .b(b3), .p(p53));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      #1;
      checks++;
      if (p !== 8'(a) * 8'(b)) begin failures++; $display("%0d * %0d = %0d", a, b, p); end
    end
    for (int i = 0; i < 256; i++) begin
      {a5, b3} = 8'(i);
      #1;
      checks++;
      if (p53 !== 8'(a5) * 8'(b3)) begin failures++; $display("%0d * %0d = %0d", a5, b3, p53); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
