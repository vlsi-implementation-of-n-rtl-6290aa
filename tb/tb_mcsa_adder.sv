// tb_mcsa_adder: self-checking test of the carry-select adder with BEC.
// Checks all 2^17 input combinations of the default 8-bit, 2-bit-group adder
// and random ones of a 7-bit adder with 3-bit groups (narrower top group)
// against the integer sum.
module tb_mcsa_adder;
  logic [7:0] x = '0, y = '0, s;
  logic       cin = 1'b0, cout;
  logic [6:0] x7 = '0, y7 = '0, s7;
  logic       cin7 = 1'b0, cout7;
  int checks = 0, failures = 0;

  mcsa_adder dut (.x, .y, .cin, .s, .cout);
  mcsa_adder #(.WIDTH(7), .GROUP(3)) dut7 (.x(x7), .y(y7), .cin(cin7), .s(s7), .cout(cout7));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 17); i++) begin
      {cin, x, y} = 17'(i);
      #1;
      checks++;
      if ({cout, s} !== 9'(x) + 9'(y) + 9'(cin)) begin
        failures++;
        if (failures < 10) $display("%h + %h + %0b = %h", x, y, cin, {cout, s});
      end
    end
    for (int i = 0; i < 5000; i++) begin
      x7 = 7'($urandom); y7 = 7'($urandom); cin7 = 1'($urandom);
      #1;
      checks++;
      if ({cout7, s7} !== 8'(x7) + 8'(y7) + 8'(cin7)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
