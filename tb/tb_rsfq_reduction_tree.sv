// tb_rsfq_reduction_tree: self-checking test of the two-level [4:2]
// reduction tree.
// The testbench forms the partial products of random 8-bit operands itself
// and drives them on the PP lines as the PPG would (row i of column k on the
// upper line in slot i for i < 4, on the lower line in slot i-4 otherwise),
// one operation every 4 cycles with occasional gaps. Twelve cycles after each
// start it checks done, that sum[4:0] equal the low five product bits, that
// sum + 2*carry taken as a carry-save number equals the product modulo 256,
// and that the low-column carries are clear. It also counts operations whose
// column-4 carry (into the ripple-carry adder) was set.
module tb_rsfq_reduction_tree;
  localparam int CYCLES = 8000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [7:0] u_line = '0;
  logic [3:0] l_line = '0;
  logic [7:0] sum, carry;
  logic done;
  logic [7:0] d_u  [CYCLES+16];
  logic [3:0] d_l  [CYCLES+16];
  logic       d_st [CYCLES+16];
  logic [7:0] e_p  [CYCLES+16];
  logic       e_dn [CYCLES+16];
  int checks = 0, failures = 0, ops = 0, c4_set = 0;

  rsfq_reduction_tree dut (.clk, .rst_n, .start, .u_line, .l_line, .sum, .carry, .done);

  always #5 clk = ~clk;

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [7:0] a, b;
    logic [15:0] prod;
    for (int i = 0; i < CYCLES + 16; i++) begin
      d_u[i] = '0; d_l[i] = '0; d_st[i] = 1'b0; e_p[i] = '0; e_dn[i] = 1'b0;
    end
    cyc = 4;
    while (cyc < CYCLES - 16) begin
      a = 8'($urandom); b = 8'($urandom);
      if (ops == 0) begin a = 8'hFF; b = 8'hFF; end
      prod = 16'(a) * 16'(b);
      d_st[cyc] = 1'b1;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j + i < 8; j++)
          if (i < 4) d_u[cyc+i][i+j]     = a[j] & b[i];
          else       d_l[cyc+i-4][i+j-4] = a[j] & b[i];
      e_p[cyc+12]  = prod[7:0];
      e_dn[cyc+12] = 1'b1;
      ops++;
      cyc += 4 + (($urandom_range(0, 4) == 0) ? $urandom_range(1, 6) : 0);
    end
  end

  initial begin
    logic [8:0] cs;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      start = d_st[c]; u_line = d_u[c]; l_line = d_l[c];
      #1;
      checks++;
      if (done !== e_dn[c]) begin failures++; $display("cycle %0d: done %0b", c, done); end
      if (e_dn[c]) begin
        cs = 9'(sum) + {carry, 1'b0};
        checks += 3;
        if (sum[4:0] !== e_p[c][4:0]) begin failures++; $display("cycle %0d: p4..p0 %b, expected %b", c, sum[4:0], e_p[c][4:0]); end
        if (cs[7:0] !== e_p[c])       begin failures++; $display("cycle %0d: carry-save value %h, expected %h", c, cs[7:0], e_p[c]); end
        if (carry[3:0] !== 4'b0)      begin failures++; $display("cycle %0d: low carry %b", c, carry[3:0]); end
        if (carry[4]) c4_set++;
      end else begin
        checks++;
        if (sum !== '0 || carry !== '0) begin failures++; $display("cycle %0d: stray output", c); end
      end
    end
    checks++;
    if (c4_set == 0 || ops < 1000) begin failures++; $display("coverage: ops %0d, column-4 carries %0d", ops, c4_set); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
