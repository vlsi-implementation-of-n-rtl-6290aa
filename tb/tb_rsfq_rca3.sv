// tb_rsfq_rca3: self-checking test of the 3-bit ripple-carry adder.
// Applies all 64 combinations of the S and C pulses, then random ones, one
// addition every 4 cycles with occasional gaps, and checks p = (S + C) mod 8
// exactly 5 cycles after start together with done. Counts additions in which
// the carry ripples from column 5 through column 6 to column 7.
module tb_rsfq_rca3;
  localparam int CYCLES = 3000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [2:0] s = '0, c = '0;
  logic [2:0] p;
  logic done;
  logic       d_st [CYCLES+16];
  logic [2:0] d_s  [CYCLES+16];
  logic [2:0] d_c  [CYCLES+16];
  logic [2:0] e_p  [CYCLES+16];
  logic       e_dn [CYCLES+16];
  int checks = 0, failures = 0, ops = 0, ripple = 0;

  rsfq_rca3 dut (.clk, .rst_n, .start, .s, .c, .p, .done);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [2:0] xs, xc;
    for (int i = 0; i < CYCLES + 16; i++) begin
      d_st[i] = 0; d_s[i] = 0; d_c[i] = 0; e_p[i] = 0; e_dn[i] = 0;
    end
    cyc = 4;
    while (cyc < CYCLES - 16) begin
      if (ops < 64) begin xs = 3'(ops); xc = 3'(ops >> 3); end
      else begin xs = 3'($urandom); xc = 3'($urandom); end
      d_st[cyc] = 1'b1; d_s[cyc] = xs; d_c[cyc] = xc;
      e_p[cyc+5] = xs + xc;
      e_dn[cyc+5] = 1'b1;
      if (xs[0] && xc[0] && (xs[1] ^ xc[1])) ripple++;
      ops++;
      cyc += 4 + ((ops > 64 && $urandom_range(0, 4) == 0) ? $urandom_range(1, 6) : 0);
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < CYCLES; k++) begin
      @(negedge clk);
      start = d_st[k]; s = d_s[k]; c = d_c[k];
      #1;
      checks++;
      if (done !== e_dn[k]) begin failures++; $display("cycle %0d: done %0b", k, done); end
      if (e_dn[k]) begin
        checks++;
        if (p !== e_p[k]) begin failures++; $display("cycle %0d: p %b, expected %b", k, p, e_p[k]); end
      end
    end
    checks++;
    if (ripple == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
