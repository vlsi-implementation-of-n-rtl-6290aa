// tb_rsfq_compressor42: self-checking test of the [4:2] compressor.
// Operations start every 4 cycles (back to back) or with random gaps. Each
// carries four random PP slots on din and up to two inter-column carry pulses
// on c_int_in, placed as a lower-column T1 would send them (in slots 1..3,
// the second one only in slot 3). The testbench checks, against counts it
// makes itself: c_int_out pulses = floor(PPs/2), each on the even-numbered
// pulse; sum = (PPs mod 2 + carries in) mod 2 and carry = its half, both
// exactly 6 cycles after start together with done; no stray output pulses.
module tb_rsfq_compressor42;
  localparam int CYCLES = 6000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, din = 1'b0, c_int_in = 1'b0;
  logic c_int_out, sum, carry, done;
  logic e_cint [CYCLES+16];
  logic e_sum  [CYCLES+16];
  logic e_car  [CYCLES+16];
  logic e_done [CYCLES+16];
  logic p_din  [CYCLES+16];
  logic p_cin  [CYCLES+16];
  logic p_st   [CYCLES+16];
  int checks = 0, failures = 0, ops = 0, full_ops = 0;

  rsfq_compressor42 dut (.clk, .rst_n, .start, .din, .c_int_in,
                         .c_int_out, .sum, .carry, .done);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // plan all operations up front
  initial begin
    int cyc, n, k, ci, m;
    logic [3:0] pp;
    for (int i = 0; i < CYCLES + 16; i++) begin
      e_cint[i] = 0; e_sum[i] = 0; e_car[i] = 0; e_done[i] = 0;
      p_din[i] = 0; p_cin[i] = 0; p_st[i] = 0;
    end
    cyc = 4;
    while (cyc < CYCLES - 10) begin
      pp = 4'($urandom);
      p_st[cyc] = 1'b1;
      n = 0;
      for (int i = 0; i < 4; i++) begin
        p_din[cyc+i] = pp[i];
        if (pp[i]) begin
          n++;
          if (n % 2 == 0) e_cint[cyc+i] = 1'b1;
        end
      end
      // inter-column carries as a lower-column (4,3) counter sends them
      ci = $urandom_range(0, 2);
      if (ci == 1) p_cin[cyc + $urandom_range(1, 3)] = 1'b1;
      if (ci == 2) begin
        p_cin[cyc + $urandom_range(1, 2)] = 1'b1;
        p_cin[cyc + 3] = 1'b1;
      end
      m = (n % 2) + ci;
      e_sum[cyc+6]  = (m % 2 == 1);
      e_car[cyc+6]  = (m >= 2);
      e_done[cyc+6] = 1'b1;
      ops++;
      if (n == 4 && ci == 2) full_ops++;
      cyc += 4 + (($urandom_range(0, 4) == 0) ? $urandom_range(1, 6) : 0);
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      start = p_st[c]; din = p_din[c]; c_int_in = p_cin[c];
      #1;
      checks += 4;
      if (c_int_out !== e_cint[c]) begin failures++; $display("cycle %0d: c_int_out %0b", c, c_int_out); end
      if (sum       !== e_sum[c])  begin failures++; $display("cycle %0d: sum %0b, expected %0b", c, sum, e_sum[c]); end
      if (carry     !== e_car[c])  begin failures++; $display("cycle %0d: carry %0b, expected %0b", c, carry, e_car[c]); end
      if (done      !== e_done[c]) begin failures++; $display("cycle %0d: done %0b", c, done); end
    end
    checks++;
    if (full_ops == 0 || ops < 500) begin failures++; $display("too few operations: %0d / %0d", ops, full_ops); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
