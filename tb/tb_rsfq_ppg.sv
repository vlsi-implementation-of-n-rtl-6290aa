// tb_rsfq_ppg: self-checking test of the partial product generator.
// Fires the PPG with random operands (back to back every 4 cycles, sometimes
// with gaps) and checks every line in every cycle against a scoreboard built
// from the partial-product array: PP a[j]&b[i] with i+j <= 7 lies in column
// i+j; rows i = 0..3 go to the upper line of that column in slot i, rows
// 4..7 to the lower line in slot i-4; slot s is s+1 cycles after rdy, and
// start is high in slot 0.
module tb_rsfq_ppg;
  localparam int CYCLES = 4000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rdy = 1'b0;
  logic [7:0] a = '0, b = '0;
  logic [7:0] u_line;
  logic [3:0] l_line;
  logic start;
  logic [7:0] e_u  [CYCLES+8];
  logic [3:0] e_l  [CYCLES+8];
  logic       e_st [CYCLES+8];
  int checks = 0, failures = 0, ops = 0, pulses = 0;

  rsfq_ppg dut (.clk, .rst_n, .rdy, .a, .b, .u_line, .l_line, .start);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int next_issue;
    foreach (e_u[i]) begin e_u[i] = '0; e_l[i] = '0; e_st[i] = 1'b0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    next_issue = 3;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      #1;
      checks += 3;
      if (u_line !== e_u[cyc]) begin failures++; $display("cycle %0d: upper lines %b, expected %b", cyc, u_line, e_u[cyc]); end
      if (l_line !== e_l[cyc]) begin failures++; $display("cycle %0d: lower lines %b, expected %b", cyc, l_line, e_l[cyc]); end
      if (start  !== e_st[cyc]) begin failures++; $display("cycle %0d: start %b", cyc, start); end
      pulses += $countones(u_line) + $countones(l_line);
      a = 8'($urandom); b = 8'($urandom);
      if (ops == 0) begin a = 8'hFF; b = 8'hFF; end
      rdy = (cyc == next_issue) && (cyc < CYCLES - 8);
      if (rdy) begin
        ops++;
        e_st[cyc+1] = 1'b1;
        for (int i = 0; i < 8; i++)
          for (int j = 0; j + i < 8; j++)
            if (i < 4) e_u[cyc+1+i][i+j]   = a[j] & b[i];
            else       e_l[cyc+1+i-4][i+j-4] = a[j] & b[i];
        next_issue = cyc + 4 + (($urandom_range(0, 3) == 0) ? $urandom_range(1, 5) : 0);
      end
    end
    checks++;
    if (ops < 500 || pulses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
