// tb_multiplier_top: end-to-end test of multiplier_top at its default
// parameters.
// The RSFQ multiplier gets all 65536 operand pairs back to back (one every 4
// cycles) and then 3000 random pairs with random gaps; each product is
// checked in order against (a*b) mod 256 and against the 18-cycle latency.
// Meanwhile the 4x4 carry-select multiplier gets a new operand pair every
// cycle, walking all 256 pairs repeatedly, checked against a*b.
// The testbench also counts, and requires at least once, each mechanism of
// the design: back-to-back issue at the 4-cycle rate, issue after a gap,
// two inter-column carries from one (4,3) counter, a column-4 carry into the
// ripple-carry adder, a dropped carry of weight 256, a ripple carry reaching
// the p7 XOR, and the BEC branch selected in a carry-select group.
module tb_multiplier_top;
  localparam longint LATENCY = 18;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [7:0] a = '0, b = '0;
  logic p_valid;
  logic [7:0] p;
  logic [3:0] nm_a = '0, nm_b = '0;
  logic [7:0] nm_p;
  int checks = 0, failures = 0, issued = 0, results = 0;
  longint cyc = 0, last_issue = -100;
  longint q_time [$];
  logic [7:0] q_prod [$];
  int n_b2b = 0, n_gap = 0, n_dbl_cint = 0, n_c4 = 0, n_drop = 0, n_ripple7 = 0, n_bec = 0;

  multiplier_top dut (.clk, .rst_n, .in_valid, .a, .b, .p_valid, .p, .nm_a, .nm_b, .nm_p);

  always #5 clk = ~clk;

  initial begin
    #8000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  // mechanism counters, sampled inside the design
  logic cint7_seen;
  always @(negedge clk) if (rst_n) begin
    if (dut.u_rsfq.u_tree.start) cint7_seen = 1'b0;
    if (dut.u_rsfq.u_tree.u_cint[6]) begin
      if (cint7_seen) n_dbl_cint++;
      cint7_seen = 1'b1;
    end
    if (dut.u_rsfq.u_tree.carry[4]) n_c4++;
    if (dut.u_rsfq.u_tree.u_carry[7] || dut.u_rsfq.u_tree.l_carry[7] || dut.u_rsfq.u_tree.carry[7]) n_drop++;
    if (dut.u_rsfq.u_rca.k6) n_ripple7++;
  end

  // RSFQ result checker
  always @(negedge clk) if (rst_n && p_valid) begin
    longint t;
    logic [7:0] e;
    results++;
    checks += 2;
    if (q_time.size() == 0) begin
      failures++;
      $display("cycle %0d: result with no operation", cyc);
    end else begin
      t = q_time.pop_front();
      e = q_prod.pop_front();
      if (p !== e) begin failures++; $display("cycle %0d: p=%h expected %h", cyc, p, e); end
      if (cyc - t != LATENCY) begin failures++; $display("cycle %0d: latency %0d", cyc, cyc - t); end
    end
  end

  // carry-select multiplier: new operands every cycle
  always @(negedge clk) if (rst_n) begin
    #1;
    checks++;
    if (nm_p !== 8'(nm_a) * 8'(nm_b)) begin
      failures++;
      $display("cycle %0d: %0d * %0d = %0d", cyc, nm_a, nm_b, nm_p);
    end
    if (dut.u_nm.g_add[1].u_add.gc[2] || dut.u_nm.g_add[2].u_add.gc[2] ||
        dut.u_nm.g_add[3].u_add.gc[2] || dut.u_nm.g_add[3].u_add.gc[3]) n_bec++;
    {nm_a, nm_b} = {nm_a, nm_b} + 8'd1;
  end

  task automatic issue(input logic [7:0] x, input logic [7:0] y);
    @(negedge clk);
    a = x; b = y; in_valid = 1'b1;
    if (cyc - last_issue == 4) n_b2b++;
    else if (last_issue >= 0 && cyc - last_issue > 4) n_gap++;
    last_issue = cyc;
    q_time.push_back(cyc);
    q_prod.push_back(8'((16'(x) * 16'(y)) & 16'hFF));
    issued++;
    @(negedge clk);
    in_valid = 1'b0;
    a = 8'($urandom); b = 8'($urandom);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 65536; i++) issue(8'(i), 8'(i >> 8));
    for (int i = 0; i < 3000; i++) begin
      issue(8'($urandom), 8'($urandom));
      repeat ($urandom_range(0, 1) * $urandom_range(1, 7)) @(negedge clk);
    end
    repeat (int'(LATENCY) + 4) @(negedge clk);
    checks++;
    if (results != issued) begin failures++; $display("%0d results for %0d operations", results, issued); end
    $display("mechanisms: back-to-back %0d, after gap %0d, double c_int %0d, column-4 carry %0d, dropped carry %0d, ripple to p7 %0d, BEC select %0d",
             n_b2b, n_gap, n_dbl_cint, n_c4, n_drop, n_ripple7, n_bec);
    checks += 7;
    if (n_b2b == 0)      failures++;
    if (n_gap == 0)      failures++;
    if (n_dbl_cint == 0) failures++;
    if (n_c4 == 0)       failures++;
    if (n_drop == 0)     failures++;
    if (n_ripple7 == 0)  failures++;
    if (n_bec == 0)      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
