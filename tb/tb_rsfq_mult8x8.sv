// tb_rsfq_mult8x8: self-checking test of the 8x8 modulo-256 multiplier.
// Phase 1 multiplies all 65536 operand pairs back to back, one every 4
// cycles (the 20-GHz rate); phase 2 issues 2000 random pairs with random
// gaps. Every p_valid pulse is matched, in order, with an issued operation:
// the product must be (a*b) mod 256 and must arrive exactly 18 cycles after
// in_valid. The number of results must equal the number of operations, and
// in phase 1 results must come out every 4 cycles.
module tb_rsfq_mult8x8;
  localparam longint LATENCY = 18;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [7:0] a = '0, b = '0;
  logic p_valid;
  logic [7:0] p;
  int checks = 0, failures = 0, issued = 0, results = 0;
  longint cyc = 0;
  longint q_time [$];
  logic [7:0] q_prod [$];
  longint last_result = -1;
  int steady = 0;

  rsfq_mult8x8 dut (.clk, .rst_n, .in_valid, .a, .b, .p_valid, .p);

  always #5 clk = ~clk;

  initial begin
    #8000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  // result checker
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
    if (last_result >= 0 && cyc - last_result == 4) steady++;
    last_result = cyc;
  end

  task automatic issue(input logic [7:0] x, input logic [7:0] y);
    @(negedge clk);
    a = x; b = y; in_valid = 1'b1;
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
    for (int i = 0; i < 2000; i++) begin
      issue(8'($urandom), 8'($urandom));
      repeat ($urandom_range(0, 1) * $urandom_range(1, 7)) @(negedge clk);
    end
    repeat (int'(LATENCY) + 4) @(negedge clk);
    checks += 2;
    if (results != issued) begin failures++; $display("%0d results for %0d operations", results, issued); end
    if (steady < 65000)    begin failures++; $display("only %0d results 4 cycles apart", steady); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
