// tb_rsfq_t1: self-checking test of the T1 cell.
// Drives random input and read pulses for 2000 cycles and compares the
// carry and sum pulses with a pulse counter kept by the testbench: a carry on
// every second pulse since the last read, the parity on each read, and a pulse
// in the read cycle counted for the next operation.
module tb_rsfq_t1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic t = 1'b0, rd = 1'b0;
  logic c, s;
  int checks = 0, failures = 0;
  int unsigned n = 0;   // pulses since the last read

  rsfq_t1 dut (.clk, .rst_n, .t, .rd, .c, .s);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      t  = ($urandom_range(0, 1) == 1);
      rd = ($urandom_range(0, 4) == 0);
      #1;
      checks++;
      if (c !== (t && !rd && (n % 2 == 1))) begin
        failures++;
        $display("cycle %0d: carry %0b, n=%0d t=%0b rd=%0b", cyc, c, n, t, rd);
      end
      checks++;
      if (s !== (rd && (n % 2 == 1))) begin
        failures++;
        $display("cycle %0d: sum %0b, n=%0d rd=%0b", cyc, s, n, rd);
      end
      if (rd) n = t ? 1 : 0;
      else    n = n + (t ? 1 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
