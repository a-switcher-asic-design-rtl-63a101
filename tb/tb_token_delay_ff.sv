// tb_token_delay_ff -- self-checking testbench for token_delay_ff.
// Drives a random token stream that changes a quarter clock before each
// falling edge and checks that q shows the value present at the previous
// falling edge, that q does not move on the rising edge, and that an
// asynchronous reset clears q at once.
`timescale 1ns/1ps
module tb_token_delay_ff;
  logic clk, rst_n, d, q, exp_q;
  int   checks, failures;

  token_delay_ff dut (.clk, .rst_n, .d, .q);

  task automatic expect_q(input string what);
    checks++;
    if (q !== exp_q) begin
      failures++;
      $display("FAIL %0t %s: q=%0b expected %0b", $time, what, q, exp_q);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks = 0; failures = 0;
    clk = 1'b1; rst_n = 1'b1; d = 1'b1;
    #1ns rst_n = 1'b0;
    exp_q = 1'b0;
    #9ns expect_q("reset");
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 1000; cyc++) begin
      #15ns d = $urandom_range(0, 1);
      #25ns clk = 1'b0;                 // falling edge: capture
      exp_q = d;
      #5ns expect_q("after falling edge");
      #5ns d = ~d;                      // input change between edges
      #40ns clk = 1'b1;                 // rising edge: no capture
      #5ns expect_q("after rising edge");
      if ($urandom_range(0, 49) == 0) begin
        rst_n = 1'b0;
        exp_q = 1'b0;
        #1ns expect_q("async reset");
        #2ns rst_n = 1'b1;
        #2ns;
      end else begin
        #5ns;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
