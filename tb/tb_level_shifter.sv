// tb_level_shifter -- self-checking testbench for the level_shifter model.
// Applies every combination of V+ / V- in random order and checks that the
// output goes to VDDH for (1,0), to VSSH for (0,1) and holds its level for
// equal inputs, that the change appears after DELAY_NS and not before, and
// that an input pulse shorter than the delay is filtered out.
`timescale 1ns/1ps
module tb_level_shifter;
  localparam real DELAY = 5.0;

  logic v_plus, v_minus, hv_out, exp_out;
  int   checks, failures;

  level_shifter #(.DELAY_NS(DELAY)) dut (.v_plus, .v_minus, .hv_out);

  task automatic expect_out(input string what, input logic exp);
    checks++;
    if (hv_out !== exp) begin
      failures++;
      $display("FAIL %0t %s: out=%0b expected %0b (V+=%0b V-=%0b)",
               $time, what, hv_out, exp, v_plus, v_minus);
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
    v_plus = 1'b0; v_minus = 1'b1; exp_out = 1'b0;
    #20ns expect_out("initial low", 1'b0);
    for (int n = 0; n < 2000; n++) begin
      logic prev;
      prev = exp_out;
      {v_plus, v_minus} = 2'($urandom_range(0, 3));
      if (v_plus != v_minus) exp_out = v_plus;
      #(DELAY - 1.0) expect_out("before delay", prev);
      #2ns           expect_out("after delay", exp_out);
      #10ns;
    end
    // a 2 ns pulse is shorter than the delay
    v_plus = ~exp_out; v_minus = exp_out;
    #2ns v_plus = exp_out; v_minus = ~exp_out;
    #20ns expect_out("glitch filtered", exp_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
