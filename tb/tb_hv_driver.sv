// tb_hv_driver -- self-checking testbench for the hv_driver model.
// Four drivers are loaded with the four bench loads (10, 100, 470 and
// 1000 pF). For each the testbench times the output's response to a rising
// and a falling input step and compares it with the measured rise times
// (12, 43.6, 216 and 480 ns) to within 0.5 ns. It also checks that a pulse
// shorter than the rise time does not reach a 1 nF output and that the
// output is non-inverting.
`timescale 1ns/1ps
module tb_hv_driver;
  localparam int N = 4;
  localparam real LOADS [N] = '{10.0, 100.0, 470.0, 1000.0};
  localparam real TRISE [N] = '{12.0, 43.6, 216.0, 480.0};

  logic         in;
  logic [N-1:0] out;
  int           checks, failures;

  for (genvar i = 0; i < N; i++) begin : g_drv
    hv_driver #(.LOAD_PF(LOADS[i])) dut (.in(in), .hv_out(out[i]));
  end

  task automatic step_and_time(input logic level);
    realtime t0;
    realtime t_seen [N];
    bit      seen [N];
    t0 = $realtime;
    in = level;
    for (int i = 0; i < N; i++) seen[i] = 0;
    repeat (6000) begin
      #0.1ns;
      for (int i = 0; i < N; i++)
        if (!seen[i] && out[i] == level) begin
          seen[i] = 1;
          t_seen[i] = $realtime - t0;
        end
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (!seen[i] || t_seen[i] < TRISE[i] - 0.5 || t_seen[i] > TRISE[i] + 0.5) begin
        failures++;
        $display("FAIL load %0.0f pF step to %0b: %0.1f ns, expected %0.1f ns",
                 LOADS[i], level, seen[i] ? t_seen[i] : -1.0, TRISE[i]);
      end
    end
  endtask

  initial begin
    #100us;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks = 0; failures = 0;
    in = 1'b0;
    #2us;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (out[i] !== 1'b0) begin failures++; $display("FAIL initial level %0d", i); end
    end
    repeat (3) begin
      step_and_time(1'b1);
      #1us;
      step_and_time(1'b0);
      #1us;
    end
    // a 100 ns glitch is shorter than the 1 nF rise time: it is filtered out
    in = 1'b1; #100ns in = 1'b0;
    repeat (100) begin
      #10ns;
      checks++;
      if (out[3] !== 1'b0) begin failures++; $display("FAIL glitch reached 1 nF output"); end
    end
    // the 10 pF output did follow the glitch (non-inverting)
    checks++;
    if (out[0] !== 1'b0) begin failures++; $display("FAIL 10 pF output stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
