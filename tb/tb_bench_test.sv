// tb_bench_test -- workload testbench: one 64-channel Switcher ASIC at its
// default parameters (revision 2, 1 nF loads), driven like the die on the
// test bench: PA = PB = 0, one token on TDIA, TDOA left open.
// Three runs:
//   1. 42.2 us clock, AI and BI held high;
//   2. 42.2 us clock, AI driven with a 10 us pulse inside each clock;
//   3. 4.9 us clock (a row time under 5 us), AI driven with a 2 us pulse.
// In each run it measures, with the capture edge of TDIA as time zero:
//   * TDOA of channel 64 rises on the rising edge 62.5 clocks later (the
//     rising edge of the 64th clock counting the capture clock as the first)
//     and stays high for one clock;
//   * output A15 gives exactly one positive pulse, starting 14 clocks later
//     (plus the AI window offset and the 485 ns shifter and driver delay),
//     as wide as a clock or as the AI pulse;
//   * outputs B17 and B18 give one clock-wide positive pulse each, 16 and 17
//     clocks later, one clock apart.
`timescale 1ns/1ps
module tb_bench_test;
  localparam realtime HV_DELAY = 485.0;   // level shifter 5 ns + 1 nF driver 480 ns
  localparam realtime TOL      = 1.0;

  logic        clk, rst_n, tdia, tdoa, tdoar, ai, bi;
  logic [63:0] hv_a, hv_b;
  int          checks, failures;
  realtime     half;
  bit          running;

  switcher_asic dut (
    .clk, .rst_n, .tdia, .tdoa, .tdiar(1'b0), .tdoar,
    .ai, .bi, .pa(1'b0), .pb(1'b0), .hv_a, .hv_b);

  always begin
    #(half) clk = ~clk;
  end

  // edge recorders
  realtime a15_r, a15_f, b17_r, b18_r, b17_f, tdoa_r, tdoa_f;
  int      a15_n, b17_n, b18_n, tdoa_n;
  always @(posedge hv_a[14]) if (running) begin a15_n++; a15_r = $realtime; end
  always @(negedge hv_a[14]) if (running) a15_f = $realtime;
  always @(posedge hv_b[16]) if (running) begin b17_n++; b17_r = $realtime; end
  always @(negedge hv_b[16]) if (running) b17_f = $realtime;
  always @(posedge hv_b[17]) if (running) begin b18_n++; b18_r = $realtime; end
  always @(posedge tdoa)     if (running) begin tdoa_n++; tdoa_r = $realtime; end
  always @(negedge tdoa)     if (running) tdoa_f = $realtime;

  task automatic near(input string what, input realtime got, input realtime exp);
    checks++;
    if (got < exp - TOL || got > exp + TOL) begin
      failures++;
      $display("FAIL %s: %0.1f ns, expected %0.1f ns", what, got, exp);
    end
  endtask

  task automatic count_is(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end
  endtask

  task automatic run(input realtime period, input bit ai_pulse, input realtime ai_width);
    realtime t0, p, ai_off;
    p = period; ai_off = period / 8.0;
    half = p / 2.0;
    a15_n = 0; b17_n = 0; b18_n = 0; tdoa_n = 0; running = 0;
    ai = !ai_pulse; bi = 1'b1; tdia = 1'b0;
    @(posedge clk) rst_n = 1'b0;
    #(half / 2.0) rst_n = 1'b1;
    @(posedge clk) #(half / 2.0) tdia = 1'b1;
    running = 1;
    @(negedge clk) t0 = $realtime;          // TDIA captured here
    #(half / 2.0) tdia = 1'b0;
    for (int t = 0; t < 70; t++) begin
      if (t > 0) @(negedge clk);
      if (ai_pulse) begin
        #(ai_off) ai = 1'b1;
        #(ai_width) ai = 1'b0;
      end
    end
    repeat (2) @(negedge clk);
    running = 0;
    $display("run: clock %0.1f ns, AI %s: TDOA at %0.2f clocks, A15 pulse %0.1f ns",
             p, ai_pulse ? "pulsed" : "high", (tdoa_r - t0) / p, a15_f - a15_r);
    count_is("TDOA pulses", tdoa_n, 1);
    near("TDOA rise (rising edge of clock 64)", tdoa_r - t0, 62.5 * p);
    near("TDOA width", tdoa_f - tdoa_r, p);
    count_is("A15 pulses", a15_n, 1);
    near("A15 start", a15_r - t0, 14 * p + (ai_pulse ? ai_off : 0.0) + HV_DELAY);
    near("A15 width", a15_f - a15_r, ai_pulse ? ai_width : p);
    count_is("B17 pulses", b17_n, 1);
    count_is("B18 pulses", b18_n, 1);
    near("B17 start", b17_r - t0, 16 * p + HV_DELAY);
    near("B17 width", b17_f - b17_r, p);
    near("B18 one clock after B17", b18_r - b17_r, p);
  endtask

  initial begin
    #10s;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks = 0; failures = 0; running = 0;
    half = 21100.0; clk = 1'b1; rst_n = 1'b1; tdia = 1'b0; ai = 1'b1; bi = 1'b1;
    #1ns rst_n = 1'b0;
    run(42200.0, 1'b0, 0.0);
    run(42200.0, 1'b1, 10000.0);
    run(4900.0,  1'b1, 2000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
