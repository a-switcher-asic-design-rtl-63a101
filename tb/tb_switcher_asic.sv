// tb_switcher_asic -- self-checking testbench for switcher_asic.
//
// Two chips run side by side from the same clock and control pins:
//   u_ch4  : 4 channels, revision 1 (the four-channel test arrangement)
//   u_ch64 : 64 channels, revision 2 (the production configuration)
// On each, TDOA is wired back to TDIAr, so a token put into TDIA sweeps down
// the chip and back up. With the token captured at falling edge 0, row r of
// an R-channel chip must be active in clock t when t == r (forward) or
// t == 2(R-1) - r (reverse); the last row is active once, in clock R-1.
// The HV outputs of every row are sampled a quarter and three quarters into
// each clock, after the modelled HV delays, and compared with that rule,
// with the pulse width (AI/BI held high, or a window inside the clock) and
// the polarity rule of each revision. TDOA must be high only in the half
// clock around falling edge R-1 and TDOAr only around falling edge 2R-2.
// Sweeps cover: full-width pulses, AI and BI windows, a polarity change at
// the turn-around, and a reset in the middle of a sweep.
`timescale 1ns/1ps
module tb_switcher_asic;
  import switcher_pkg::*;

  localparam time P = 7800ns;   // row clock period

  logic        clk, rst_n, tdia, ai, bi, pa, pb;
  logic        tdoa4, tdoar4, tdoa64, tdoar64;
  logic [3:0]  a4, b4;
  logic [63:0] a64, b64;
  int          checks, failures;
  bit          ai_win, bi_win;    // width control: window inside the clock
  int          reset_at;          // sweep clock where reset is applied, -100: none
  bit          killed;            // tokens cleared by the mid-sweep reset

  switcher_asic #(.CHANNELS(4), .REVISION(REV_1)) u_ch4 (
    .clk, .rst_n, .tdia, .tdoa(tdoa4), .tdiar(tdoa4), .tdoar(tdoar4),
    .ai, .bi, .pa, .pb, .hv_a(a4), .hv_b(b4));

  switcher_asic u_ch64 (
    .clk, .rst_n, .tdia, .tdoa(tdoa64), .tdiar(tdoa64), .tdoar(tdoar64),
    .ai, .bi, .pa, .pb, .hv_a(a64), .hv_b(b64));

  function automatic bit row_active(int r, int t, int n);
    return (t == r) || (t == 2 * (n - 1) - r);
  endfunction

  // level of an HV output for a given pulse state
  function automatic logic level(bit on, bit port_a, int rev);
    bit positive;
    if (port_a) positive = (rev == 1) ? pa : !pa;
    else        positive = !pb;
    return positive ? on : !on;
  endfunction

  task automatic expect_bit(input string what, input int idx, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 30)
        $display("FAIL %0t %s[%0d]: got %0b expected %0b", $time, what, idx, got, exp);
    end
  endtask

  // late: sample three quarters into clock t (after the rising edge)
  task automatic check_chip(input int n, input int rev, input int t, input bit late,
                            input logic [63:0] ha, input logic [63:0] hb,
                            input logic to, input logic tor);
    bit tok, on_a, on_b;
    for (int r = 0; r < n; r++) begin
      tok  = !killed && row_active(r, t, n);
      on_a = tok && (!ai_win || !late);
      on_b = tok && (!bi_win || !late);
      expect_bit(n == 4 ? "A4ch" : "A64ch", r, ha[r], level(on_a, 1'b1, rev));
      expect_bit(n == 4 ? "B4ch" : "B64ch", r, hb[r], level(on_b, 1'b0, rev));
    end
    expect_bit(n == 4 ? "TDOA4ch" : "TDOA64ch", t, to,
               !killed && (late ? (t == n - 2) : (t == n - 1)));
    expect_bit(n == 4 ? "TDOAr4ch" : "TDOAr64ch", t, tor,
               !killed && (late ? (t == 2 * n - 3) : (t == 2 * n - 2)));
  endtask

  task automatic check_both(input int t, input bit late);
    check_chip(4, 1, t, late, {60'b0, a4}, {60'b0, b4}, tdoa4, tdoar4);
    check_chip(64, 2, t, late, a64, b64, tdoa64, tdoar64);
  endtask

  // One sweep. Clock t starts at falling edge t; the token is captured at
  // edge 0. Controls change 100 ns after a falling edge, windows open at
  // +1000 ns and close at +3000 ns, samples are at P/4 and 3P/4.
  task automatic sweep(input bit pa0, input bit pb0, input bit pa_turn, input bit pb_turn,
                       input bit aw, input bit bw, input int rst_clk);
    killed = 0; reset_at = rst_clk;
    ai_win = aw; bi_win = bw;
    for (int t = -2; t < 130; t++) begin
      // falling edge t
      clk = 1'b0;
      #100ns;
      if (t == -2) begin pa = pa0; pb = pb0; end
      if (t == 3)  begin pa = pa_turn; pb = pb_turn; end   // 4-channel turn-around
      ai = !ai_win; bi = !bi_win;
      if (t == 0) tdia = 1'b0;
      #900ns;
      if (ai_win) ai = 1'b1;
      if (bi_win) bi = 1'b1;
      #950ns;                                  // P/4
      if (t >= 0) check_both(t, 1'b0);
      #1050ns;
      ai = !ai_win ? 1'b1 : 1'b0;
      bi = !bi_win ? 1'b1 : 1'b0;
      if (t == reset_at) begin
        rst_n = 1'b0; killed = 1;
        #10ns rst_n = 1'b1;
        #(P/2 - 3000ns - 10ns);
      end else begin
        #(P/2 - 3000ns);
      end
      clk = 1'b1;                              // rising edge
      #1950ns;                                 // 3P/4
      if (t >= 0) check_both(t, 1'b1);
      if (t == -1) tdia = 1'b1;                // present token for edge 0
      #(P/4);
    end
  endtask

  initial begin
    #(P * 1000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks = 0; failures = 0; killed = 0;
    clk = 1'b1; rst_n = 1'b1; tdia = 1'b0; ai = 1'b1; bi = 1'b1; pa = 1'b0; pb = 1'b0;
    ai_win = 0; bi_win = 0;
    #10ns rst_n = 1'b0;
    #100ns rst_n = 1'b1;
    #(P - 110ns);
    //     pa0 pb0 pa@turn pb@turn ai_win bi_win reset
    sweep(0,  0,  0,      0,      0,     0,     -100);   // full-width pulses
    sweep(0,  0,  0,      0,      1,     0,     -100);   // A trimmed by AI
    sweep(0,  0,  1,      1,      0,     1,     -100);   // polarity flip at turn, B trimmed
    sweep(1,  0,  0,      1,      1,     1,     -100);   // mixed polarity, both trimmed
    sweep(0,  1,  0,      1,      0,     0,     40);   // reset during the sweep
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
