// tb_row_control_system -- end-to-end, full-size testbench of the row control
// system: 16 Switcher ASICs of 64 channels (1024 rows), default parameters,
// 1 nF load on every output, 7.8 us row clock.
//
// A token is put into row 0 and, with the last chip's TDOA looped to its
// TDIAr, must visit rows 0..1023 in clocks 0..1023 and rows 1022..0 in clocks
// 1024..2046 (row r in clock t == r or t == 2046 - r); in a forward-only scan
// (TDIAr held low) only t == r. All 2048 HV outputs are compared with that
// rule a quarter and three quarters into every clock, with the pulse width
// and polarity the control pins ask for. The chain's end pins are checked to
// switch half a clock early, on the rising edge.
// Mechanisms counted, each of which must occur at least once:
//   forward steps, reverse steps, the single turn-around pulse of the last
//   row, chip-to-chip hand-offs through the delay flip-flops (both
//   directions), AI/BI pulse trimming, negative-polarity pulses, the
//   rising-edge end-of-chain outputs, a reset in mid-scan and a forward-only
//   scan.
`timescale 1ns/1ps
module tb_row_control_system;

  localparam int  CHIPS = 16;
  localparam int  CHAN  = 64;
  localparam int  R     = CHIPS * CHAN;
  localparam time P     = 7800ns;

  logic         clk, rst_n, tdia, tdiar_end, tdoa_end, tdoar_first;
  logic         ai, bi, pa, pb;
  logic [R-1:0] row_a, row_b;
  int           checks, failures;
  bit           loop_back, ai_win, bi_win, killed;
  int           reset_at;

  // mechanism counters
  int n_fwd, n_rev, n_turn, n_hand_fwd, n_hand_rev, n_trim, n_neg;
  int n_tdoa_rise, n_tdoar_rise, n_reset, n_fwd_only;

  assign tdiar_end = loop_back ? tdoa_end : 1'b0;

  row_control_system dut (
    .clk, .rst_n, .tdia, .tdoa_end, .tdiar_end, .tdoar_first,
    .ai, .bi, .pa, .pb, .row_a, .row_b);

  function automatic bit row_active(int r, int t);
    return !killed && ((t == r) || (loop_back && t == 2 * (R - 1) - r));
  endfunction

  // revision 2: positive pulse (idles low) when the polarity pin is low
  function automatic logic level(bit on, logic pol);
    return pol ? !on : on;
  endfunction

  task automatic fail(input string what, input int idx, input logic got, input logic exp);
    failures++;
    if (failures < 30)
      $display("FAIL %0t %s[%0d]: got %0b expected %0b", $time, what, idx, got, exp);
  endtask

  task automatic check(input int t, input bit late);
    int  bad;
    bit  tok, on_a, on_b, any;
    logic ea, eb, exp_to, exp_tor;
    bad = 0; any = 0;
    for (int r = 0; r < R; r++) begin
      tok  = row_active(r, t);
      on_a = tok && (!ai_win || !late);
      on_b = tok && (!bi_win || !late);
      ea = level(on_a, pa);
      eb = level(on_b, pb);
      if (row_a[r] !== ea) begin bad++; fail("A", r, row_a[r], ea); end
      if (row_b[r] !== eb) begin bad++; fail("B", r, row_b[r], eb); end
      if (tok && row_a[r] === ea && row_b[r] === eb) begin
        any = 1;
        if (t == r && t < R - 1)           n_fwd++;
        if (t == r && t < R - 1 && !loop_back) n_fwd_only++;
        if (t > R - 1)                     n_rev++;
        if (t == R - 1 && loop_back)       n_turn++;
        if (t == r && r % CHAN == 0 && r > 0)          n_hand_fwd++;
        if (t != r && r % CHAN == CHAN - 1 && r < R - 1) n_hand_rev++;
        if (late && (ai_win || bi_win))    n_trim++;
        if ((on_a && pa) || (on_b && pb))  n_neg++;
      end
    end
    checks += 2 * R;
    if (bad == 0 && killed && t > reset_at) n_reset++;
    exp_to  = !killed && (late ? (t == R - 2) : (t == R - 1));
    exp_tor = !killed && loop_back && (late ? (t == 2 * R - 3) : (t == 2 * R - 2));
    checks += 2;
    if (tdoa_end !== exp_to) fail("tdoa_end", t, tdoa_end, exp_to);
    else if (exp_to && late) n_tdoa_rise++;
    if (tdoar_first !== exp_tor) fail("tdoar_first", t, tdoar_first, exp_tor);
    else if (exp_tor && late) n_tdoar_rise++;
  endtask

  // One scan. Falling edge t opens clock t; the token is captured at edge 0.
  // Controls change 100 ns after a falling edge; the AI/BI windows are open
  // from +1000 ns to +3000 ns; samples at P/4 and 3P/4.
  task automatic scan(input bit loop, input bit pa0, input bit pb0,
                      input bit aw, input bit bw, input int rst_clk);
    int last_t;
    killed = 0; reset_at = rst_clk; loop_back = loop;
    ai_win = aw; bi_win = bw;
    last_t = loop ? 2 * R : R + 1;
    for (int t = -2; t < last_t; t++) begin
      clk = 1'b0;
      #100ns;
      if (t == -2) begin pa = pa0; pb = pb0; end
      ai = !ai_win; bi = !bi_win;
      if (t == 0) tdia = 1'b0;
      #900ns;
      if (ai_win) ai = 1'b1;
      if (bi_win) bi = 1'b1;
      #950ns;
      if (t >= 0) check(t, 1'b0);
      #1050ns;
      if (ai_win) ai = 1'b0;
      if (bi_win) bi = 1'b0;
      if (t == reset_at) begin
        rst_n = 1'b0; killed = 1;
        #10ns rst_n = 1'b1;
        #(P/2 - 3000ns - 10ns);
      end else begin
        #(P/2 - 3000ns);
      end
      clk = 1'b1;
      #1950ns;
      if (t >= 0) check(t, 1'b1);
      if (t == -1) tdia = 1'b1;
      #(P/4);
    end
  endtask

  task automatic require(input string what, input int n);
    checks++;
    $display("mechanism %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    #(P * 8000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks = 0; failures = 0; killed = 0; loop_back = 1; reset_at = -100;
    ai_win = 0; bi_win = 0;
    n_fwd = 0; n_rev = 0; n_turn = 0; n_hand_fwd = 0; n_hand_rev = 0; n_trim = 0;
    n_neg = 0; n_tdoa_rise = 0; n_tdoar_rise = 0; n_reset = 0; n_fwd_only = 0;
    clk = 1'b1; rst_n = 1'b1; tdia = 1'b0; ai = 1'b1; bi = 1'b1; pa = 1'b0; pb = 1'b0;
    #10ns rst_n = 1'b0;
    #100ns rst_n = 1'b1;
    #(P - 110ns);
    //   loop pa pb ai_win bi_win reset
    scan(1,   0, 0, 0,     0,     -100);   // down and up, full-width positive pulses
    scan(1,   1, 1, 1,     0,     -100);   // negative pulses, A trimmed by AI
    scan(0,   0, 1, 0,     1,     700);    // forward only, B trimmed, reset mid-scan
    require("forward step", n_fwd);
    require("reverse step", n_rev);
    require("turn-around pulse", n_turn);
    require("chip hand-off forward", n_hand_fwd);
    require("chip hand-off reverse", n_hand_rev);
    require("AI/BI pulse trimming", n_trim);
    require("negative polarity pulse", n_neg);
    require("TDOA on rising edge", n_tdoa_rise);
    require("TDOAr on rising edge", n_tdoar_rise);
    require("reset mid-scan", n_reset);
    require("forward-only scan", n_fwd_only);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
