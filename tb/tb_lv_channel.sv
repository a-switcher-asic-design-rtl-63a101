// tb_lv_channel -- self-checking testbench for lv_channel.
//
// Four instances share one random stimulus: the first, middle and last cell
// variants of revision 2 and a middle cell of revision 1. The testbench keeps
// its own model of the token flip-flops (falling edge for the row token,
// rising edge for the chip-end outputs) and checks after every clock edge and
// after every input change: token, width-gated pulses, polarity-adjusted
// drives and both token outputs of each variant. Resets are applied
// asynchronously in the middle of a clock now and then.
`timescale 1ns/1ps
module tb_lv_channel;
  import switcher_pkg::*;

  localparam time HALF = 50ns;

  logic        clk, rst_n, tdia, tdiar;
  pulse_ctrl_t ctrl;
  int          checks, failures;

  logic tdoa_f, tdoar_f, tok_f, pa_f, pb_f, da_f, db_f;
  logic tdoa_m, tdoar_m, tok_m, pa_m, pb_m, da_m, db_m;
  logic tdoa_l, tdoar_l, tok_l, pa_l, pb_l, da_l, db_l;
  logic tdoa_1, tdoar_1, tok_1, pa_1, pb_1, da_1, db_1;

  lv_channel #(.POSITION(CH_FIRST),  .REVISION(REV_2)) u_first (
    .clk, .rst_n, .tdia, .tdoa(tdoa_f), .tdiar, .tdoar(tdoar_f), .ctrl,
    .token(tok_f), .pulse_a(pa_f), .pulse_b(pb_f), .drive_a(da_f), .drive_b(db_f));
  lv_channel #(.POSITION(CH_MIDDLE), .REVISION(REV_2)) u_mid (
    .clk, .rst_n, .tdia, .tdoa(tdoa_m), .tdiar, .tdoar(tdoar_m), .ctrl,
    .token(tok_m), .pulse_a(pa_m), .pulse_b(pb_m), .drive_a(da_m), .drive_b(db_m));
  lv_channel #(.POSITION(CH_LAST),   .REVISION(REV_2)) u_last (
    .clk, .rst_n, .tdia, .tdoa(tdoa_l), .tdiar, .tdoar(tdoar_l), .ctrl,
    .token(tok_l), .pulse_a(pa_l), .pulse_b(pb_l), .drive_a(da_l), .drive_b(db_l));
  lv_channel #(.POSITION(CH_MIDDLE), .REVISION(REV_1)) u_rev1 (
    .clk, .rst_n, .tdia, .tdoa(tdoa_1), .tdiar, .tdoar(tdoar_1), .ctrl,
    .token(tok_1), .pulse_a(pa_1), .pulse_b(pb_1), .drive_a(da_1), .drive_b(db_1));

  // reference state
  logic m_fwd, m_rev, m_fwd_rise, m_rev_rise;

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %0b expected %0b", $time, what, got, exp);
    end
  endtask

  task automatic check_all();
    logic tok, pa, pb;
    tok = m_fwd | m_rev;
    pa  = tok & ctrl.ai;
    pb  = tok & ctrl.bi;
    expect_bit("first.token", tok_f, tok);
    expect_bit("mid.token",   tok_m, tok);
    expect_bit("last.token",  tok_l, tok);
    expect_bit("rev1.token",  tok_1, tok);
    expect_bit("first.pulse_a", pa_f, pa);
    expect_bit("first.pulse_b", pb_f, pb);
    expect_bit("mid.pulse_a",   pa_m, pa);
    expect_bit("mid.pulse_b",   pb_m, pb);
    expect_bit("last.pulse_a",  pa_l, pa);
    expect_bit("last.pulse_b",  pb_l, pb);
    // revision 2: A and B positive when PA/PB low
    expect_bit("mid.drive_a",  da_m, ctrl.pa ? ~pa : pa);
    expect_bit("mid.drive_b",  db_m, ctrl.pb ? ~pb : pb);
    expect_bit("first.drive_a", da_f, ctrl.pa ? ~pa : pa);
    expect_bit("last.drive_b",  db_l, ctrl.pb ? ~pb : pb);
    // revision 1: A positive when PA high, B positive when PB low
    expect_bit("rev1.drive_a", da_1, ctrl.pa ? pa : ~pa);
    expect_bit("rev1.drive_b", db_1, ctrl.pb ? ~pb : pb);
    // token outputs of each variant
    expect_bit("first.tdoa",  tdoa_f,  m_fwd);
    expect_bit("first.tdoar", tdoar_f, m_rev_rise);
    expect_bit("mid.tdoa",    tdoa_m,  m_fwd);
    expect_bit("mid.tdoar",   tdoar_m, m_rev);
    expect_bit("last.tdoa",   tdoa_l,  m_fwd_rise);
    expect_bit("last.tdoar",  tdoar_l, m_rev);
    expect_bit("rev1.tdoa",   tdoa_1,  m_fwd);
    expect_bit("rev1.tdoar",  tdoar_1, m_rev);
  endtask

  initial begin
    #(HALF * 2 * 5000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks = 0; failures = 0;
    clk = 1'b1; rst_n = 1'b1; tdia = 1'b0; tdiar = 1'b0;
    ctrl = '{ai: 1'b1, bi: 1'b1, pa: 1'b0, pb: 1'b0};
    m_fwd = 0; m_rev = 0; m_fwd_rise = 0; m_rev_rise = 0;
    #1ns rst_n = 1'b0;
    #(HALF - 1ns);
    check_all();
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      // falling edge: row token flip-flops
      clk = 1'b0;
      m_fwd = tdia; m_rev = tdiar;
      #10ns check_all();
      #10ns ctrl = pulse_ctrl_t'($urandom_range(0, 15));
      #1ns  check_all();
      // rising edge: chip-end flip-flops
      #(HALF - 21ns) clk = 1'b1;
      m_fwd_rise = tdia; m_rev_rise = tdiar;
      #10ns check_all();
      #15ns tdia = ($urandom_range(0, 3) == 0);
      tdiar = ($urandom_range(0, 3) == 0);
      if ($urandom_range(0, 99) == 0) begin
        rst_n = 1'b0;
        m_fwd = 0; m_rev = 0; m_fwd_rise = 0; m_rev_rise = 0;
        #1ns check_all();
        #4ns rst_n = 1'b1;
        #(HALF - 30ns);
      end else begin
        #(HALF - 25ns);
      end
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
