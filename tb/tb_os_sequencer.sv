// tb_os_sequencer: checks the two-polarity test sequence.
//
// The sequencer drives a real four-pin pin_test_fsm; ticks come every 3
// clocks and the relay wait is shortened to R = 5 ticks. Counting ticks
// from the start request (t = 1 is the first), the expected schedule is:
//   t = 1            upper pass setup tick (FSM START -> pin 1)
//   t = 2,4,6,8      en_result_upper, with pin t/2 selected; display P<n>
//   t = 3,5,7,9      display shows the result of that pin
//   t = 10           FSM in END
//   t = 11 .. 10+R   relay switching on (neg_supply_on, nothing stored)
//   t = 11+R .. 20+R lower pass, same pattern with en_result_lower
//   t = 21+R .. 20+2R relay release wait, done already high; then idle.
// Every tick is compared with this schedule, strobes are checked never to
// fire outside a tick, a held start must not restart the test, and a
// second start after idle must run the whole schedule again.
module tb_os_sequencer;
  import ost_pkg::*;

  localparam int R = 5;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic tick = 1'b0;
  logic start = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic fsm_rst, fsm_en, fsm_adv, fsm_testing, fsm_done;
  logic store_clear, en_up, en_lo, neg_on, lower_pass, busy, done;
  disp_phase_t dph;
  logic [3:0] st, rel;
  logic [2:0] idx;

  os_sequencer #(.RELAY_TICKS(R)) u_dut (
    .clk(clk), .rst(rst), .tick(tick), .start(start),
    .fsm_testing(fsm_testing), .fsm_done(fsm_done),
    .fsm_rst(fsm_rst), .fsm_en(fsm_en), .fsm_adv(fsm_adv),
    .store_clear(store_clear), .en_result_upper(en_up), .en_result_lower(en_lo),
    .neg_supply_on(neg_on), .lower_pass(lower_pass), .disp_phase(dph),
    .busy(busy), .done(done));

  pin_test_fsm u_fsm (.clk(clk), .rst(rst || fsm_rst), .en(fsm_en), .adv(fsm_adv),
                      .state_out(st), .pin_release(rel), .pin_idx(idx),
                      .testing(fsm_testing), .done(fsm_done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Compare one tick cycle with the schedule (values seen before the edge).
  task automatic expect_tick(input int t, input int run);
    int  p;          // tick within a pass, 1..10, or 0 outside a pass
    bit  low;
    disp_phase_t ed;
    p = 0; low = 0;
    if (t >= 1 && t <= 10) p = t;
    else if (t >= 11 + R && t <= 20 + R) begin p = t - 10 - R; low = 1; end
    // strobes
    check(en_up == (!low && p >= 2 && p <= 9 && p % 2 == 0),
          $sformatf("run %0d t=%0d en_result_upper=%0d", run, t, en_up));
    check(en_lo == (low && p >= 2 && p <= 9 && p % 2 == 0),
          $sformatf("run %0d t=%0d en_result_lower=%0d", run, t, en_lo));
    if (p >= 2 && p <= 9)
      check(st == 4'(1 << ((p - 2) / 2)), $sformatf("run %0d t=%0d state_out %b", run, t, st));
    // relay
    check(neg_on == (t >= 11 && t <= 20 + R), $sformatf("run %0d t=%0d neg_supply_on=%0d", run, t, neg_on));
    check(done == (t > 20 + R), $sformatf("run %0d t=%0d done=%0d", run, t, done));
    check(busy == (t <= 20 + 2 * R), $sformatf("run %0d t=%0d busy=%0d", run, t, busy));
    // display phase
    if (p == 1)                 ed = DSP_START;
    else if (p >= 2 && p <= 9)  ed = (p % 2 == 0) ? DSP_PIN : DSP_RESULT;
    else                        ed = DSP_END;
    check(dph == ed, $sformatf("run %0d t=%0d display phase %0d exp %0d", run, t, dph, ed));
  endtask

  // tick generator: one clk cycle in three
  int tcnt = 0;
  always @(posedge clk) begin
    tcnt <= (tcnt == 2) ? 0 : tcnt + 1;
    tick <= (tcnt == 2);
  end

  // strobes must never fire without a tick
  always @(posedge clk) if (!rst && !tick) begin
    if (en_up || en_lo || fsm_adv) begin
      failures++;
      $display("FAIL: strobe outside tick");
    end
  end

  task automatic run_test(input int run);
    int t;
    // start request between ticks
    @(negedge clk);
    start = 1'b1;
    #1;
    check(store_clear == 1'b1, $sformatf("run %0d store_clear on start", run));
    check(dph == DSP_START || run > 0, "display START before the first test");
    t = 0;
    while (t < 20 + 2 * R + 3) begin
      @(posedge clk);
      #1;
      if (tick) begin
        t++;
        expect_tick(t, run);
      end
      if (t == 3) start = 1'b0;   // held for a while: must not restart
      if (t > 1) check(!store_clear, $sformatf("run %0d t=%0d no clear while busy", run, t));
    end
    check(!busy && done, $sformatf("run %0d idle and done at end", run));
  endtask

  initial begin
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    repeat (10) @(posedge clk);
    check(!busy && !done && !neg_on, "idle after reset");
    run_test(0);
    repeat (20) @(posedge clk);
    run_test(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
