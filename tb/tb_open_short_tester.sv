// tb_open_short_tester: end-to-end test of the tester at its default size
// (4 pins, 25.175 MHz board clock divided by 2 * 1258, 31-tick relay wait).
//
// A behavioural model of the analog side stands in for the measurement
// unit, the relay and the IC:
//   - each pin has a fault for its upper and its lower diode (pass, open,
//     short, or a broken comparator that reports "undefined");
//   - a pin the tester grounds reads as shorted (the model's comparators
//     see 0 V); with every pin released (START/END) nothing is forced and
//     the comparators report undefined;
//   - the relay contact follows neg_supply_on only after 3 ms; while it is
//     switching, a lower-diode measurement reads undefined, so a tester
//     that does not wait long enough stores wrong results.
// Two complete tests are run with different fault patterns. Checked: both
// result registers, the displayed code sequence (START, P1, result 1, ...,
// P4, result 4, END, then the same for the lower pass), that exactly one
// pin is released whenever a result is stored, the test clock period
// (2516 board clocks), the relay wait and the pass timing in test-clock
// periods. Every mechanism (each display code, each result kind, the
// relay switch, the lower pass, restart after a finished test) is counted
// and must occur at least once.
module tb_open_short_tester;
  import ost_pkg::*;

  localparam int    NP        = 4;
  localparam int    DIVN      = 1258;
  localparam int    R         = 31;
  localparam time   HALF      = 19861;           // ps, 25.175 MHz board clock
  localparam time   RELAY_DLY = 64'd3_000_000_000; // 3 ms in ps

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic start = 1'b0;
  logic [1:0] meas [NP];
  logic test_clk, neg_on, busy, done;
  logic [NP-1:0] rel, st;
  logic [2*NP-1:0] up_res, lo_res;
  seg_t d1, d2;
  int   checks = 0;
  int   failures = 0;

  always #HALF clk = ~clk;

  open_short_tester u_dut (
    .clk(clk), .rst(rst), .start(start), .meas(meas),
    .test_clk(test_clk), .pin_release(rel), .neg_supply_on(neg_on),
    .state_out(st), .upper_result(up_res), .lower_result(lo_res),
    .digit1(d1), .digit2(d2), .busy(busy), .done(done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- analog side model ----------------
  result_t fault_up [NP];
  result_t fault_lo [NP];
  logic    contact_neg = 1'b0;     // relay contact position
  logic    contact_moving = 1'b0;

  always @(neg_on) begin
    contact_moving = 1'b1;
    #(RELAY_DLY);
    contact_neg    = neg_on;
    contact_moving = 1'b0;
  end

  always_comb begin
    for (int k = 0; k < NP; k++) begin
      if (rel == '1)               meas[k] = RES_UNDEF;   // nothing forced
      else if (!rel[k])            meas[k] = RES_SHORT;   // grounded pin
      else if (contact_moving || contact_neg != neg_on) meas[k] = RES_UNDEF;
      else if (contact_neg)        meas[k] = fault_lo[k];
      else                         meas[k] = fault_up[k];
    end
  end

  // ---------------- mechanism counters ----------------
  int n_start_disp, n_pin_disp, n_pass, n_open, n_short, n_undef, n_end_disp;
  int n_relay_on, n_lower_store, n_upper_store, n_restart;

  // displayed codes, consecutive repeats collapsed
  logic [15:0] disp_log [$];
  always @(posedge clk) begin
    if (!rst && (disp_log.size() == 0 || disp_log[$] != {d1, d2})) disp_log.push_back({d1, d2});
  end

  // store strobes: exactly one pin released, and it is the selected one
  always @(posedge clk) if (!rst) begin
    if (u_dut.en_upper || u_dut.en_lower) begin
      check($countones(rel) == 1 && rel == st, $sformatf("one pin released at store, rel=%b st=%b", rel, st));
      if (u_dut.en_upper) n_upper_store++;
      if (u_dut.en_lower) begin
        n_lower_store++;
        check(contact_neg && !contact_moving, "relay settled before lower measurement");
      end
    end
  end

  always @(posedge neg_on) n_relay_on++;

  // ---------------- timing measurement ----------------
  time t_rise_prev = 0;
  int  n_rises = 0;
  always @(posedge test_clk) begin
    if (n_rises > 0 && n_rises < 6)
      check($time - t_rise_prev == 2 * DIVN * 2 * HALF,
            $sformatf("test clock period %0t", $time - t_rise_prev));
    t_rise_prev = $time;
    n_rises++;
  end

  function automatic logic [15:0] res_code(input result_t r);
    case (r)
      RES_PASS:  return 16'h98A4;
      RES_OPEN:  return 16'hB881;
      RES_SHORT: return 16'hB8A4;
      default:   return 16'hB8B8;
    endcase
  endfunction

  function automatic logic [15:0] pin_code(input int k);
    case (k)
      0: return 16'h98CF;
      1: return 16'h9892;
      2: return 16'h9886;
      default: return 16'h98CC;
    endcase
  endfunction

  task automatic run_test(input int run);
    logic [2*NP-1:0] exp_up, exp_lo;
    logic [15:0] exp_disp [$];
    time t_start, t_first_up, t_first_lo, t_done;
    for (int k = 0; k < NP; k++) begin
      exp_up[2*k +: 2] = fault_up[k];
      exp_lo[2*k +: 2] = fault_lo[k];
    end
    disp_log.delete();
    @(negedge clk);
    start = 1'b1;
    t_start = $time;
    if (run > 0) n_restart++;
    t_first_up = 0; t_first_lo = 0;
    // wait for the stores and the end
    fork
      begin
        @(posedge clk iff u_dut.en_upper);
        t_first_up = $time;
      end
      begin
        @(posedge clk iff u_dut.en_lower);
        t_first_lo = $time;
      end
    join
    repeat (10) @(posedge clk);
    start = 1'b0;
    @(posedge clk iff done);
    t_done = $time;
    #1;
    check(up_res == exp_up, $sformatf("run %0d upper results %b exp %b", run, up_res, exp_up));
    check(lo_res == exp_lo, $sformatf("run %0d lower results %b exp %b", run, lo_res, exp_lo));
    // first upper and first lower store are 10 + R test-clock periods apart
    check(t_first_lo - t_first_up == (time'(10) + time'(R)) * 2 * DIVN * 2 * HALF,
          $sformatf("run %0d upper->lower spacing %0t", run, t_first_lo - t_first_up));
    check((t_first_lo - t_first_up) >= RELAY_DLY, "relay wait covers 3 ms");
    // done is registered at the 8th tick after the first lower store (7 more
    // pin ticks and END) and seen by this process one board clock later
    check(t_done - t_first_lo == time'(8) * 2 * DIVN * 2 * HALF + 2 * HALF,
          $sformatf("run %0d first lower store -> done %0t", run, t_done - t_first_lo));
    $display("run %0d: start->done %0t ps", run, t_done - t_start);
    // wait for idle (relay release)
    @(posedge clk iff !busy);
    // expected display sequence
    if (run > 0) exp_disp.push_back(16'hFFFF);  // END of the previous test
    for (int pass = 0; pass < 2; pass++) begin
      exp_disp.push_back(16'h0000);
      for (int k = 0; k < NP; k++) begin
        exp_disp.push_back(pin_code(k));
        exp_disp.push_back(res_code(pass == 0 ? fault_up[k] : fault_lo[k]));
      end
      exp_disp.push_back(16'hFFFF);
    end
    check(disp_log.size() == exp_disp.size(),
          $sformatf("run %0d display sequence length %0d exp %0d", run, disp_log.size(), exp_disp.size()));
    for (int i = 0; i < exp_disp.size() && i < disp_log.size(); i++)
      check(disp_log[i] == exp_disp[i], $sformatf("run %0d display %0d: %h exp %h", run, i, disp_log[i], exp_disp[i]));
    foreach (disp_log[i]) begin
      case (disp_log[i])
        16'h0000: n_start_disp++;
        16'hFFFF: n_end_disp++;
        16'h98CF, 16'h9892, 16'h9886, 16'h98CC: n_pin_disp++;
        16'h98A4: n_pass++;
        16'hB881: n_open++;
        16'hB8A4: n_short++;
        16'hB8B8: n_undef++;
        default: check(1'b0, $sformatf("unknown display code %h", disp_log[i]));
      endcase
    end
  endtask

  initial begin
    n_start_disp = 0; n_pin_disp = 0; n_pass = 0; n_open = 0; n_short = 0; n_undef = 0;
    n_end_disp = 0; n_relay_on = 0; n_lower_store = 0; n_upper_store = 0; n_restart = 0;
    fault_up[0] = RES_PASS;  fault_lo[0] = RES_PASS;
    fault_up[1] = RES_OPEN;  fault_lo[1] = RES_PASS;
    fault_up[2] = RES_SHORT; fault_lo[2] = RES_SHORT;
    fault_up[3] = RES_PASS;  fault_lo[3] = RES_OPEN;
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    repeat (100) @(posedge clk);
    check(d1 == 8'h00 && d2 == 8'h00 && !busy, "idle START display after reset");
    run_test(0);
    // second test: different faults, including a broken comparator
    for (int k = 0; k < NP; k++) begin
      fault_up[k] = result_t'($urandom);
      fault_lo[k] = result_t'($urandom);
    end
    fault_up[1] = RES_UNDEF;
    fault_lo[2] = RES_OPEN;
    run_test(1);
    check(n_upper_store == 2 * NP && n_lower_store == 2 * NP, "store strobe counts");
    check(n_start_disp > 0, "mechanism: START display");
    check(n_pin_disp > 0,   "mechanism: P<n> display");
    check(n_pass > 0,       "mechanism: pass result");
    check(n_open > 0,       "mechanism: fail open result");
    check(n_short > 0,      "mechanism: fail short result");
    check(n_undef > 0,      "mechanism: undefined result");
    check(n_end_disp > 0,   "mechanism: END display");
    check(n_relay_on == 2,  "mechanism: relay switched once per test");
    check(n_restart > 0,    "mechanism: restart after a finished test");
    $display("mechanisms: start=%0d pin=%0d pass=%0d open=%0d short=%0d undef=%0d end=%0d relay=%0d upper_stores=%0d lower_stores=%0d restarts=%0d",
             n_start_disp, n_pin_disp, n_pass, n_open, n_short, n_undef, n_end_disp,
             n_relay_on, n_upper_store, n_lower_store, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
