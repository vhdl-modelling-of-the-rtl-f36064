// open_short_tester: FPGA controller of a low-cost IC open/short tester.
//
// The tester checks, pin by pin, the pair of ESD clamp diodes every I/O pin
// of an IC carries. External analog hardware (a current-forcing
// measurement unit with two limit comparators per pin) does the
// measuring; this logic selects the pin, collects the pass/fail bits,
// stores them and shows them on a dual 7-segment display.
//
//   clk_step_down  board oscillator (25.175 MHz) -> ~10 kHz test clock
//                  (test_clk to the hardware, tick enable inside)
//   os_sequencer   upper-diode pass, relay switch and 3 ms wait,
//                  lower-diode pass
//   pin_test_fsm   START -> pin 1 .. pin NPINS -> END; grounds every pin
//                  except the one under test
//   result_store   x2, one NPINS*2-bit register per polarity
//   seg_display    "P<n>", then PS / FO / FS / FF for the pin's result
//
// Interface:
//   meas[k]          2-bit comparator result of pin k (ost_pkg::result_t):
//                    bit 1 = above the 0.2 V short limit, bit 0 = below the
//                    1.5 V open limit. Sampled at the end of the first
//                    test-clock period in which pin k is selected.
//   pin_release[k]   1 = leave pin k floating for the measurement unit,
//                    0 = ground it.
//   neg_supply_on    drives the relay that selects negative forced current
//                    (lower diode test).
//   upper_result /   per-pin results of the two passes, pin k in bits
//   lower_result     [2k+1:2k]; valid when done is high.
//   state_out        one-hot FSM state (0 = START, all ones = END).
// start is a rising-edge request, rst a synchronous active-high reset.
// The original's PC interface is not specified beyond its name, so the
// results are brought out on ports instead.
//
// At the defaults a full test takes 10 + 31 + 10 test-clock periods plus a
// 31-period relay release wait (about 5.1 ms to done).
module open_short_tester
  import ost_pkg::*;
#(
  parameter int unsigned NPINS       = 4,
  parameter int unsigned DIV_N       = 1258,
  parameter int unsigned RELAY_TICKS = 31
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [1:0]         meas [NPINS],
  output logic               test_clk,
  output logic [NPINS-1:0]   pin_release,
  output logic               neg_supply_on,
  output logic [NPINS-1:0]   state_out,
  output logic [2*NPINS-1:0] upper_result,
  output logic [2*NPINS-1:0] lower_result,
  output seg_t               digit1,
  output seg_t               digit2,
  output logic               busy,
  output logic               done
);

  localparam int unsigned IW = $clog2(NPINS + 1);

  logic          tick;
  logic          fsm_rst, fsm_en, fsm_adv, fsm_testing, fsm_done;
  logic [IW-1:0] pin_idx;
  logic          store_clear, en_upper, en_lower, lower_pass;
  disp_phase_t   disp_phase;
  result_t       shown;

  clk_step_down #(.N(DIV_N)) u_div (
    .clk     (clk),
    .rst     (rst),
    .clk_out (test_clk),
    .tick    (tick)
  );

  os_sequencer #(.RELAY_TICKS(RELAY_TICKS)) u_seq (
    .clk             (clk),
    .rst             (rst),
    .tick            (tick),
    .start           (start),
    .fsm_testing     (fsm_testing),
    .fsm_done        (fsm_done),
    .fsm_rst         (fsm_rst),
    .fsm_en          (fsm_en),
    .fsm_adv         (fsm_adv),
    .store_clear     (store_clear),
    .en_result_upper (en_upper),
    .en_result_lower (en_lower),
    .neg_supply_on   (neg_supply_on),
    .lower_pass      (lower_pass),
    .disp_phase      (disp_phase),
    .busy            (busy),
    .done            (done)
  );

  pin_test_fsm #(.NPINS(NPINS)) u_fsm (
    .clk         (clk),
    .rst         (rst || fsm_rst),
    .en          (fsm_en),
    .adv         (fsm_adv),
    .state_out   (state_out),
    .pin_release (pin_release),
    .pin_idx     (pin_idx),
    .testing     (fsm_testing),
    .done        (fsm_done)
  );

  result_store #(.NPINS(NPINS)) u_store_upper (
    .clk          (clk),
    .rst          (rst),
    .clear        (store_clear),
    .en_result    (en_upper),
    .state_sel    (state_out),
    .meas         (meas),
    .store_result (upper_result)
  );

  result_store #(.NPINS(NPINS)) u_store_lower (
    .clk          (clk),
    .rst          (rst),
    .clear        (store_clear),
    .en_result    (en_lower),
    .state_sel    (state_out),
    .meas         (meas),
    .store_result (lower_result)
  );

  // Stored result of the pin under test, from the pass now running.
  always_comb begin
    shown = result_t'(lower_pass ? lower_result[2*pin_idx +: 2]
                                 : upper_result[2*pin_idx +: 2]);
  end

  seg_display u_disp (
    .clk     (clk),
    .rst     (rst),
    .phase   (disp_phase),
    .pin_num (4'(pin_idx) + 4'd1),
    .result  (shown),
    .digit1  (digit1),
    .digit2  (digit2)
  );

endmodule
