// os_sequencer: runs the complete two-polarity open/short test.
//
// A full test measures the upper ESD diode of every pin (positive forced
// current), then the lower diode (negative forced current). The negative
// supply is switched in by a mechanical relay that needs about 3 ms, so the
// total test time is T_upper + T_delay + T_lower. This block runs the pin
// FSM once for each polarity and inserts the relay delay between them.
//
// Everything advances on tick, the one-per-test-clock enable from the
// clock divider. Per pass:
//   - FSM in START: one setup tick, then the FSM is advanced to pin 1.
//   - each pin takes two ticks. During the first the pin is selected and
//     the display shows "P<n>"; at its end en_result loads the pin's result
//     into the result store of the current polarity. During the second the
//     display shows that stored result; at its end the FSM moves on.
//   - FSM in END: the pass is over.
// Between the passes neg_supply_on is raised and RELAY_TICKS ticks are
// waited before the lower pass starts; the relay stays on for the lower
// pass. After it the relay is released and RELAY_TICKS more ticks are
// waited before a new test is accepted, so that the next upper pass never
// sees the negative supply.
//
// Interface: start is edge-sensitive (a rising edge in IDLE begins a test
// and clears both result stores through store_clear). fsm_rst restarts the
// FSM at START. done is set when the lower pass finishes and stays set
// until the next start; busy is high from start until the relay release
// wait has ended.
//
// The order upper-then-lower and the relay delay between them follow the
// original tester. The two ticks per pin, the setup tick and the release
// wait are this design's choices: the original gives its timing only as
// measured times.
module os_sequencer
  import ost_pkg::*;
#(
  parameter int unsigned RELAY_TICKS = 31   // >= 3 ms at 10.006 kHz
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        tick,
  input  logic        start,
  // pin FSM
  input  logic        fsm_testing,
  input  logic        fsm_done,
  output logic        fsm_rst,
  output logic        fsm_en,
  output logic        fsm_adv,
  // result stores
  output logic        store_clear,
  output logic        en_result_upper,
  output logic        en_result_lower,
  // relay and status
  output logic        neg_supply_on,
  output logic        lower_pass,
  output disp_phase_t disp_phase,
  output logic        busy,
  output logic        done
);

  typedef enum logic [2:0] {
    SQ_IDLE, SQ_UPPER, SQ_RELAY_ON, SQ_LOWER, SQ_RELAY_OFF
  } seq_state_t;

  localparam int unsigned DW = (RELAY_TICKS > 1) ? $clog2(RELAY_TICKS) : 1;

  seq_state_t state;
  logic       start_q;
  logic       half;       // 0: first tick of a pin, 1: second tick
  logic [DW-1:0] dly;
  logic       in_pass;
  logic       start_edge;

  assign in_pass    = (state == SQ_UPPER) || (state == SQ_LOWER);
  assign start_edge = start && !start_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= SQ_IDLE;
      start_q <= 1'b0;
      half    <= 1'b0;
      dly     <= '0;
      done    <= 1'b0;
    end else begin
      start_q <= start;
      unique case (state)
        SQ_IDLE: if (start_edge) begin
          state <= SQ_UPPER;
          half  <= 1'b0;
          done  <= 1'b0;
        end
        SQ_UPPER, SQ_LOWER: if (tick) begin
          if (fsm_testing) half <= ~half;
          if (fsm_done) begin
            half  <= 1'b0;
            dly   <= '0;
            state <= (state == SQ_UPPER) ? SQ_RELAY_ON : SQ_RELAY_OFF;
            if (state == SQ_LOWER) done <= 1'b1;
          end
        end
        SQ_RELAY_ON, SQ_RELAY_OFF: if (tick) begin
          if (dly == DW'(RELAY_TICKS - 1)) begin
            dly   <= '0;
            state <= (state == SQ_RELAY_ON) ? SQ_LOWER : SQ_IDLE;
          end else begin
            dly <= dly + 1'b1;
          end
        end
        default: state <= SQ_IDLE;
      endcase
    end
  end

  // FSM control: restart it whenever no pass is running, step it once per
  // tick in START and on the second tick of each pin.
  assign fsm_rst = !in_pass;
  assign fsm_en  = in_pass;
  assign fsm_adv = in_pass && tick && (fsm_testing ? half : !fsm_done);

  assign store_clear     = (state == SQ_IDLE) && start_edge;
  assign en_result_upper = (state == SQ_UPPER) && tick && fsm_testing && !half;
  assign en_result_lower = (state == SQ_LOWER) && tick && fsm_testing && !half;

  assign neg_supply_on = (state == SQ_RELAY_ON) || (state == SQ_LOWER);
  assign lower_pass    = (state == SQ_LOWER) || (state == SQ_RELAY_OFF);
  assign busy          = (state != SQ_IDLE);

  always_comb begin
    if (!in_pass)          disp_phase = (state == SQ_IDLE && !done) ? DSP_START : DSP_END;
    else if (fsm_done)     disp_phase = DSP_END;
    else if (!fsm_testing) disp_phase = DSP_START;
    else                   disp_phase = half ? DSP_RESULT : DSP_PIN;
  end

  // The relay may only be on while the negative-current pass needs it.
  a_relay_only_lower : assert property (@(posedge clk) disable iff (rst)
    en_result_upper |-> !neg_supply_on);

endmodule
