// pin_test_fsm: Moore machine that walks the tester across the IC pins.
//
// States: START, then one state per pin (S0..S[NPINS-1]), then END. The
// machine leaves START when en is high, visits every pin state once and
// stays in END until rst. It moves only in cycles where adv is high, so
// the caller sets how long each pin stays selected (adv tied high gives
// one state per clock, as in the original tester).
//
// Outputs, all decoded from the state alone (Moore):
//   state_out   START = all zeros, pin k = one-hot bit k, END = all ones
//               (for four pins: 0000, 0001, 0010, 0100, 1000, 1111).
//   pin_release bit k = 1 leaves pin k floating so the measurement unit
//               can force current into it; 0 grounds the pin. In a pin
//               state only the pin under test is released and every
//               other pin is grounded; in START and END every pin is
//               released. This is the tri-state Y pattern of the
//               original (Z = released, 0 = grounded) written as a
//               release mask because the FPGA-side driver can be built
//               as an open-drain pull-down.
//   pin_idx     index of the pin under test (0 outside the pin states).
//   testing     high in a pin state; done high in END.
//
// The state sequence and the one-hot encoding follow the original tester;
// the adv enable and synchronous active-high reset are this design's.
module pin_test_fsm #(
  parameter int unsigned NPINS = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic                     adv,
  output logic [NPINS-1:0]         state_out,
  output logic [NPINS-1:0]         pin_release,
  output logic [$clog2(NPINS+1)-1:0] pin_idx,
  output logic                     testing,
  output logic                     done
);

  typedef enum logic [1:0] {ST_START, ST_PIN, ST_END} phase_t;

  localparam int unsigned IW = $clog2(NPINS + 1);

  phase_t        phase;
  logic [IW-1:0] idx;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= ST_START;
      idx   <= '0;
    end else if (adv) begin
      unique case (phase)
        ST_START: if (en) begin
          phase <= ST_PIN;
          idx   <= '0;
        end
        ST_PIN: begin
          if (idx == IW'(NPINS - 1)) phase <= ST_END;
          else                       idx   <= idx + 1'b1;
        end
        ST_END:  ;
        default: phase <= ST_START;
      endcase
    end
  end

  always_comb begin
    state_out   = '0;
    pin_release = '1;
    unique case (phase)
      ST_START: begin
        state_out   = '0;
        pin_release = '1;
      end
      ST_PIN: begin
        for (int k = 0; k < NPINS; k++) state_out[k] = (idx == IW'(k));
        pin_release = state_out;
      end
      ST_END: begin
        state_out   = '1;
        pin_release = '1;
      end
      default: ;
    endcase
  end

  assign pin_idx = (phase == ST_PIN) ? idx : '0;
  assign testing = (phase == ST_PIN);
  assign done    = (phase == ST_END);

  // Exactly one pin may float while a pin is under test.
  a_one_released : assert property (@(posedge clk) disable iff (rst)
    testing |-> $onehot(pin_release));

endmodule
