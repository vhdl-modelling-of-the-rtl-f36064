// ost_pkg: types and constants shared by the open/short tester.
//
// The open/short test checks the two ESD clamp diodes behind every I/O pin
// of a packaged IC. For each pin an external precision measurement unit
// (PMU) forces about +100 uA (upper diode) or -100 uA (lower diode) and
// compares the pin voltage with two limits: |V| > 1.5 V means the pin is
// open, |V| < 0.2 V means it is shorted. Those two comparisons reach the
// FPGA as a 2-bit result per pin, encoded by result_t below. The bit
// assignment of the result is this design's choice; the four outcomes and
// their display texts follow the original tester.
//
// The 7-segment constants are active low, bit order {dp,a,b,c,d,e,f,g},
// which reproduces the published display codes (for example "P" = 8'h98,
// "1" = 8'hCF).
package ost_pkg;

  // Per-pin result from the two PMU limit comparators.
  //   bit 1 : voltage magnitude above the 0.2 V short limit (not shorted)
  //   bit 0 : voltage magnitude below the 1.5 V open limit  (not open)
  typedef enum logic [1:0] {
    RES_UNDEF = 2'b00,  // both limits failed: impossible for a real pin
    RES_SHORT = 2'b01,  // below 0.2 V
    RES_OPEN  = 2'b10,  // above 1.5 V
    RES_PASS  = 2'b11   // inside the 0.2 V .. 1.5 V window
  } result_t;

  // What the dual-digit display is asked to show.
  typedef enum logic [1:0] {
    DSP_START  = 2'd0,  // tester idle / about to start
    DSP_PIN    = 2'd1,  // "P<n>": pin n is being measured
    DSP_RESULT = 2'd2,  // result of pin n
    DSP_END    = 2'd3   // test sequence finished
  } disp_phase_t;

  typedef logic [7:0] seg_t;

  // Segment codes, active low, {dp,a,b,c,d,e,f,g}.
  localparam seg_t SEG_ALL   = 8'h00;  // every segment and the dot lit
  localparam seg_t SEG_BLANK = 8'hFF;
  localparam seg_t SEG_P     = 8'h98;
  localparam seg_t SEG_F     = 8'hB8;
  localparam seg_t SEG_S     = 8'hA4;  // also the digit 5
  localparam seg_t SEG_O     = 8'h81;  // also the digit 0

  // Decimal digit to segment code, same polarity and bit order.
  function automatic seg_t seg_digit(input logic [3:0] d);
    case (d)
      4'd0:    return 8'h81;
      4'd1:    return 8'hCF;
      4'd2:    return 8'h92;
      4'd3:    return 8'h86;
      4'd4:    return 8'hCC;
      4'd5:    return 8'hA4;
      4'd6:    return 8'hA0;
      4'd7:    return 8'h8F;
      4'd8:    return 8'h80;
      4'd9:    return 8'h84;
      default: return SEG_BLANK;
    endcase
  endfunction

endpackage
