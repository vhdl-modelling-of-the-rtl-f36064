// seg_display: dual-digit 7-segment driver for the tester's status.
//
// The display tells the operator where the test is and how each pin did:
//   phase       digit1 digit2  shown as
//   DSP_START   00     00      all segments lit ("8.8.")
//   DSP_PIN     98     <n>     "P" and the pin number (P1 = 98 CF)
//   DSP_RESULT  98     A4      "PS"  pass
//               B8     81      "FO"  fail open
//               B8     A4      "FS"  fail short
//               B8     B8      "FF"  undefined (both limits failed)
//   DSP_END     FF     FF      blank
// Codes are active low, bit order {dp,a,b,c,d,e,f,g}; every value in the
// table is the one the original tester uses. Pin numbers 1..4 use its
// codes; 5..9 extend the same digit font (this design's choice, for
// builds with more pins), anything else is blank.
//
// The outputs are registered: they change one clk edge after the inputs.
// Reset shows START.
module seg_display
  import ost_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  disp_phase_t phase,
  input  logic [3:0]  pin_num,   // 1-based number of the pin shown
  input  result_t     result,    // stored result of that pin
  output seg_t        digit1,
  output seg_t        digit2
);

  seg_t d1_n, d2_n;

  always_comb begin
    d1_n = SEG_ALL;
    d2_n = SEG_ALL;
    unique case (phase)
      DSP_START: begin
        d1_n = SEG_ALL;
        d2_n = SEG_ALL;
      end
      DSP_PIN: begin
        d1_n = SEG_P;
        d2_n = (pin_num >= 4'd1 && pin_num <= 4'd9) ? seg_digit(pin_num) : SEG_BLANK;
      end
      DSP_RESULT: begin
        unique case (result)
          RES_PASS:  begin d1_n = SEG_P; d2_n = SEG_S; end
          RES_OPEN:  begin d1_n = SEG_F; d2_n = SEG_O; end
          RES_SHORT: begin d1_n = SEG_F; d2_n = SEG_S; end
          RES_UNDEF: begin d1_n = SEG_F; d2_n = SEG_F; end
          default:   begin d1_n = SEG_F; d2_n = SEG_F; end
        endcase
      end
      DSP_END: begin
        d1_n = SEG_BLANK;
        d2_n = SEG_BLANK;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      digit1 <= SEG_ALL;
      digit2 <= SEG_ALL;
    end else begin
      digit1 <= d1_n;
      digit2 <= d2_n;
    end
  end

endmodule
