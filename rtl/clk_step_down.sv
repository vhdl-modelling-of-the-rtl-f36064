// clk_step_down: divide-by-2N clock for the tester.
//
// A counter runs from 0 to N-1 on the board oscillator and toggles the
// output clock each time it wraps, so the output period is 2N input
// periods: f_out = f_in / (2N). With the default N = 1258 the 25.175 MHz
// oscillator gives 25.175 MHz / 2516 = 10.006 kHz, the tester's ~10 kHz
// clock. The counter-and-toggle structure and N follow the original
// tester.
//
// clk_out is the square wave sent to the external test hardware. Logic in
// the FPGA does not use it as a clock; instead tick is a one-cycle enable
// in the clk domain, high in the first clk cycle in which clk_out is high
// (both are registered at the same edge), so
// that the rest of the design advances once per output period without a
// second clock domain (this is a choice of this design).
//
// Reset (synchronous, active high) clears the counter, clk_out and tick.
// clk_out first rises N clk edges after reset is released, together with
// tick.
module clk_step_down #(
  parameter int unsigned N = 1258   // half period of clk_out, in clk cycles
) (
  input  logic clk,
  input  logic rst,
  output logic clk_out,
  output logic tick
);

  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  logic [CW-1:0] cnt;
  logic          wrap;

  assign wrap = (cnt == CW'(N - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      clk_out <= 1'b0;
      tick    <= 1'b0;
    end else begin
      cnt     <= wrap ? '0 : cnt + 1'b1;
      if (wrap) clk_out <= ~clk_out;
      tick    <= wrap && !clk_out;
    end
  end

  initial begin
    assert (N >= 1) else $error("clk_step_down: N must be at least 1");
  end

endmodule
