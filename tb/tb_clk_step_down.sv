// tb_clk_step_down: checks the divide-by-2N clock at the default N = 1258
// (25.175 MHz -> 10.006 kHz) and at a small N = 3.
//
// For each instance the testbench counts clk cycles between successive
// rising edges of clk_out (expected 2N), the high time (expected N), the
// delay from reset to the first rising edge (expected N), and that tick
// is a single-cycle pulse in the first clk cycle of every high phase.
module tb_clk_step_down;

  localparam int unsigned NBIG   = 1258;
  localparam int unsigned NSMALL = 3;

  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0;
  int   failures = 0;

  always #20 clk = ~clk;   // period 40 units (~25 MHz)

  logic co_big, tk_big, co_small, tk_small;

  clk_step_down u_big (.clk(clk), .rst(rst), .clk_out(co_big), .tick(tk_big));
  clk_step_down #(.N(NSMALL)) u_small (.clk(clk), .rst(rst), .clk_out(co_small), .tick(tk_small));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Measure one instance: N, and the number of full periods to observe.
  task automatic measure(input int unsigned n, input int periods, input bit big);
    int unsigned cyc, last_rise, high_len;
    bit prev_co, co, tk;
    int rises;
    cyc = 0; last_rise = 0; high_len = 0; prev_co = 0; rises = 0;
    while (rises < periods) begin
      @(posedge clk);
      #1;
      cyc++;
      co = big ? co_big : co_small;
      tk = big ? tk_big : tk_small;
      // tick must be high exactly in the first cycle clk_out is high
      check(tk == (co && !prev_co), $sformatf("N=%0d tick at cycle %0d", n, cyc));
      if (co && !prev_co) begin
        if (rises == 0) check(cyc == n, $sformatf("N=%0d first rise at %0d", n, cyc));
        else            check(cyc - last_rise == 2 * n, $sformatf("N=%0d period %0d", n, cyc - last_rise));
        last_rise = cyc;
        rises++;
        high_len = 0;
      end
      if (co) high_len++;
      if (!co && prev_co) check(high_len == n, $sformatf("N=%0d high time %0d", n, high_len));
      prev_co = co;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    fork
      measure(NSMALL, 20, 1'b0);
      measure(NBIG, 4, 1'b1);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
