// tb_pin_test_fsm: checks the pin-selection Moore machine.
//
// Runs the default four-pin machine with adv tied high (one state per
// clock) and compares state_out and pin_release each cycle with the
// expected sequence START 0000 -> 0001 -> 0010 -> 0100 -> 1000 -> END 1111,
// where only the pin under test is released and START/END release all
// pins. Then checks that the machine waits in START while en is low, holds
// its state while adv is low (random stalls), stays in END, and that reset
// returns it to START. A second instance with NPINS = 6 checks the
// parameterised sequence.
module tb_pin_test_fsm;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b0;
  logic adv = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic [3:0] st4, rel4;
  logic [2:0] idx4;
  logic       tst4, dn4;
  logic [5:0] st6, rel6;
  logic [2:0] idx6;
  logic       tst6, dn6;

  pin_test_fsm u4 (.clk(clk), .rst(rst), .en(en), .adv(adv), .state_out(st4),
                   .pin_release(rel4), .pin_idx(idx4), .testing(tst4), .done(dn4));
  pin_test_fsm #(.NPINS(6)) u6 (.clk(clk), .rst(rst), .en(en), .adv(adv), .state_out(st6),
                   .pin_release(rel6), .pin_idx(idx6), .testing(tst6), .done(dn6));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Expected Moore outputs for step s of an n-pin run:
  // s = 0 START, 1..n pin s-1, n+1 END.
  task automatic expect4(input int s);
    logic [3:0] es, er;
    es = (s == 0) ? 4'b0000 : (s == 5) ? 4'b1111 : 4'(1 << (s - 1));
    er = (s == 0 || s == 5) ? 4'b1111 : es;
    check(st4 == es, $sformatf("4-pin step %0d state_out %b exp %b", s, st4, es));
    check(rel4 == er, $sformatf("4-pin step %0d release %b exp %b", s, rel4, er));
    check(tst4 == (s >= 1 && s <= 4), $sformatf("4-pin step %0d testing", s));
    check(dn4 == (s == 5), $sformatf("4-pin step %0d done", s));
    if (s >= 1 && s <= 4) check(idx4 == 3'(s - 1), $sformatf("4-pin step %0d idx %0d", s, idx4));
  endtask

  task automatic expect6(input int s);
    logic [5:0] es;
    es = (s == 0) ? 6'b0 : (s == 7) ? 6'b111111 : 6'(1 << (s - 1));
    check(st6 == es, $sformatf("6-pin step %0d state_out %b exp %b", s, st6, es));
    check(rel6 == ((s == 0 || s == 7) ? 6'b111111 : es), $sformatf("6-pin step %0d release", s));
  endtask

  initial begin
    int s4, s6;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // en low: stay in START even with adv high
    adv = 1'b1;
    repeat (3) begin
      @(posedge clk); #1;
      expect4(0); expect6(0);
    end
    // run with adv tied high: one state per clock
    en = 1'b1;
    for (int s = 1; s <= 8; s++) begin
      @(posedge clk); #1;
      expect4(s > 5 ? 5 : s);
      expect6(s > 7 ? 7 : s);
    end
    // reset back to START
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    expect4(0); expect6(0);
    // random stalls: state moves only when adv was high
    s4 = 0; s6 = 0;
    for (int c = 0; c < 60; c++) begin
      adv = ($urandom % 3) == 0;
      @(posedge clk); #1;
      if (adv) begin
        if (s4 < 5) s4++;
        if (s6 < 7) s6++;
      end
      expect4(s4); expect6(s6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
