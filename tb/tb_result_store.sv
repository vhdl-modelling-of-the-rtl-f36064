// tb_result_store: checks the per-pin result register.
//
// First the reference case of the original tester: with the FSM state
// walking 0001, 0010, 0100, 1000 and a load strobe in each state, pin
// results 11, 01, 10, 11 must build up 03, 07, 27 and finally 8'hE7; a
// following END code (1111) with the strobe must leave E7 unchanged. Then
// random states, strobes and results are checked against a reference
// model, including non-one-hot state codes (which load nothing) and
// clear.
module tb_result_store;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       clear = 1'b0;
  logic       en_result = 1'b0;
  logic [3:0] state_sel = '0;
  logic [1:0] meas [4];
  logic [7:0] store;
  logic [7:0] model;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  result_store u_dut (.clk(clk), .rst(rst), .clear(clear), .en_result(en_result),
                      .state_sel(state_sel), .meas(meas), .store_result(store));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic step(input logic [3:0] st, input logic en);
    state_sel = st;
    en_result = en;
    @(posedge clk); #1;
    en_result = 1'b0;
  endtask

  initial begin
    logic [7:0] exp_seq [4];
    exp_seq[0] = 8'h03; exp_seq[1] = 8'h07; exp_seq[2] = 8'h27; exp_seq[3] = 8'hE7;
    foreach (meas[k]) meas[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(store == 8'h00, "cleared after reset");
    meas[0] = 2'b11; meas[1] = 2'b01; meas[2] = 2'b10; meas[3] = 2'b11;
    step(4'b0000, 1'b1);
    check(store == 8'h00, "START code loads nothing");
    for (int k = 0; k < 4; k++) begin
      step(4'(1 << k), 1'b0);
      check(store == (k == 0 ? 8'h00 : exp_seq[k-1]), $sformatf("no load without strobe, pin %0d", k));
      step(4'(1 << k), 1'b1);
      check(store == exp_seq[k], $sformatf("after pin %0d: %h exp %h", k, store, exp_seq[k]));
    end
    meas[0] = 2'b00; meas[3] = 2'b00;
    step(4'b1111, 1'b1);
    check(store == 8'hE7, $sformatf("END code keeps E7, got %h", store));

    // random run against a model
    model = 8'hE7;
    for (int n = 0; n < 300; n++) begin
      logic [3:0] st;
      logic       en, clr;
      foreach (meas[k]) meas[k] = 2'($urandom);
      st  = ($urandom % 4 == 0) ? 4'($urandom) : 4'(1 << ($urandom % 4));
      en  = 1'($urandom);
      clr = ($urandom % 25) == 0;
      clear = clr;
      if (clr) model = '0;
      else if (en && $countones(st) == 1)
        for (int k = 0; k < 4; k++) if (st[k]) model[2*k +: 2] = meas[k];
      step(st, en);
      clear = 1'b0;
      check(store == model, $sformatf("random %0d: %h exp %h", n, store, model));
    end
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
