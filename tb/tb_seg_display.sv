// tb_seg_display: checks every display code against the published table.
//
// Expected values (active low, {dp,a,b,c,d,e,f,g}): START 00 00, P1..P4
// 98 CF / 98 92 / 98 86 / 98 CC, fail short B8 A4, fail open B8 81, pass
// 98 A4, undefined B8 B8, END FF FF. Also checks the one-cycle output
// register latency, the reset value, and the extended digits 5..9 and an
// out-of-range pin number (blank).
module tb_seg_display;
  import ost_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  disp_phase_t phase = DSP_START;
  logic [3:0]  pin_num = 4'd1;
  result_t     result = RES_PASS;
  seg_t        d1, d2;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  seg_display u_dut (.clk(clk), .rst(rst), .phase(phase), .pin_num(pin_num),
                     .result(result), .digit1(d1), .digit2(d2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Apply inputs, check the old value is held until the edge, then the new one.
  task automatic show(input disp_phase_t ph, input logic [3:0] pn, input result_t r,
                      input logic [7:0] e1, input logic [7:0] e2, input string name);
    logic [7:0] o1, o2;
    o1 = d1; o2 = d2;
    phase = ph; pin_num = pn; result = r;
    #1;
    check(d1 == o1 && d2 == o2, {name, ": outputs registered"});
    @(posedge clk); #1;
    check(d1 == e1 && d2 == e2, $sformatf("%s: %h %h exp %h %h", name, d1, d2, e1, e2));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    check(d1 == 8'h00 && d2 == 8'h00, "reset shows START");
    rst = 1'b0;
    show(DSP_START,  4'd1, RES_PASS,  8'h00, 8'h00, "START");
    show(DSP_PIN,    4'd1, RES_PASS,  8'h98, 8'hCF, "P1");
    show(DSP_RESULT, 4'd1, RES_OPEN,  8'hB8, 8'h81, "fail open");
    show(DSP_PIN,    4'd2, RES_OPEN,  8'h98, 8'h92, "P2");
    show(DSP_RESULT, 4'd2, RES_SHORT, 8'hB8, 8'hA4, "fail short");
    show(DSP_PIN,    4'd3, RES_SHORT, 8'h98, 8'h86, "P3");
    show(DSP_RESULT, 4'd3, RES_PASS,  8'h98, 8'hA4, "pass");
    show(DSP_PIN,    4'd4, RES_PASS,  8'h98, 8'hCC, "P4");
    show(DSP_RESULT, 4'd4, RES_UNDEF, 8'hB8, 8'hB8, "undefined");
    show(DSP_END,    4'd4, RES_UNDEF, 8'hFF, 8'hFF, "END");
    show(DSP_PIN,    4'd5, RES_PASS,  8'h98, 8'hA4, "P5");
    show(DSP_PIN,    4'd6, RES_PASS,  8'h98, 8'hA0, "P6");
    show(DSP_PIN,    4'd7, RES_PASS,  8'h98, 8'h8F, "P7");
    show(DSP_PIN,    4'd8, RES_PASS,  8'h98, 8'h80, "P8");
    show(DSP_PIN,    4'd9, RES_PASS,  8'h98, 8'h84, "P9");
    show(DSP_PIN,    4'd12, RES_PASS, 8'h98, 8'hFF, "P out of range");
    show(DSP_START,  4'd1, RES_PASS,  8'h00, 8'h00, "START again");
    rst = 1'b1;
    show(DSP_END,    4'd1, RES_PASS,  8'h00, 8'h00, "reset wins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
