// result_store: register holding the open/short result of every pin.
//
// Each pin k has its own 2-bit result input meas[k] from the measurement
// hardware. At a clock edge where en_result is high and state_sel is the
// one-hot code of pin k, meas[k] is copied into store_result[2k+1:2k];
// the other fields keep their value. With four pins this is the 8-bit
// StoreResult register of the original tester: pin results 11, 01, 10, 11
// (pins 1..4) give 8'hE7. A state_sel that is not one-hot (START = 0,
// END = all ones) loads nothing. clear (synchronous) empties the register
// for a new test; rst does the same.
//
// Result field order and one-hot selection follow the original; the guard
// against non-one-hot codes and the clear input are this design's.
module result_store #(
  parameter int unsigned NPINS = 4
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   clear,
  input  logic                   en_result,
  input  logic [NPINS-1:0]       state_sel,
  input  logic [1:0]             meas [NPINS],
  output logic [2*NPINS-1:0]     store_result
);

  logic sel_onehot;

  // One bit set: nonzero and clearing the lowest set bit leaves zero.
  assign sel_onehot = (state_sel != '0) && ((state_sel & (state_sel - 1'b1)) == '0);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      store_result <= '0;
    end else if (en_result && sel_onehot) begin
      for (int k = 0; k < NPINS; k++) begin
        if (state_sel[k]) store_result[2*k +: 2] <= meas[k];
      end
    end
  end

endmodule
