// lut4: one 4-input look-up table of the logic block.
//
// The output is the truth-table bit selected by the four inputs,
// o = tt[{in3,in2,in1,in0}]. Purely combinational; the 16-bit table comes
// from the configuration memory.
module lut4 (
  input  logic [15:0] tt,
  input  logic [3:0]  idx,
  output logic        o
);
  assign o = tt[idx];
endmodule
