// dsp_systolic -- one dual-multiplier DSP slice in systolic FIR (multiply-add
// cascade) mode.
//
// The slice multiplies two pairs of operands, adds the two products and adds the
// value arriving on the cascade input `chainin`. The result leaves on
// `chainout`, which feeds `chainin` of the next slice in a chain, so a chain of
// slices sums all its products with no adder outside the DSPs.
//
// Timing (all outputs registered):
//   data inputs  -> two input register stages -> product register -> result:
//                   a value presented in cycle c shows on chainout in cycle c+4;
//   chainin      -> cascade register -> result:
//                   a value presented in cycle c shows on chainout in cycle c+2.
// So consecutive slices of a chain are two cycles apart, and a slice needs its
// operands two cycles before the partial sum of the slice before it arrives.
//
// The split of the slice into two multipliers with a shared adder, the cascade
// port and the two-cycle spacing follow the reference design, which uses the
// vendor's DSP block for this; here the same behaviour is written as inferable
// logic. No register is reset: the slice is pure datapath and its contents are
// flushed by the stream itself.
module dsp_systolic
  import cnn_pkg::*;
#(
  parameter int A_W   = DATA_W,
  parameter int B_W   = COEF_W,
  parameter int OUT_W = ACC_W
) (
  input  logic                    clk,
  input  logic signed [A_W-1:0]   a0,       // operand pair 0: sample
  input  logic signed [B_W-1:0]   b0,       // operand pair 0: coefficient
  input  logic signed [A_W-1:0]   a1,       // operand pair 1: sample
  input  logic signed [B_W-1:0]   b1,       // operand pair 1: coefficient
  input  logic signed [OUT_W-1:0] chainin,  // partial sum from the previous slice
  output logic signed [OUT_W-1:0] chainout  // a0*b0 + a1*b1 + chainin
);

  logic signed [A_W-1:0]   a0_q [2];
  logic signed [A_W-1:0]   a1_q [2];
  logic signed [B_W-1:0]   b0_q [2];
  logic signed [B_W-1:0]   b1_q [2];
  logic signed [OUT_W-1:0] prod_q;
  logic signed [OUT_W-1:0] chain_q;

  always_ff @(posedge clk) begin
    a0_q[0] <= a0;
    a1_q[0] <= a1;
    b0_q[0] <= b0;
    b1_q[0] <= b1;
    a0_q[1] <= a0_q[0];
    a1_q[1] <= a1_q[0];
    b0_q[1] <= b0_q[0];
    b1_q[1] <= b1_q[0];
    prod_q  <= OUT_W'(a0_q[1] * b0_q[1]) + OUT_W'(a1_q[1] * b1_q[1]);
    chain_q <= chainin;
    chainout <= prod_q + chain_q;
  end

endmodule
