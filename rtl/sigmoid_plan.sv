// sigmoid_plan -- sigmoid activation by piecewise linear approximation (PLAN).
//
// For |x| the sigmoid is replaced by four segments whose slopes are powers of
// two, so every multiplication becomes a shift:
//     |x| >= 5          f = 1
//     2.375 <= |x| < 5  f = |x|/32 + 0.84375
//     1 <= |x| < 2.375  f = |x|/8  + 0.625
//     0 <= |x| < 1      f = |x|/4  + 0.5
// and f(-x) = 1 - f(x) for negative inputs. The input is the accumulated neuron
// sum (2*DATA_FRAC fractional bits); it is truncated to DATA_FRAC fractional
// bits and the result is given in the stream format (DATA_FRAC fractional bits),
// i.e. the generalised-width form of the approximation rather than the original
// 8-bit one. The segment boundaries and offsets are those of the published PLAN
// scheme the reference design adopts. One register stage: the result appears
// one cycle after `acc`.
module sigmoid_plan
  import cnn_pkg::*;
(
  input  logic  clk,
  input  acc_t  acc,
  output data_t y
);

  localparam acc_t ONE = acc_t'(1) <<< PROD_FRAC;  // 1.0 at the sum's scale
  localparam int   F1  = 2**DATA_FRAC;             // 1.0 at the output scale

  acc_t  mag;       // |acc|
  data_t ax;        // |x| at DATA_FRAC fractional bits, valid below 5
  data_t f_pos;

  always_comb begin
    mag = acc[ACC_W-1] ? -acc : acc;
    ax  = data_t'(mag >>> DATA_FRAC);
    if (mag >= 5 * ONE)
      f_pos = data_t'(F1);
    else if (mag >= (19 * ONE) / 8)
      f_pos = (ax >>> 5) + data_t'((27 * F1) / 32);
    else if (mag >= ONE)
      f_pos = (ax >>> 3) + data_t'((5 * F1) / 8);
    else
      f_pos = (ax >>> 2) + data_t'(F1 / 2);
  end

  always_ff @(posedge clk) y <= acc[ACC_W-1] ? data_t'(F1) - f_pos : f_pos;

endmodule
