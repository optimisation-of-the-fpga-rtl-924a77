// sigmoid_lut -- sigmoid activation as a look-up table.
//
// The accumulated neuron sum (ACC_W bits, 2*DATA_FRAC fractional bits) is
// reduced to a table address of AW bits with IN_FRAC fractional bits, clamped
// to the table range [-2^(AW-1-IN_FRAC), 2^(AW-1-IN_FRAC)), and the table entry
// round(2^DATA_FRAC / (1 + exp(-x))) is returned in the stream format.
// Truncation of the sum toward minus infinity is used when forming the address.
// The table is computed at elaboration time from this formula, so no data file
// is needed. One register stage: the result appears one cycle after `acc`.
//
// A full-width table is the reference design's fastest activation; the address
// width and input resolution (9 bits, 5 fractional bits, range -8..8) are this
// design's choice, since a table over all 44 bits of the sum is not practical.
module sigmoid_lut
  import cnn_pkg::*;
#(
  parameter int AW      = 9,
  parameter int IN_FRAC = 5
) (
  input  logic  clk,
  input  acc_t  acc,
  output data_t y
);

  typedef data_t lut_t [2**AW];

  function automatic lut_t gen_lut();
    lut_t r;
    for (int i = 0; i < 2**AW; i++) begin
      real x;
      x    = real'(i - 2**(AW-1)) / real'(2**IN_FRAC);
      r[i] = data_t'($rtoi(real'(2**DATA_FRAC) / (1.0 + $exp(-x)) + 0.5));
    end
    return r;
  endfunction

  localparam lut_t LUT = gen_lut();
  localparam int   SHIFT = PROD_FRAC - IN_FRAC;
  localparam acc_t MAXA = acc_t'(2**(AW-1) - 1);
  localparam acc_t MINA = -acc_t'(2**(AW-1));

  acc_t           scaled;
  logic [AW-1:0]  addr;

  always_comb begin
    scaled = acc >>> SHIFT;
    if (scaled > MAXA)      addr = AW'(MAXA + acc_t'(2**(AW-1)));
    else if (scaled < MINA) addr = '0;
    else                    addr = AW'(scaled + acc_t'(2**(AW-1)));
  end

  always_ff @(posedge clk) y <= LUT[addr];

endmodule
