// sample_buffer -- per-input-channel history of the samples a layer reads.
//
// Every clock cycle the buffer shifts by one place and takes the newest sample
// of each input channel, so element i of channel c holds the sample that arrived
// i+1 cycles before the current one: taps[c][0] is the newest registered sample.
// To support a dilation d with kernel size k the buffer holds d*(k-1)+1 samples,
// the depth the reference design gives; the feature maps pick the taps they need
// from it. Only the input register (element 0) is reset, as in the reference
// design, where reset was limited to the output and to the sample-buffer input.
module sample_buffer
  import cnn_pkg::*;
#(
  parameter int CIN   = 1,
  parameter int DEPTH = 3
) (
  input  logic  clk,
  input  logic  rst,
  input  data_t din  [CIN],
  output data_t taps [CIN][DEPTH]
);

  data_t sr [CIN][DEPTH];

  always_ff @(posedge clk) begin
    for (int c = 0; c < CIN; c++) begin
      if (rst) sr[c][0] <= '0;
      else     sr[c][0] <= din[c];
    end
  end

  if (DEPTH > 1) begin : g_shift
    always_ff @(posedge clk) begin
      for (int c = 0; c < CIN; c++)
        for (int i = 1; i < DEPTH; i++) sr[c][i] <= sr[c][i-1];
    end
  end

  assign taps = sr;

endmodule
