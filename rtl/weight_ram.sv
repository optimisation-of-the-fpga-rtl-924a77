// weight_ram -- single-clock RAM holding the network coefficients.
//
// The slow-control side writes one coefficient per cycle through the write
// port; the coefficient loader reads them back in address order with a
// registered read (data appear one cycle after `rd_en`). Keeping the weights
// in on-chip RAM so that they can be changed without rebuilding the firmware
// follows the reference design; the port arrangement is this design's choice.
// The contents are not reset.
module weight_ram
  import cnn_pkg::*;
#(
  parameter int ADDR_W = 7
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  coef_t             wr_data,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output coef_t             rd_data
);

  coef_t mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
