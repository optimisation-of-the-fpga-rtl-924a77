// delay_chain -- fixed-length register delay line for a bus.
//
// `dout` equals `din` delayed by DELAY clock cycles (DELAY = 0 is a plain wire).
// It is used to bring the results of the calculation paths of a feature map to
// the same clock cycle before they are summed, and to hold the ADC samples back
// until the trigger sub-network has produced its output for the same bunch
// crossing, so both can be concatenated as input of the energy layers. The
// reference design names these delay chains; a shift register with no reset is
// this design's choice of how to build them.
module delay_chain #(
  parameter int W     = 18,
  parameter int DELAY = 1
) (
  input  logic         clk,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (DELAY == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [W-1:0] sr [DELAY];
    always_ff @(posedge clk) begin
      sr[0] <= din;
      for (int i = 1; i < DELAY; i++) sr[i] <= sr[i-1];
    end
    assign dout = sr[DELAY-1];
  end

endmodule
