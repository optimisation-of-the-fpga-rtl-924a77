// tb_weight_ram -- writes random coefficients to every address, reads them
// back in random order with the one-cycle registered read, and checks that the
// read register holds while rd_en is low.
module tb_weight_ram;
  import cnn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int AW = 7;
  logic          wr_en, rd_en;
  logic [AW-1:0] wr_addr, rd_addr;
  coef_t         wr_data, rd_data;
  coef_t         model [2**AW];
  int checks = 0, failures = 0;

  weight_ram #(.ADDR_W(AW)) dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data);

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = coef_t'($urandom); model[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    for (int i = 0; i < 500; i++) begin
      coef_t held;
      rd_en = 1; rd_addr = AW'($urandom);
      @(negedge clk);
      checks++;
      if (rd_data != model[rd_addr]) failures++;
      // overwrite the word just read and move the address while rd_en is low:
      // the read register must still hold the earlier word
      held = rd_data;
      rd_en = 0; rd_addr = rd_addr + 1'b1; wr_en = 1; wr_addr = rd_addr; wr_data = ~held;
      model[wr_addr] = wr_data;
      @(negedge clk);
      wr_en = 0;
      checks++;
      if (rd_data != held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
