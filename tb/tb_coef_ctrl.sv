// tb_coef_ctrl -- checks the mode machine: nothing happens before `start`;
// a load reads addresses 0..NCOEF-1 on consecutive cycles with `coef_shift`
// following each read by one cycle and `loading` high throughout; calculation
// mode follows directly; `settled` rises exactly WARMUP cycles later; a
// second `start` in calculation mode reloads.
module tb_coef_ctrl;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NC = 11, AW = 4, WU = 6;
  logic rst, start, rd_en, coef_shift, loading, calc_en, settled;
  logic [AW-1:0] rd_addr;
  int checks = 0, failures = 0;

  coef_ctrl #(.NCOEF(NC), .ADDR_W(AW), .WARMUP(WU)) dut (
    .clk, .rst, .start, .rd_en, .rd_addr, .coef_shift, .loading, .calc_en, .settled
  );

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("fail: %s at %0t", what, $time);
    end
  endtask

  task automatic do_load();
    int reads, shifts, cyc;
    logic prev_rd;
    start = 1;
    @(negedge clk);
    start = 0;
    reads = 0; shifts = 0; cyc = 0; prev_rd = 0;
    while (!calc_en && cyc < 100) begin
      chk(loading, "loading high during load");
      chk(coef_shift == prev_rd, "shift follows read by one cycle");
      if (rd_en) begin
        chk(int'(rd_addr) == reads, "addresses in order");
        reads++;
      end
      if (coef_shift) shifts++;
      prev_rd = rd_en;
      @(negedge clk);
      cyc++;
    end
    if (coef_shift) shifts++;
    chk(reads == NC, "NCOEF reads");
    chk(shifts == NC, "NCOEF shifts");
    chk(cyc == NC + 1, "load takes NCOEF+1 cycles");
    for (int i = 0; i < WU; i++) begin
      chk(!settled && calc_en && !loading, "warm-up");
      @(negedge clk);
    end
    chk(settled && calc_en, "settled after WARMUP");
  endtask

  initial begin
    rst = 1; start = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (5) begin
      @(negedge clk);
      chk(!loading && !calc_en && !rd_en && !coef_shift, "idle after reset");
    end
    do_load();
    repeat (10) @(negedge clk);
    chk(calc_en && settled, "stays in calculation mode");
    do_load();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
