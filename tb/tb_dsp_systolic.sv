// tb_dsp_systolic -- checks the DSP slice: result a0*b0 + a1*b1 + chainin, with
// the data operands taking 4 cycles and the cascade input 2 cycles to reach
// chainout. Random operands, including the extreme 18-bit values.
module tb_dsp_systolic;
  import cnn_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  data_t a0, a1;
  coef_t b0, b1;
  acc_t  cin, cout;
  int checks = 0, failures = 0;

  dsp_systolic dut (.clk, .a0, .b0, .a1, .b1, .chainin(cin), .chainout(cout));

  longint prod_h [int];
  longint chain_h [int];

  function automatic int r18();
    int v;
    case ($urandom_range(0, 9))
      0: v = -131072;
      1: v = 131071;
      default: v = int'($urandom_range(0, 262143)) - 131072;
    endcase
    return v;
  endfunction

  initial begin
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      a0 = data_t'(r18()); a1 = data_t'(r18());
      b0 = coef_t'(r18()); b1 = coef_t'(r18());
      cin = acc_t'(longint'(r18()) * 4096);
      prod_h[n]  = longint'(a0) * longint'(b0) + longint'(a1) * longint'(b1);
      chain_h[n] = longint'(cin);
      if (n >= 6) begin
        checks++;
        if (longint'(cout) != prod_h[n-4] + chain_h[n-2]) begin
          failures++;
          if (failures < 5) $display("mismatch at %0d: got %0d want %0d", n, cout, prod_h[n-4] + chain_h[n-2]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
