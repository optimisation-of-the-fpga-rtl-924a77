// tb_cnn_energy_full -- the energy-reconstruction network exactly as built by
// default (the four-layer 4-Conv network, sigmoid table, 7-bit coefficient
// RAM), taken through a complete operation: coefficients written and loaded,
// a pulse sequence streamed, coefficients rewritten and reloaded in
// calculation mode, and every output compared with the reference network at
// the 58-cycle latency. The sequence and checks are those of tb_net_check.
module tb_cnn_energy_full;
  import cnn_pkg::*;
  import tb_cnn_ref::*;

  logic clk = 0;
  always #5 clk = ~clk;

  // the defaults of cnn_energy_top, restated for the reference model
  localparam int    T_NL         = 2;
  localparam int    T_KS  [MAXL] = '{0: 3, 1: 6, default: 1};
  localparam int    T_DS  [MAXL] = '{default: 1};
  localparam int    T_FMS [MAXL] = '{0: 5, 1: 1, default: 1};
  localparam act_e  SIG_ACT      = ACT_SIGMOID_LUT;
  localparam int    E_NL         = 2;
  localparam int    E_KS  [MAXL] = '{0: 4, 1: 3, default: 1};
  localparam int    E_DS  [MAXL] = '{default: 1};
  localparam int    E_FMS [MAXL] = '{0: 3, 1: 1, default: 1};
  localparam int    EXP_LAT      = 58;
  localparam int    T            = 2000;
  localparam string NAME         = "4-Conv default";
  localparam int    AW           = 7;

  logic          rst, adc_valid, cfg_wr_en, load_start;
  logic [AW-1:0] cfg_wr_addr;
  coef_t         cfg_wr_data;
  data_t         adc, energy, trigger;
  logic          out_valid, loading, calc_mode;
  int            checks, failures;
  logic          done;

  cnn_energy_top dut (.*);

  `include "tb_net_body.svh"

  initial begin
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
