// tb_net_check -- end-to-end stimulus and checker for one configuration of
// cnn_energy_top, used by tb_cnn_energy_top.
//
// The sequence: reset; write coefficient set A into the RAM through the
// slow-control port; start a load while the ADC stream is already running;
// run; write set B and reload in calculation mode; run again. The ADC stream is
// a noisy baseline with a pulse of random height every 45 samples, and
// adc_valid is dropped for one sample now and then. Every output is checked:
//   * while out_valid is high, energy and trigger must equal the reference
//     network (tb_cnn_ref::net_ref) for the sample that entered EXP_LAT
//     cycles earlier, with the coefficient set loaded last;
//   * out_valid must be low exactly when the sample EXP_LAT cycles earlier
//     was not valid, or while loading or warming up;
//   * while loading, energy must not change (enable gates the outputs).
// It also counts the mechanisms exercised (loads, held outputs, invalid
// samples, ReLU clipping, sigmoid saturation) and fails if one never occurs.
module tb_net_check
  import cnn_pkg::*;
  import tb_cnn_ref::*;
#(
  parameter int   T_NL         = 2,
  parameter int   T_KS  [MAXL] = '{0: 3, 1: 6, default: 1},
  parameter int   T_DS  [MAXL] = '{default: 1},
  parameter int   T_FMS [MAXL] = '{0: 5, 1: 1, default: 1},
  parameter act_e SIG_ACT      = ACT_SIGMOID_LUT,
  parameter int   E_NL         = 2,
  parameter int   E_KS  [MAXL] = '{0: 4, 1: 3, default: 1},
  parameter int   E_DS  [MAXL] = '{default: 1},
  parameter int   E_FMS [MAXL] = '{0: 3, 1: 1, default: 1},
  parameter int   EXP_LAT      = 58,
  parameter int   T            = 1200,
  parameter string NAME        = "4-Conv"
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int AW = 7;

  logic          rst, adc_valid, cfg_wr_en, load_start;
  logic [AW-1:0] cfg_wr_addr;
  coef_t         cfg_wr_data;
  data_t         adc, energy, trigger;
  logic          out_valid, loading, calc_mode;

  cnn_energy_top #(
    .T_NL(T_NL), .T_KS(T_KS), .T_DS(T_DS), .T_FMS(T_FMS), .SIG_ACT(SIG_ACT),
    .E_NL(E_NL), .E_KS(E_KS), .E_DS(E_DS), .E_FMS(E_FMS), .ADDR_W(AW)
  ) dut (.*);

  `include "tb_net_body.svh"

endmodule
