// cnn_energy_top -- real-time energy reconstruction for one calorimeter
// readout channel: a trigger sub-network and an energy sub-network of causal
// 1-D convolutional layers, with the coefficient RAM and the mode controller.
//
// Data flow. One ADC sample enters on `adc` every clock cycle. The trigger
// sub-network (default: 5 feature maps with kernel 3, then 1 feature map with
// kernel 6, sigmoid activations) estimates for every bunch crossing how likely
// a hit above the noise threshold is. The ADC stream is delayed by the trigger
// latency and concatenated with the trigger output as the two input channels
// (channel 0 = ADC, channel 1 = trigger) of the energy sub-network (default:
// 3 feature maps with kernel 4, then 1 with kernel 3, ReLU activations), whose
// output is the reconstructed energy. With the defaults (the four-layer
// "4-Conv" network) `energy` for a sample appears 58 cycles after it entered;
// `trigger` is delayed to belong to the same bunch crossing. Setting E_NL = 1,
// E_KS = '{0: 21, default: 1}, E_FMS = '{default: 1} gives the three-layer "3-Conv" network (62
// cycles). Numbers are signed 18-bit with 10 fractional bits.
//
// Coefficients. The slow-control side writes all NCOEF coefficients into the
// weight RAM (`cfg_*`); a pulse on `load_start` makes the controller stream
// them into the coefficient shift chain that runs through every feature map,
// trigger layers first. RAM word 0 ends in the deepest register: RAM address
// a holds chain position NCOEF-1-a, counted from the chain input. While loading,
// the feature-map output registers hold their values (`loading` high); after
// loading the network runs (`calc_mode` high). `out_valid` marks outputs of
// valid ADC samples once the pipelines hold only results computed with the new
// coefficients.
//
// Reset and enable are each registered once before they reach the layers and
// only act on the output registers and sample-buffer inputs, as in the
// reference design. The layer structure, the concatenation through a delay
// chain and the latencies follow the reference design; port names, the load
// protocol and the valid logic are this design's own.
module cnn_energy_top
  import cnn_pkg::*;
#(
  parameter int   T_NL        = 2,
  parameter int   T_KS  [MAXL] = '{0: 3, 1: 6, default: 1},
  parameter int   T_DS  [MAXL] = '{default: 1},
  parameter int   T_FMS [MAXL] = '{0: 5, 1: 1, default: 1},
  parameter act_e SIG_ACT     = ACT_SIGMOID_LUT,
  parameter int   E_NL        = 2,
  parameter int   E_KS  [MAXL] = '{0: 4, 1: 3, default: 1},
  parameter int   E_DS  [MAXL] = '{default: 1},
  parameter int   E_FMS [MAXL] = '{0: 3, 1: 1, default: 1},
  parameter int   ADDR_W      = 7
) (
  input  logic              clk,
  input  logic              rst,
  // ADC sample stream
  input  data_t             adc,
  input  logic              adc_valid,
  // slow-control access to the coefficient RAM
  input  logic              cfg_wr_en,
  input  logic [ADDR_W-1:0] cfg_wr_addr,
  input  coef_t             cfg_wr_data,
  input  logic              load_start,
  // results
  output data_t             energy,
  output data_t             trigger,
  output logic              out_valid,
  output logic              loading,
  output logic              calc_mode
);

  // ---------------- derived sizes ----------------
  function automatic int t_lat();
    int s = 0;
    for (int l = 0; l < T_NL; l++) s += layer_latency(T_KS[l], T_DS[l]);
    return s;
  endfunction
  function automatic int e_lat();
    int s = 0;
    for (int l = 0; l < E_NL; l++) s += layer_latency(E_KS[l], E_DS[l]);
    return s;
  endfunction
  function automatic int n_coef();
    int s = 0;
    int cin = 1;
    for (int l = 0; l < T_NL; l++) begin
      s += T_FMS[l] * (1 + cin * T_KS[l]);
      cin = T_FMS[l];
    end
    cin = 2;
    for (int l = 0; l < E_NL; l++) begin
      s += E_FMS[l] * (1 + cin * E_KS[l]);
      cin = E_FMS[l];
    end
    return s;
  endfunction
  function automatic int rec_field();
    int s = 0;
    for (int l = 0; l < T_NL; l++) s += T_DS[l] * (T_KS[l] - 1);
    for (int l = 0; l < E_NL; l++) s += E_DS[l] * (E_KS[l] - 1);
    return s;
  endfunction

  localparam int T_LAT   = t_lat();
  localparam int E_LAT   = e_lat();
  localparam int NET_LAT = T_LAT + E_LAT;
  localparam int NCOEF   = n_coef();
  localparam int WARMUP  = NET_LAT + rec_field();
  localparam int MAXC    = 16;

  if (NCOEF > 2**ADDR_W) begin : g_bad_ram
    $error("cnn_energy_top: coefficient RAM too small");
  end
  if (T_FMS[T_NL-1] != 1 || E_FMS[E_NL-1] != 1) begin : g_bad_out
    $error("cnn_energy_top: both sub-networks must end in one feature map");
  end

  // ---------------- control ----------------
  logic              rst_q, en_q;
  logic              rd_en, coef_shift, calc_en, settled;
  logic [ADDR_W-1:0] rd_addr;
  coef_t             rd_data;

  weight_ram #(.ADDR_W(ADDR_W)) u_ram (
    .clk,
    .wr_en  (cfg_wr_en),
    .wr_addr(cfg_wr_addr),
    .wr_data(cfg_wr_data),
    .rd_en,
    .rd_addr,
    .rd_data
  );

  coef_ctrl #(.NCOEF(NCOEF), .ADDR_W(ADDR_W), .WARMUP(WARMUP)) u_ctrl (
    .clk, .rst,
    .start     (load_start),
    .rd_en, .rd_addr, .coef_shift,
    .loading,
    .calc_en,
    .settled
  );

  always_ff @(posedge clk) begin
    rst_q <= rst;
    en_q  <= calc_en;
  end
  assign calc_mode = calc_en;

  // ---------------- trigger sub-network ----------------
  coef_t t_coef_out;
  data_t t_in  [1];
  data_t t_out [1];

  typedef act_e t_act_arr_t [MAXL];
  function automatic t_act_arr_t t_act_list();
    t_act_arr_t r;
    for (int l = 0; l < MAXL; l++) r[l] = SIG_ACT;
    return r;
  endfunction
  typedef act_e e_act_arr_t [MAXL];
  function automatic e_act_arr_t e_act_list();
    e_act_arr_t r;
    for (int l = 0; l < MAXL; l++) r[l] = ACT_RELU;
    return r;
  endfunction

  assign t_in[0] = adc;

  conv_stack #(
    .NL(T_NL), .CIN0(1), .MAXC(MAXC),
    .KS(T_KS), .DS(T_DS), .FMS(T_FMS), .ACTS(t_act_list())
  ) u_trigger (
    .clk, .rst(rst_q), .en(en_q),
    .din       (t_in),
    .coef_shift,
    .coef_in   (rd_data),
    .coef_out  (t_coef_out),
    .dout      (t_out)
  );

  // ---------------- concatenation ----------------
  data_t adc_d;
  delay_chain #(.W(DATA_W), .DELAY(T_LAT)) u_adc_delay (
    .clk, .din(adc), .dout(adc_d)
  );

  data_t e_in  [2];
  data_t e_out [1];
  coef_t e_coef_out;
  assign e_in[0] = adc_d;
  assign e_in[1] = t_out[0];

  // ---------------- energy sub-network ----------------
  conv_stack #(
    .NL(E_NL), .CIN0(2), .MAXC(MAXC),
    .KS(E_KS), .DS(E_DS), .FMS(E_FMS), .ACTS(e_act_list())
  ) u_energy (
    .clk, .rst(rst_q), .en(en_q),
    .din       (e_in),
    .coef_shift,
    .coef_in   (t_coef_out),
    .coef_out  (e_coef_out),
    .dout      (e_out)
  );

  assign energy = e_out[0];

  delay_chain #(.W(DATA_W), .DELAY(E_LAT)) u_trig_align (
    .clk, .din(t_out[0]), .dout(trigger)
  );

  logic valid_d;
  delay_chain #(.W(1), .DELAY(NET_LAT)) u_valid (
    .clk, .din(adc_valid), .dout(valid_d)
  );
  assign out_valid = valid_d && settled;

endmodule
