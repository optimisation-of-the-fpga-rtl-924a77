// tb_net_body.svh -- body shared by tb_net_check and tb_cnn_energy_full: the
// stimulus sequence and checks described in tb_net_check. Expects the DUT
// signals, the parameters T_NL .. E_FMS, SIG_ACT, EXP_LAT, T and NAME, and the
// outputs checks, failures and done to be declared by the including module.

  int tks[], tds[], tfms[], eks[], eds[], efms[];
  int x[];
  int cA[], cB[];
  int eA[], tA[], eB[], tB[];
  bit vld[];
  int nc;

  // mechanism counters
  int n_loads = 0, n_held = 0, n_invalid = 0, n_relu = 0, n_sat = 0, n_compared = 0;

  function automatic int count_coefs();
    int s = 0, cin = 1;
    for (int l = 0; l < T_NL; l++) begin s += T_FMS[l] * (1 + cin * T_KS[l]); cin = T_FMS[l]; end
    cin = 2;
    for (int l = 0; l < E_NL; l++) begin s += E_FMS[l] * (1 + cin * E_KS[l]); cin = E_FMS[l]; end
    return s;
  endfunction

  function automatic int pulse(input int t);
    // unipolar-then-undershoot shape sampled every bunch crossing
    int shape [12] = '{0, 350, 900, 1000, 800, 520, 260, 60, -80, -140, -110, -50};
    return (t >= 0 && t < 12) ? shape[t] : 0;
  endfunction

  task automatic write_ram(input int c[]);
    // RAM address a holds chain position nc-1-a
    for (int a = 0; a < nc; a++) begin
      cfg_wr_en   = 1;
      cfg_wr_addr = AW'(a);
      cfg_wr_data = coef_t'(c[nc - 1 - a]);
      @(negedge clk);
    end
    cfg_wr_en = 0;
  endtask

  int n;           // stream index of the sample applied in the current cycle
  bit use_b;
  logic was_loading = 0, was_loading2 = 0;

  task automatic step();
    // check outputs of this cycle, then apply the next sample
    int t;
    data_t e_prev;
    t = n - EXP_LAT;
    if (t >= 0) begin
      checks++;
      if (out_valid && !vld[t]) begin
        failures++;
        $display("%s: out_valid for invalid sample %0d", NAME, t);
      end
      if (out_valid) begin
        n_compared++;
        checks += 2;
        if (int'(energy) != (use_b ? eB[t] : eA[t]) || int'(trigger) != (use_b ? tB[t] : tA[t])) begin
          failures++;
          if (failures < 6)
            $display("%s: sample %0d energy %0d (want %0d) trigger %0d (want %0d)", NAME, t,
                     energy, use_b ? eB[t] : eA[t], trigger, use_b ? tB[t] : tA[t]);
        end
      end else if (calc_mode && dut.u_ctrl.settled) begin
        checks++;
        if (vld[t]) begin
          failures++;
          $display("%s: out_valid low for valid sample %0d", NAME, t);
        end else n_invalid++;
      end
    end
    was_loading2 = was_loading;
    was_loading = loading;
    e_prev = energy;
    adc = (n < T) ? data_t'(x[n]) : '0;
    adc_valid = (n < T) ? vld[n] : 1'b0;
    @(negedge clk);
    // the enable reaches the layers one cycle after the mode changes, so the
    // outputs are frozen from the third loading cycle on
    if (loading && was_loading && was_loading2) begin
      checks++;
      n_held++;
      if (energy != e_prev) begin
        failures++;
        $display("%s: energy changed while loading at sample %0d", NAME, n);
      end
    end
    n++;
  endtask

  initial begin
    int na, sa, nb, sb;
    checks = 0; failures = 0; done = 0;
    tks = new[T_NL]; tds = new[T_NL]; tfms = new[T_NL];
    eks = new[E_NL]; eds = new[E_NL]; efms = new[E_NL];
    for (int l = 0; l < T_NL; l++) begin tks[l] = T_KS[l]; tds[l] = T_DS[l]; tfms[l] = T_FMS[l]; end
    for (int l = 0; l < E_NL; l++) begin eks[l] = E_KS[l]; eds[l] = E_DS[l]; efms[l] = E_FMS[l]; end
    nc = count_coefs();
    cA = new[nc]; cB = new[nc];
    for (int i = 0; i < nc; i++) begin
      cA[i] = int'($urandom_range(0, 1600)) - 800;
      // set B has larger weights so that the sigmoid saturates
      cB[i] = int'($urandom_range(0, 8000)) - 4000;
    end
    x = new[T]; vld = new[T];
    for (int t = 0; t < T; t++) begin
      x[t] = int'($urandom_range(0, 240)) - 120;
      for (int p = 0; p <= t; p += 45)
        if (t - p < 12) x[t] += (pulse(t - p) * (1 + ((p / 45) * 7) % 5)) / 2;
      vld[t] = (t % 61) != 17;
    end
    net_ref(T_NL, tks, tds, tfms, int'(SIG_ACT), E_NL, eks, eds, efms, T, x, cA, eA, tA, na, sa);
    net_ref(T_NL, tks, tds, tfms, int'(SIG_ACT), E_NL, eks, eds, efms, T, x, cB, eB, tB, nb, sb);
    n_relu = na + nb;
    n_sat  = sa + sb;

    rst = 1; adc = '0; adc_valid = 0; cfg_wr_en = 0; cfg_wr_addr = '0; cfg_wr_data = '0;
    load_start = 0; use_b = 0; n = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    write_ram(cA);
    // start the stream, then load set A
    repeat (5) step();
    load_start = 1;
    step();
    load_start = 0;
    n_loads++;
    while (n < T / 2) step();
    // write set B while running, then reload
    for (int a = 0; a < nc; a++) begin
      cfg_wr_en = 1; cfg_wr_addr = AW'(a); cfg_wr_data = coef_t'(cB[nc - 1 - a]);
      step();
    end
    cfg_wr_en = 0;
    load_start = 1;
    step();
    load_start = 0;
    use_b = 1;
    n_loads++;
    while (n < T + EXP_LAT) step();

    // mechanisms that must have happened
    checks += 6;
    if (n_loads < 2)       begin failures++; $display("%s: reload not exercised", NAME); end
    if (n_held == 0)       begin failures++; $display("%s: output hold not exercised", NAME); end
    if (n_invalid == 0)    begin failures++; $display("%s: invalid samples not exercised", NAME); end
    if (n_relu == 0)       begin failures++; $display("%s: ReLU clipping not exercised", NAME); end
    if (n_sat == 0)        begin failures++; $display("%s: sigmoid saturation not exercised", NAME); end
    if (n_compared < T / 2) begin failures++; $display("%s: too few outputs compared", NAME); end
    $display("%s: latency %0d, coefficients %0d, loads %0d, held %0d, invalid %0d, relu-clipped sums %0d, saturated trigger outputs %0d, outputs compared %0d",
             NAME, EXP_LAT, nc, n_loads, n_held, n_invalid, n_relu, n_sat, n_compared);
    done = 1;
  end
