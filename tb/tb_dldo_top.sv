// tb_dldo_top: end-to-end test of the coarse-fine digital LDO at its
// default size (32-switch arrays, 1 nF, 50 MHz fine clock).
//
// Operating point: V_IN = 1.2 V, V_REF = 1.0 V, window V_REF +/- 15 mV.
// The load is resistive: a fixed 100 ohm resistor (10 mA at 1 V) and a
// second resistor of 11.1 ohm switched in parallel (100 mA in total), whose
// conductance ramps in or out over a 20 ns edge. Sequence:
//   1. power-on start-up from 0 V (coarse mode, then fine mode);
//   2. 10 mA -> 100 mA step, then 100 mA -> 10 mA step, auxiliary stage on;
//   3. the same steps with the auxiliary stage disabled.
// Checks:
//   - start-up from 0 V reaches fine mode within 200 ns;
//   - V_OUT settles inside the window after each event, with ripple below
//     half the window, in fine mode and with the auxiliary array empty;
//   - the fine array is at half scale whenever fine mode is re-entered;
//   - coarse tuning ends within 200 ns of a step (auxiliary stage on);
//   - no ringing: no overshoot episode after a light-to-heavy step, at most
//     one overshoot and one undershoot after a heavy-to-light step;
//   - the auxiliary stage reduces the undershoot;
//   - fine mode takes exactly one fine step per clk_slow cycle, one
//     comparison delay (210 ps) after the clock edge;
//   - at most one coarse step per self-clock cycle;
//   - after each auxiliary release (once start-up is over) I_OUT is within
//     two coarse steps of I_LOAD.
// Every mechanism (coarse up, coarse down by two, auxiliary up, auxiliary
// release, half reset, fine up/down, self clock, fine re-entry) is counted
// and must occur at least once.
module tb_dldo_top;
  timeunit 1ps; timeprecision 1ps;
  localparam int N = 32;
  localparam int T_SLOW = 20000;              // 50 MHz
  localparam real G1 = 1.0 / 100.0;           // light load conductance
  localparam real G2 = 1.0 / 11.111;          // switched extra conductance

  logic clk_slow = 1'b0, rst = 1'b0, aux_en = 1'b1;
  real v_in = 1.2, v_ref = 1.0, v_ref_h = 1.015, v_ref_l = 0.985;
  real i_load, v_out, i_out;
  real s_load = 0.0;                          // 0..1 switch position
  logic [N-1:0] aux_q, coarse_q, fine_q;
  logic fine_en, inc, rst_half, clk_coarse, clk_aux, clk_self_fast, cmp_f, done_f;

  int checks = 0, failures = 0;

  dldo_top dut (.*);

  always #(T_SLOW / 2) clk_slow = ~clk_slow;
  always_comb i_load = v_out * (G1 + G2 * s_load);

  // ---- mechanism counters -------------------------------------------
  int n_coarse_up = 0, n_coarse_dn = 0, n_aux_up = 0, n_aux_release = 0;
  int n_half_reset = 0, n_fine_up = 0, n_fine_dn = 0, n_self_clk = 0;
  int n_fine_entry = 0, n_under_episode = 0, n_over_episode = 0;
  int episodes = 0;                           // coarse episodes in a window
  int reversals = 0;                          // INC direction changes in a window
  bit started = 1'b0;                         // set after power-on reset
  bit after_startup = 1'b0;                   // set once start-up has settled
  real v_min = 9.0, v_max = -9.0;
  realtime t_last_exit = 0;

  always @(posedge clk_coarse) if (inc) n_coarse_up++; else n_coarse_dn++;
  always @(posedge clk_aux) n_aux_up++;
  always @(posedge clk_self_fast) n_self_clk++;
  always @(posedge done_f) if (!rst_half) begin
    if (cmp_f) n_fine_up++; else n_fine_dn++;
  end
  always @(posedge rst_half) if (started) begin
    n_half_reset++;
    episodes++;
  end
  realtime t_first_fine = 0;
  always @(negedge rst_half) if (started) begin
    if (n_fine_entry == 0) t_first_fine = $realtime;
    n_fine_entry++;
    t_last_exit = $realtime;
    checks++;
    if (fine_q !== {{(N/2){1'b1}}, {(N/2){1'b0}}}) begin
      failures++;
      $display("FAIL fine array not at half scale on fine-mode entry: %h", fine_q);
    end
  end
  always @(posedge inc) if (started) begin n_under_episode++; reversals++; end
  always @(negedge inc) if (started) begin n_over_episode++;  reversals++; end
  // Auxiliary release: the output current should fall from about twice the
  // load current to about the load current. Record the worst mismatch left
  // after a release, in coarse steps at the present dropout.
  logic [N-1:0] aux_prev = '1;
  real rel_err_max = 0.0, rel_ratio_sum = 0.0;
  int  n_rel_measured = 0;
  always @(aux_q) begin
    if (aux_q == '1 && aux_prev != '1) begin
      n_aux_release++;
      if (after_startup) fork
        begin
          real step, err;
          #1;                                 // let the array currents settle
          step = 3.125e-3 * (v_in - v_out) / 0.2;
          if (v_in - v_out > 0.3) step = 3.125e-3 * 1.5;
          err = (i_out - i_load) / step;
          if (err < 0.0) err = -err;
          if (err > rel_err_max) rel_err_max = err;
          rel_ratio_sum += i_out / i_load;
          n_rel_measured++;
        end
      join_none
    end
    aux_prev = aux_q;
  end

  // Fine-loop rate and latency: in fine mode each clk_slow cycle gives
  // exactly one fine step, applied T_CMP + T_DONE (210 ps) after the clock
  // edge rather than one clock later. A cycle in which fine mode starts
  // while clk_slow is already high begins its comparison at that moment,
  // so the latency is checked only for cycles that stayed in fine mode from
  // the clock edge to DONE_F.
  realtime t_slow_rise = 0;
  bit fine_at_edge = 1'b0;
  int n_slow = 0, n_done_f = 0, n_late = 0;
  always @(posedge clk_slow) begin
    t_slow_rise = $realtime;
    fine_at_edge = fine_en;
    if (fine_en) n_slow++;
  end
  always @(negedge fine_en) fine_at_edge = 1'b0;
  always @(posedge done_f) if (started && fine_en) begin
    n_done_f++;
    if (fine_at_edge && $realtime - t_slow_rise != 210) n_late++;
  end

  // Coarse-loop rate: at most one coarse step per self-clock cycle.
  int n_coarse_in_cycle = 0, n_multi = 0;
  always @(posedge clk_self_fast) n_coarse_in_cycle = 0;
  always @(posedge clk_coarse) begin
    n_coarse_in_cycle++;
    if (n_coarse_in_cycle > 1) n_multi++;
  end
  always @(posedge clk_self_fast) begin
    if (v_out < v_min) v_min = v_out;
    if (v_out > v_max) v_max = v_out;
  end

  function automatic int ones_off(logic [N-1:0] g);
    return $countones(~g);
  endfunction

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t v_out=%f)", what, $time, v_out);
    end
  endtask

  task automatic ramp_load(real target);
    real start = s_load;
    for (int k = 1; k <= 20; k++) begin       // 20 ns edge, 1 ns steps
      #1000 s_load = start + (target - start) * k / 20.0;
    end
  endtask

  // Steady-state check: V_OUT stays inside the window for 1 us and its
  // ripple is a small fraction of the window.
  task automatic check_steady(string what);
    real lo = 9.0, hi = -9.0;
    int ep0 = episodes;
    int s0 = n_slow, d0 = n_done_f;
    for (int k = 0; k < 200; k++) begin
      #5000;
      if (v_out < lo) lo = v_out;
      if (v_out > hi) hi = v_out;
    end
    $display("%s: v_out %f..%f, ripple %.1f mV, coarse %0d aux %0d fine %0d on, i_out %.2f mA i_load %.2f mA",
             what, lo, hi, (hi - lo) * 1000.0, ones_off(coarse_q), ones_off(aux_q),
             ones_off(fine_q), i_out * 1000.0, i_load * 1000.0);
    expect_true(lo > v_ref_l && hi < v_ref_h, {what, ": inside window"});
    expect_true(hi - lo < 0.015, {what, ": ripple below half the window"});
    expect_true(episodes == ep0, {what, ": no coarse episode in steady state"});
    expect_true(fine_en === 1'b1, {what, ": fine mode"});
    expect_true(ones_off(aux_q) == 0, {what, ": auxiliary stage off"});
    expect_true((n_done_f - d0) - (n_slow - s0) <= 1 && (n_slow - s0) - (n_done_f - d0) <= 1,
                {what, ": one fine step per clk_slow cycle"});
    expect_true(n_slow - s0 >= 49, {what, ": 50 MHz fine loop running"});
  endtask

  // Load step: returns the extreme voltage and the settling time.
  task automatic load_step(real target, string what, output real v_ext,
                           output real t_settle_ns, output int n_rev);
    realtime t0;
    v_min = 9.0; v_max = -9.0;
    episodes = 0;
    reversals = 0;
    t0 = $realtime;
    t_last_exit = t0;
    ramp_load(target);
    #3_000_000;
    v_ext = (target > 0.5) ? v_min : v_max;
    t_settle_ns = (t_last_exit - t0) / 1000.0;
    n_rev = reversals;
    $display("%s: extreme %f V (%.1f mV from V_REF), last coarse exit after %.1f ns, %0d coarse episodes, %0d direction reversals",
             what, v_ext, (v_ext - v_ref) * 1000.0, t_settle_ns, episodes, n_rev);
    check_steady({what, " settled"});
  endtask

  initial begin
    real us_aux, os_aux, us_noaux, os_noaux, ts1, ts2, ts3, ts4;
    int e1, e2, e3, e4;
    #100 rst = 1'b1;
    #1000 rst = 1'b0;
    started = 1'b1;
    // 1. start-up
    #3_000_000;
    $display("start-up: v_out %f, fine-mode entries %0d", v_out, n_fine_entry);
    $display("start-up: first fine-mode entry %.1f ns after reset release", (t_first_fine - 1100) / 1000.0);
    expect_true(n_fine_entry > 0 && t_first_fine - 1100 < 200_000, "start-up reaches fine mode within 200 ns");
    check_steady("start-up");
    after_startup = 1'b1;
    // 2. with auxiliary stage
    load_step(1.0, "10->100 mA, aux on", us_aux, ts1, e1);
    load_step(0.0, "100->10 mA, aux on", os_aux, ts2, e2);
    // No ringing: a light-to-heavy step may turn INC up once but never back
    // down (no overshoot episode); a heavy-to-light step may overshoot and
    // then undershoot once at most.
    expect_true(e1 <= 1, "no ringing after light-to-heavy step");
    expect_true(e2 <= 2, "no ringing after heavy-to-light step");
    expect_true(ts1 < 200.0 && ts2 < 200.0, "coarse tuning ends within 200 ns of a step");
    // 3. without auxiliary stage
    aux_en = 1'b0;
    load_step(1.0, "10->100 mA, aux off", us_noaux, ts3, e3);
    load_step(0.0, "100->10 mA, aux off", os_noaux, ts4, e4);
    aux_en = 1'b1;
    expect_true(v_ref - us_aux < v_ref - us_noaux, "auxiliary stage reduces the undershoot");
    $display("fine steps %0d, late %0d; coarse multi-steps per cycle %0d",
             n_done_f, n_late, n_multi);
    $display("auxiliary releases measured %0d: mean I_OUT/I_LOAD after release %.2f, worst |I_OUT-I_LOAD| %.2f coarse steps",
             n_rel_measured, rel_ratio_sum / (n_rel_measured > 0 ? n_rel_measured : 1), rel_err_max);
    expect_true(n_late == 0, "fine step follows the clock edge by the comparison delay");
    expect_true(n_multi == 0, "at most one coarse step per self-clock cycle");
    expect_true(n_rel_measured > 0 && rel_err_max < 2.0,
                "after an auxiliary release I_OUT is within two coarse steps of I_LOAD");
    // mechanism coverage
    $display("coarse up %0d, coarse down-by-2 %0d, aux up %0d, aux release %0d, half reset %0d",
             n_coarse_up, n_coarse_dn, n_aux_up, n_aux_release, n_half_reset);
    $display("fine up %0d, fine down %0d, fine entries %0d, self clock %0d, under %0d, over %0d",
             n_fine_up, n_fine_dn, n_fine_entry, n_self_clk, n_under_episode, n_over_episode);
    expect_true(n_coarse_up > 0, "coarse increment happened");
    expect_true(n_coarse_dn > 0, "coarse decrement by two happened");
    expect_true(n_aux_up > 0, "auxiliary increment happened");
    expect_true(n_aux_release > 0, "auxiliary release happened");
    expect_true(n_half_reset > 0, "half reset happened");
    expect_true(n_fine_up > 0 && n_fine_dn > 0, "fine steps in both directions happened");
    expect_true(n_fine_entry > 0, "fine mode re-entered");
    expect_true(n_self_clk > 1000, "self clock running");
    expect_true(n_under_episode > 0 && n_over_episode > 0, "undershoot and overshoot episodes happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #30_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
