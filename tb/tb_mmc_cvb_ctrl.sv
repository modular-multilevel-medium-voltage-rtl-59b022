// tb_mmc_cvb_ctrl: end-to-end test of the three-phase balancing controller
// at its default size (6 arms, 64 SMs per arm, 64 CVMS sub-ranges).
//
// A simple converter model closes the loop: every sampling period the
// inserted capacitors of an arm change by (arm current / 64) codes (10 mV
// codes), a few SMs leak slightly, and the arm mean is then held at 16 V,
// standing in for the converter's averaging control. Arm references and
// currents follow a 20-sample fundamental with 120 degrees between phases
// (upper arm: v = Vdc/2 - v_ac, i = i_dc/3 + i_ac/2). The upper arms are
// switched by the sorting-network gates, the lower arms by the CVMS gates;
// both engines run on all six arms every period and all twelve results are
// checked against the reference rules: insertion index =
// round(n_sm*Vref/Vdc), sorting-network choice = lowest/highest voltages,
// CVMS choice = exact sub-range order. Starting from scattered voltages,
// every arm must end with a spread below 0.4 V.
// Mechanisms counted, each must occur: dummy filling with early finish of
// the sorter (n_sm < 64) and full sorts, both current directions, empty
// sub-ranges passed by the CVMS read, voltages clamped below Vc_min and
// above Vc_max, NLC saturation.
module tb_mmc_cvb_ctrl;
  import tb_ref_pkg::*;
  localparam int ARMS = 6, N = 64, BV = 12, BP = 6, VW = 16, IW = 16, LEVELS = 64;
  localparam int FRAC = 2 * BV + 2, INVW = FRAC + $clog2(LEVELS) + 1;
  localparam int VMIN = 1400, VMAX = 1800;   // 14 V .. 18 V in 10 mV codes

  logic clk = 0, rst_n = 0, sample = 0, busy;
  logic [6:0] n_sm;
  logic [VW-1:0] vdc;
  logic [ARMS-1:0][VW-1:0] vref;
  logic [ARMS-1:0][IW-1:0] i_arm;
  logic [ARMS-1:0][N-1:0][BV-1:0] vc;
  logic [BV-1:0] vc_min;
  logic [INVW-1:0] inv_dv;
  logic [ARMS-1:0][6:0] n_ins;
  logic [ARMS-1:0][N-1:0] gate_sn, gate_cvms;
  logic [ARMS-1:0] sn_arm_done, cvms_done, cvms_overflow;
  logic sn_done;

  mmc_cvb_ctrl dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cnt_early = 0, cnt_full = 0, cnt_pos = 0, cnt_neg = 0, cnt_skip = 0;
  int cnt_below = 0, cnt_above = 0, cnt_sat = 0;
  int v[ARMS][];

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int spread(int x[], int n);
    int mx = -1, mn = 1 << 30;
    for (int i = 0; i < n; i++) begin
      if (x[i] > mx) mx = x[i];
      if (x[i] < mn) mn = x[i];
    end
    return mx - mn;
  endfunction

  // The averaging control holds the arm's mean capacitor voltage.
  function automatic void recenter(ref int x[], input int n);
    int sum, d;
    sum = 0;
    for (int i = 0; i < n; i++) sum += x[i];
    d = sum / n - 1600;
    for (int i = 0; i < n; i++) x[i] -= d;
  endfunction

  // One sampling period: run the controller, check all results, update model.
  task automatic period(int n, int vr[ARMS], int cur[ARMS], int vd);
    int ad[], j, s, c, lat_sn[ARMS], lat_cv[ARMS], used;
    logic [ARMS-1:0] got_cv;
    logic got_sn;
    ad = new[n];
    @(negedge clk);
    n_sm = 7'(n); vdc = VW'(vd);
    for (int a = 0; a < ARMS; a++) begin
      vref[a] = VW'(vr[a]); i_arm[a] = IW'(cur[a]);
      for (int i = 0; i < N; i++) vc[a][i] = (i < n) ? BV'(v[a][i]) : BV'($urandom);
    end
    sample = 1;
    @(negedge clk);
    sample = 0;
    got_sn = 0; got_cv = '0;
    for (c = 1; c < 3000 && !(got_sn && got_cv == '1); c++) begin
      @(posedge clk); #1;
      for (int a = 0; a < ARMS; a++) begin
        if (sn_arm_done[a]) lat_sn[a] = c;
        if (cvms_done[a]) begin got_cv[a] = 1; lat_cv[a] = c; end
      end
      if (sn_done) got_sn = 1;
    end
    checks++;
    if (!got_sn || got_cv != '1) failures++;
    j = 1;
    while ((1 << j) < n) j++;
    s = 3 * j * (j + 1) / 2;
    if (n < N) cnt_early++; else cnt_full++;
    for (int a = 0; a < ARMS; a++) begin
      // insertion index
      checks++;
      if (int'(n_ins[a]) != ref_nlc(n, vr[a], vd)) failures++;
      if (vr[a] > vd) cnt_sat++;
      // shared sorter schedule: arm a done after (a+1)*(3*j(j+1)/2+1)+1
      checks++;
      if (lat_sn[a] != (a + 1) * (s + 1) + 1) begin
        failures++;
        $display("SN arm %0d latency %0d for n=%0d", a, lat_sn[a], n);
      end
      // sorting-network choice
      checks++;
      if (ref_check_choice(v[a], n, int'(n_ins[a]), cur[a] > 0, 128'(gate_sn[a])) != 0) failures++;
      // CVMS choice
      for (int i = 0; i < n; i++) begin
        ad[i] = ref_addr_hw(v[a][i], VMIN, VMAX, LEVELS, LEVELS);
        if (v[a][i] < VMIN) cnt_below++;
        if (v[a][i] >= VMAX) cnt_above++;
      end
      checks += 2;
      if (128'(gate_cvms[a]) != ref_cvms_gate(ad, n, int'(n_ins[a]), cur[a] > 0, LEVELS)) failures++;
      if (cvms_overflow[a]) failures++;
      // CVMS run time: 3 cycles per SM stored, then at least one per SM read
      used = 0;
      for (int i = 0; i < n; i++) if (gate_cvms[a][i]) used++;
      checks++;
      if (lat_cv[a] < 3 * n + used + 1 || lat_cv[a] > 3 * n + used + LEVELS + 6) failures++;
      if (lat_cv[a] > 3 * n + used + 6) cnt_skip++;
      if (cur[a] > 0) cnt_pos++; else cnt_neg++;
      // model: upper arms follow the sorting network, lower arms the CVMS
      for (int i = 0; i < n; i++) begin
        if ((a % 2 == 0) ? gate_sn[a][i] : gate_cvms[a][i]) v[a][i] += cur[a] / 64;
        if (i % 3 == 0 && $urandom_range(0, 3) == 0) v[a][i] -= 1;   // uneven leakage
        if (v[a][i] < 0) v[a][i] = 0;
        if (v[a][i] > 4095) v[a][i] = 4095;
      end
      recenter(v[a], n);
    end
  endtask

  task automatic run_case(int n, int periods, int limit);
    int vd, s0[ARMS], vr[ARMS], cur[ARMS];
    real th, vac, iac;
    vd = 16 * 1600;
    for (int a = 0; a < ARMS; a++) begin
      v[a] = new[n];
      foreach (v[a][i]) v[a][i] = int'($urandom_range(1300, 1900));   // scattered start
      s0[a] = spread(v[a], n);
    end
    for (int t = 0; t < periods; t++) begin
      for (int p = 0; p < 3; p++) begin
        th  = 2.0 * 3.14159265 * (t / 20.0 - p / 3.0);
        vac = (vd / 2) * 0.85 * $sin(th);
        iac = 600.0 * $sin(th);
        vr[2*p]    = int'(vd / 2 - vac);
        vr[2*p+1]  = int'(vd / 2 + vac);
        cur[2*p]   = int'(150.0 + iac);
        cur[2*p+1] = int'(150.0 - iac);
      end
      if (t == 3) vr[0] = vd + 500;             // saturate once
      period(n, vr, cur, vd);
    end
    for (int a = 0; a < ARMS; a++) begin
      $display("n=%0d arm %0d (%s): spread %0d -> %0d codes", n, a,
               (a % 2 == 0) ? "sorting network" : "CVMS", s0[a], spread(v[a], n));
      checks++;
      if (spread(v[a], n) > limit || spread(v[a], n) >= s0[a]) failures++;
    end
  endtask

  initial begin
    n_sm = '0; vdc = '0; vref = '0; i_arm = '0; vc = '0;
    vc_min = BV'(VMIN);
    inv_dv = INVW'(ref_inv(VMIN, VMAX, LEVELS, FRAC));
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_case(64, 400, 40);
    run_case(16, 300, 40);
    run_case(6, 800, 40);
    $display("mechanisms: early-finish %0d full-sort %0d i>0 %0d i<=0 %0d empty-row-skips %0d below-min %0d above-max %0d nlc-saturation %0d",
             cnt_early, cnt_full, cnt_pos, cnt_neg, cnt_skip, cnt_below, cnt_above, cnt_sat);
    checks += 8;
    if (cnt_early == 0) failures++;
    if (cnt_full == 0) failures++;
    if (cnt_pos == 0) failures++;
    if (cnt_neg == 0) failures++;
    if (cnt_skip == 0) failures++;
    if (cnt_below == 0) failures++;
    if (cnt_above == 0) failures++;
    if (cnt_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
