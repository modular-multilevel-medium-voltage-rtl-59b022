// tb_cvms_sweep: closed-loop run of one voltage-mapping balancer at its
// default size (64 SMs, 64 sub-ranges) on a 16-SM arm, with the window
// 10 kV .. 35 kV split into M = 8, 16, 32 and 64 sub-ranges in turn
// (the number of sub-ranges used is set through inv_dv). Codes are 10 V, so
// the window is 1000 .. 3500 and the capacitors sit near 12.5 kV (1250),
// the share of a 200 kV DC link over 16 SMs.
//
// Each sampling period the arm current follows a sine over 20 periods, the
// insertion index follows the arm reference, and the inserted capacitors
// move by (current / 8) codes; a few SMs leak slowly and the arm mean is
// held at 1250 (standing in for the averaging control). Every run's gate
// vector is compared with the reference selection (exact sub-range of each
// SM, rows bottom-up for a charging current, top-down otherwise, position
// order inside a row), its run time with the bound 1 + 1 + 3*16 + 1 +
// (n_ins + rows passed) + 1, and after a settling time the spread of the
// 16 capacitors must stay within two sub-range widths plus the largest
// change in one period and the leak (inside one sub-range the SMs are taken
// in position order, not voltage order, so two neighbouring sub-ranges can
// hold the extremes): coarser mapping balances less tightly, but it still
// balances. The spread reached for each M is printed.
// 128 sub-ranges would need LEVELS = 128 and are not run at the default.
module tb_cvms_sweep;
  import tb_ref_pkg::*;
  localparam int N = 64, BV = 12, LEVELS = 64, IW = 16;
  localparam int FRAC = 2 * BV + 2, INVW = FRAC + $clog2(LEVELS) + 1;
  localparam int NSM = 16, VMIN = 1000, VMAX = 3500, VNOM = 1250;
  localparam int PERIODS = 600, SETTLE = 300;

  logic clk = 0, rst_n = 0, start = 0, busy, done, overflow;
  logic [6:0] n_sm, n_ins;
  logic signed [IW-1:0] i_arm;
  logic [N-1:0][BV-1:0] vc;
  logic [BV-1:0] vc_min;
  logic [INVW-1:0] inv_dv;
  logic [N-1:0] gate;
  int checks = 0, failures = 0;

  cvms_balancer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sine table, 20 points, amplitude 1000
  function automatic int sine20(int k);
    int tab[20] = '{0, 309, 588, 809, 951, 1000, 951, 809, 588, 309,
                    0, -309, -588, -809, -951, -1000, -951, -809, -588, -309};
    return tab[((k % 20) + 20) % 20];
  endfunction

  task automatic sweep(int m);
    int v[NSM], a[], lat, k, cur, spread, worst, dv, bound, sum, shift, lo, hi;
    logic [127:0] want;
    a = new[NSM];
    for (int i = 0; i < NSM; i++) v[i] = VNOM - 150 + int'($urandom_range(0, 300));
    dv = (VMAX - VMIN + m - 1) / m;
    // SMs in one row are not ordered, so two neighbouring rows can be in
    // play: two sub-ranges + the largest step of one period (1000/8) + leak
    bound = 2 * dv + 125 + 4;
    worst = 0;
    for (int t = 0; t < PERIODS; t++) begin
      cur = sine20(t) / 10 + 20;          // arm current, mostly AC
      k = NSM / 2 + (NSM / 2) * sine20(t + 5) / 1100;
      @(negedge clk);
      for (int i = 0; i < N; i++) vc[i] = (i < NSM) ? BV'(v[i]) : BV'($urandom);
      vc_min = BV'(VMIN);
      inv_dv = INVW'(ref_inv(VMIN, VMAX, m, FRAC));
      n_sm = 7'(NSM); n_ins = 7'(k); i_arm = IW'(cur); start = 1;
      @(posedge clk); @(negedge clk);
      start = 0; lat = 1;
      while (!done && lat < 1000) begin @(posedge clk); @(negedge clk); lat++; end
      foreach (a[i]) a[i] = ref_addr_hw(v[i], VMIN, VMAX, m, LEVELS);
      want = ref_cvms_gate(a, NSM, k, cur > 0, LEVELS);
      checks++;
      if (128'(gate) != want || overflow) begin
        failures++;
        $display("M=%0d t=%0d gate=%h want=%h", m, t, gate, want);
      end
      checks++;
      if (lat < 3 + 3 * NSM + k || lat > 6 + 3 * NSM + k + LEVELS) begin
        failures++;
        $display("M=%0d t=%0d latency %0d", m, t, lat);
      end
      // arm model
      sum = 0;
      for (int i = 0; i < NSM; i++) begin
        if (gate[i]) v[i] += cur / 8;
        if (i % 5 == 0 && t % 4 == 0) v[i] -= 1;
        sum += v[i];
      end
      shift = VNOM - sum / NSM;
      lo = 4095; hi = 0;
      for (int i = 0; i < NSM; i++) begin
        v[i] += shift;
        if (v[i] < lo) lo = v[i];
        if (v[i] > hi) hi = v[i];
      end
      spread = hi - lo;
      if (t >= SETTLE) begin
        if (spread > worst) worst = spread;
        checks++;
        if (spread > bound) begin
          failures++;
          $display("M=%0d t=%0d spread %0d above %0d", m, t, spread, bound);
        end
      end
    end
    $display("M=%0d sub-range %0d codes: worst spread after settling %0d codes (bound %0d)",
             m, dv, worst, bound);
  endtask

  initial begin
    vc = '0; n_sm = '0; n_ins = '0; i_arm = '0; vc_min = '0; inv_dv = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    sweep(8);
    sweep(16);
    sweep(32);
    sweep(64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
