// tb_cvms_balancer: whole sorting-less balancing of one arm. Runs the
// document's 6-SM example and random arms against the reference selection
// (computed from exact sub-range addresses), and checks the run time:
// 1 clear cycle + 3 cycles per SM + the read.
module tb_cvms_balancer;
  import tb_ref_pkg::*;
  localparam int N = 16, BV = 12, BP = 6, LEVELS = 16, IW = 16;
  localparam int FRAC = 2 * BV + 2, INVW = FRAC + $clog2(LEVELS) + 1;
  logic clk = 0, rst_n = 0, start = 0, busy, done, overflow;
  logic [4:0] n_sm, n_ins;
  logic signed [IW-1:0] i_arm;
  logic [N-1:0][BV-1:0] vc;
  logic [BV-1:0] vc_min;
  logic [INVW-1:0] inv_dv;
  logic [N-1:0] gate;
  int checks = 0, failures = 0;

  cvms_balancer #(.N(N), .BV(BV), .BP(BP), .LEVELS(LEVELS), .IW(IW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int v[], int n, int k, int cur, int vmin, int vmax, int lv, output int lat);
    @(negedge clk);
    for (int i = 0; i < N; i++) vc[i] = (i < n) ? BV'(v[i]) : BV'($urandom);
    vc_min = BV'(vmin); inv_dv = INVW'(ref_inv(vmin, vmax, lv, FRAC));
    n_sm = 5'(n); n_ins = 5'(k); i_arm = IW'(cur); start = 1;
    @(posedge clk); @(negedge clk);
    start = 0; lat = 1;
    vc = '0;   // inputs are sampled at start
    while (!done && lat < 2000) begin @(posedge clk); @(negedge clk); lat++; end
  endtask

  initial begin
    int v[], a[], lat, n, k, cur;
    logic [127:0] want;
    vc = '0; n_sm = '0; n_ins = '0; i_arm = '0; vc_min = '0; inv_dv = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Document example: 6 SMs, 14..18 V in 8 sub-ranges, 10 mV codes.
    v = '{1560, 1700, 1470, 1490, 1620, 1590};
    run(v, 6, 3, 50, 1400, 1800, 8, lat);
    checks++;
    if (gate != 16'b0000_0000_0000_1101) failures++;
    // start + clear + store (3 per SM) + end-of-store + read start
    // + read (7 cycles, see tb_cvms_reader) + output register
    checks++;
    if (lat != 1 + 1 + 3 * 6 + 1 + 1 + 7 + 1) begin
      failures++;
      $display("example latency %0d", lat);
    end
    for (int t = 0; t < 200; t++) begin
      int vmin, vmax;
      n = int'($urandom_range(1, N));
      k = int'($urandom_range(0, n + 1));
      cur = (t % 2 == 0) ? int'($urandom_range(1, 500)) : -int'($urandom_range(0, 500));
      vmin = int'($urandom_range(500, 1500));
      vmax = vmin + int'($urandom_range(16, 2000));
      v = new[n]; a = new[n];
      foreach (v[i]) begin
        v[i] = int'($urandom_range(vmin - 200, vmax + 200));
        a[i] = ref_addr(v[i], vmin, vmax, LEVELS);
      end
      run(v, n, k, cur, vmin, vmax, LEVELS, lat);
      want = ref_cvms_gate(a, n, k, cur > 0, LEVELS);
      checks++;
      if (128'(gate) != want || overflow) begin
        failures++;
        $display("t=%0d gate=%h want=%h", t, gate, want);
      end
      checks++;
      if (lat < 3 + 3 * n + ((k > n) ? n : k) || lat > 6 + 3 * n + k + LEVELS) begin
        failures++;
        $display("t=%0d latency %0d n %0d k %0d", t, lat, n, k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
