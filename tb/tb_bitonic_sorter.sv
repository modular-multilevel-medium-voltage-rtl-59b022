// tb_bitonic_sorter: sorts the document's 8-SM example (capacitor voltages
// in units of 0.1 V) and checks the ranked positions and the 18-cycle
// latency; then sorts random lists at M = 8 and M = 16 with every arm size
// n_sm, checking that the voltages come out in decreasing order, that each
// real SM appears exactly once with its own voltage, that dummies sit at the
// end, and that done arrives after 3*j(j+1)/2 cycles, j = ceil(log2(n_sm)).
// Finally the default 64-input sorter takes the same 8-SM example with the
// other 56 inputs as dummies (same order, still 18 cycles) and random
// arms of 16, 32 and 64 SMs (30, 45 and 63 cycles).
module tb_bitonic_sorter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int BV = 12;
  // M = 8 instance
  logic start8 = 0, busy8, done8;
  logic [3:0] n8;
  logic [7:0][BV-1:0] vc8, vs8;
  logic [7:0][5:0] ps8;
  bitonic_sorter #(.M(8), .BV(BV), .BP(6)) dut8 (
    .clk, .rst_n, .start(start8), .n_sm(n8), .vc(vc8),
    .v_sorted(vs8), .p_sorted(ps8), .busy(busy8), .done(done8));
  // M = 16 instance
  logic start16 = 0, busy16, done16;
  logic [4:0] n16;
  logic [15:0][BV-1:0] vc16, vs16;
  logic [15:0][5:0] ps16;
  bitonic_sorter #(.M(16), .BV(BV), .BP(6)) dut16 (
    .clk, .rst_n, .start(start16), .n_sm(n16), .vc(vc16),
    .v_sorted(vs16), .p_sorted(ps16), .busy(busy16), .done(done16));

  // default-size instance (M = 64)
  logic start64 = 0, busy64, done64;
  logic [6:0] n64;
  logic [63:0][BV-1:0] vc64, vs64;
  logic [63:0][5:0] ps64;
  bitonic_sorter dut64 (
    .clk, .rst_n, .start(start64), .n_sm(n64), .vc(vc64),
    .v_sorted(vs64), .p_sorted(ps64), .busy(busy64), .done(done64));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int jstages(int n, int p);
    int j = 1;
    while (j < p && (1 << j) < n) j++;
    return j * (j + 1) / 2;
  endfunction

  // Generic checker over arrays copied out of either instance.
  task automatic check_result(int m, int n, int vin[], int vout[], int pout[], int lat, int p);
    int seen[];
    seen = new[m];
    foreach (seen[i]) seen[i] = 0;
    checks++;
    if (lat != 3 * jstages(n, p)) begin
      failures++;
      $display("M=%0d n=%0d latency %0d expected %0d", m, n, lat, 3 * jstages(n, p));
    end
    for (int r = 0; r < n; r++) begin
      checks++;
      if (pout[r] >= n || seen[pout[r]] != 0 || vin[pout[r]] != vout[r]) begin
        failures++;
        $display("M=%0d n=%0d rank %0d: pos %0d v %0d", m, n, r, pout[r], vout[r]);
      end else seen[pout[r]] = 1;
      if (r > 0) begin
        checks++;
        if (vout[r] > vout[r-1]) failures++;
      end
    end
  endtask

  task automatic sort8(int n, int vin[], output int vout[], output int pout[], output int lat);
    vout = new[8]; pout = new[8];
    @(negedge clk);
    for (int i = 0; i < 8; i++) vc8[i] = BV'(vin[i]);
    n8 = 4'(n); start8 = 1;
    @(posedge clk); @(negedge clk); start8 = 0;
    lat = 1;
    while (!done8) begin @(posedge clk); @(negedge clk); lat++; end
    for (int i = 0; i < 8; i++) begin vout[i] = int'(vs8[i]); pout[i] = int'(ps8[i]); end
  endtask

  task automatic sort16(int n, int vin[], output int vout[], output int pout[], output int lat);
    vout = new[16]; pout = new[16];
    @(negedge clk);
    for (int i = 0; i < 16; i++) vc16[i] = BV'(vin[i]);
    n16 = 5'(n); start16 = 1;
    @(posedge clk); @(negedge clk); start16 = 0;
    lat = 1;
    while (!done16) begin @(posedge clk); @(negedge clk); lat++; end
    for (int i = 0; i < 16; i++) begin vout[i] = int'(vs16[i]); pout[i] = int'(ps16[i]); end
  endtask

  task automatic sort64(int n, int vin[], output int vout[], output int pout[], output int lat);
    vout = new[64]; pout = new[64];
    @(negedge clk);
    for (int i = 0; i < 64; i++) vc64[i] = (i < vin.size()) ? BV'(vin[i]) : BV'($urandom);
    n64 = 7'(n); start64 = 1;
    @(posedge clk); @(negedge clk); start64 = 0;
    lat = 1;
    while (!done64) begin @(posedge clk); @(negedge clk); lat++; end
    for (int i = 0; i < 64; i++) begin vout[i] = int'(vs64[i]); pout[i] = int'(ps64[i]); end
  endtask

  initial begin
    int vin[], vout[], pout[], lat;
    int expect_pos[8] = '{5, 6, 0, 2, 4, 1, 7, 3};
    vc8 = '0; vc16 = '0; vc64 = '0; n8 = 8; n16 = 16; n64 = 64;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Example list: 16.2 15.4 16.0 14.8 15.9 16.5 16.4 14.9 V
    vin = '{162, 154, 160, 148, 159, 165, 164, 149};
    sort8(8, vin, vout, pout, lat);
    check_result(8, 8, vin, vout, pout, lat, 3);
    for (int r = 0; r < 8; r++) begin
      checks++;
      if (pout[r] != expect_pos[r]) failures++;
    end
    checks++;
    if (lat != 18) failures++;
    // Random lists, every arm size.
    for (int t = 0; t < 40; t++) begin
      int n;
      n = 1 + (t % 8);
      vin = new[8];
      foreach (vin[i]) vin[i] = (t % 5 == 0) ? int'($urandom_range(140, 143)) : int'($urandom_range(0, 4095));
      sort8(n, vin, vout, pout, lat);
      check_result(8, n, vin, vout, pout, lat, 3);
      for (int r = n; r < 8; r++) begin
        checks++;
        if (pout[r] != 63 || vout[r] != 0) failures++;
      end
    end
    for (int t = 0; t < 48; t++) begin
      int n;
      n = 1 + (t % 16);
      vin = new[16];
      foreach (vin[i]) vin[i] = (t % 4 == 0) ? int'($urandom_range(0, 3)) : int'($urandom_range(0, 4095));
      sort16(n, vin, vout, pout, lat);
      check_result(16, n, vin, vout, pout, lat, 4);
    end
    // Default size: the example again, with 56 dummies.
    vin = '{162, 154, 160, 148, 159, 165, 164, 149};
    sort64(8, vin, vout, pout, lat);
    check_result(64, 8, vin, vout, pout, lat, 6);
    for (int r = 0; r < 8; r++) begin
      checks++;
      if (pout[r] != expect_pos[r]) failures++;
    end
    checks++;
    if (lat != 18) failures++;
    for (int r = 8; r < 64; r++) begin
      checks++;
      if (pout[r] != 63 || vout[r] != 0) failures++;
    end
    for (int t = 0; t < 6; t++) begin
      int n;
      n = 16 << (t % 3);
      vin = new[64];
      foreach (vin[i]) vin[i] = int'($urandom_range(0, 4095));
      sort64(n, vin, vout, pout, lat);
      check_result(64, n, vin, vout, pout, lat, 6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
