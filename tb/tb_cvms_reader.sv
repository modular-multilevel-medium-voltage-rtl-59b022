// tb_cvms_reader: drives the reader from a queue model of the FIFO array.
// Checks the document's 6-SM example (addresses 3 6 1 1 4 3) for both
// current directions with the exact selection and cycle count, then random
// fills against the reference selection order (rows ascending for a positive
// arm current, descending for zero or negative current; stored order within a row).
module tb_cvms_reader;
  import tb_ref_pkg::*;
  localparam int LEVELS = 8, N = 16, BP = 6, IW = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [4:0] n_ins, n_selected;
  logic signed [IW-1:0] i_arm;
  logic [LEVELS-1:0] empty;
  logic [BP-1:0] head_data;
  logic pop, busy, done;
  logic [2:0] pop_addr;
  logic [N-1:0] gate;
  int checks = 0, failures = 0;
  int q[LEVELS][$];

  cvms_reader #(.LEVELS(LEVELS), .N(N), .BP(BP), .IW(IW)) dut (.*);
  always #5 clk = ~clk;

  // FIFO array model
  always_comb begin
    for (int r = 0; r < LEVELS; r++) empty[r] = (q[r].size() == 0);
    head_data = (q[pop_addr].size() > 0) ? BP'(q[pop_addr][0]) : '0;
  end
  always @(posedge clk) if (pop && q[pop_addr].size() > 0) void'(q[pop_addr].pop_front());

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int addr[], int n_sm, int k, int cur, output int lat);
    for (int r = 0; r < LEVELS; r++) q[r].delete();
    for (int i = 0; i < n_sm; i++) q[addr[i]].push_back(i);
    @(negedge clk);
    n_ins = 5'(k); i_arm = IW'(cur); start = 1;
    @(posedge clk); @(negedge clk);
    start = 0; lat = 1;
    while (!done && lat < 1000) begin @(posedge clk); @(negedge clk); lat++; end
  endtask

  initial begin
    int ex[], addr[], lat, n, k, cur;
    logic [127:0] want;
    n_ins = '0; i_arm = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    ex = '{3, 6, 1, 1, 4, 3};
    run(ex, 6, 3, 100, lat);            // charging: lowest three = SMs 3, 4, 1 (1-based)
    checks++;
    if (gate != 16'b0000_0000_0000_1101 || lat != 8 || n_selected != 3) begin
      failures++;
      $display("example up: gate=%b lat=%0d", gate, lat);
    end
    run(ex, 6, 2, -100, lat);           // discharging: highest two = SMs 2, 5
    checks++;
    // rows 7 (empty, move), 6 pop SM2, 6 empty move, 5 empty move, 4 pop SM5, done
    if (gate != 16'b0000_0000_0001_0010 || lat != 7) begin
      failures++;
      $display("example down: gate=%b lat=%0d", gate, lat);
    end
    for (int t = 0; t < 300; t++) begin
      n = int'($urandom_range(1, N));
      k = int'($urandom_range(0, n));
      cur = (t % 2 == 0) ? int'($urandom_range(1, 500)) : ((t % 4 == 1) ? 0 : -int'($urandom_range(1, 500)));
      addr = new[n];
      foreach (addr[i]) addr[i] = int'($urandom_range(0, LEVELS - 1));
      run(addr, n, k, cur, lat);
      want = ref_cvms_gate(addr, n, k, cur > 0, LEVELS);
      checks++;
      if (128'(gate) != want) begin
        failures++;
        $display("t=%0d gate=%h want=%h", t, gate, want);
      end
      checks++;
      if (lat < k + 2 || lat > k + LEVELS + 2) begin failures++; $display("t=%0d lat %0d k %0d", t, lat, k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
