// tb_sm_selection: feeds ranked lists (positions in decreasing-voltage
// order, produced here by a reference sort) and checks that the n_ins lowest
// (arm current > 0) or highest (otherwise) SMs are the ones switched in.
module tb_sm_selection;
  import tb_ref_pkg::*;
  localparam int M = 16, BP = 6, IW = 16;
  logic clk = 0, rst_n = 0, load = 0, valid;
  logic [M-1:0][BP-1:0] p_sorted;
  logic [4:0] n_sm, n_ins;
  logic signed [IW-1:0] i_arm;
  logic [M-1:0] gate;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0;

  sm_selection #(.M(M), .BP(BP), .IW(IW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v[], order[], tmp, n, k;
    logic [127:0] g;
    v = new[M]; order = new[M];
    p_sorted = '0; n_sm = '0; n_ins = '0; i_arm = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      n = int'($urandom_range(1, M));
      k = int'($urandom_range(0, M + 2));
      for (int i = 0; i < M; i++) begin v[i] = int'($urandom_range(0, 30)); order[i] = i; end
      // reference: selection sort by decreasing voltage, dummies last
      for (int a = 0; a < M; a++)
        for (int b = a + 1; b < M; b++) begin
          int ka, kb;
          ka = (order[a] < n) ? v[order[a]] : -1;
          kb = (order[b] < n) ? v[order[b]] : -1;
          if (kb > ka) begin tmp = order[a]; order[a] = order[b]; order[b] = tmp; end
        end
      @(negedge clk);
      for (int r = 0; r < M; r++) p_sorted[r] = (order[r] < n) ? BP'(order[r]) : '1;
      n_sm = 5'(n); n_ins = 5'(k);
      i_arm = (t % 3 == 0) ? IW'(0) : IW'(int'($urandom_range(0, 2000)) - 1000);
      load = 1;
      @(negedge clk);
      load = 0;
      checks++;
      if (!valid) failures++;
      g = 128'(gate);
      checks++;
      if (ref_check_choice(v, n, k, i_arm > 0, g) != 0) begin
        failures++;
        $display("t=%0d n=%0d k=%0d i=%0d gate=%h", t, n, k, i_arm, gate);
      end
      if (i_arm > 0) n_pos++; else n_neg++;
    end
    checks++;
    if (n_pos == 0 || n_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
