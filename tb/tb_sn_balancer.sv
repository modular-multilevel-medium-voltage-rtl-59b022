// tb_sn_balancer: two arms sharing one 16-input sorting network. Random
// arms of every size, both current directions per arm; checks each arm's
// gate pattern (right count, lowest or highest voltages) and the schedule:
// arm a's result after (a+1)*(3*j(j+1)/2 + 1) + 1 cycles,
// j = ceil(log2(n_sm)).
module tb_sn_balancer;
  import tb_ref_pkg::*;
  localparam int ARMS = 2, M = 16, BV = 12, BP = 6, IW = 16;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [4:0] n_sm;
  logic [ARMS-1:0][4:0] n_ins;
  logic [ARMS-1:0][IW-1:0] i_arm;
  logic [ARMS-1:0][M-1:0][BV-1:0] vc;
  logic [ARMS-1:0][M-1:0] gate;
  logic [ARMS-1:0] arm_done;
  int checks = 0, failures = 0;

  sn_balancer #(.ARMS(ARMS), .M(M), .BV(BV), .BP(BP), .IW(IW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v[ARMS][], k[ARMS], cur[ARMS], lat[ARMS], n, j, c;
    vc = '0; n_sm = '0; n_ins = '0; i_arm = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      n = 1 + (t % M);
      @(negedge clk);
      for (int a = 0; a < ARMS; a++) begin
        k[a] = int'($urandom_range(0, n + 1));
        cur[a] = ((t + a) % 3 == 0) ? int'($urandom_range(1, 500)) : -int'($urandom_range(0, 500));
        v[a] = new[M];
        foreach (v[a][i]) v[a][i] = (t % 7 == 0) ? int'($urandom_range(0, 2)) : int'($urandom_range(0, 4095));
        foreach (v[a][i]) vc[a][i] = BV'(v[a][i]);
        n_ins[a] = 5'(k[a]); i_arm[a] = IW'(cur[a]);
        lat[a] = 0;
      end
      n_sm = 5'(n); start = 1;
      @(posedge clk); @(negedge clk);
      start = 0; vc = '0; c = 1;
      while (!done && c < 1000) begin
        @(posedge clk); @(negedge clk); c++;
        for (int a = 0; a < ARMS; a++) if (arm_done[a]) lat[a] = c;
      end
      j = 1;
      while ((1 << j) < n) j++;
      for (int a = 0; a < ARMS; a++) begin
        checks++;
        if (ref_check_choice(v[a], n, k[a], cur[a] > 0, 128'(gate[a])) != 0) begin
          failures++;
          $display("t=%0d arm %0d n=%0d k=%0d cur=%0d gate=%b", t, a, n, k[a], cur[a], gate[a]);
        end
        checks++;
        if (lat[a] != (a + 1) * (3 * j * (j + 1) / 2 + 1) + 1) begin
          failures++;
          $display("t=%0d arm %0d latency %0d", t, a, lat[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
