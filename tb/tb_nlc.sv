// tb_nlc: nearest level control against round(n*Vref/Vdc), including
// saturation, Vdc = 0 and the hold behaviour between loads.
module tb_nlc;
  import tb_ref_pkg::*;
  localparam int VW = 16, M = 64;
  logic clk = 0, rst_n = 0, load = 0;
  logic [VW-1:0] vref, vdc;
  logic [6:0] n_sm, n_ins;
  int checks = 0, failures = 0;

  nlc #(.VW(VW), .M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(int n, int vr, int vd);
    int held;
    @(negedge clk);
    n_sm = 7'(n); vref = VW'(vr); vdc = VW'(vd); load = 1;
    @(negedge clk);
    load = 0;
    checks++;
    if (int'(n_ins) != ref_nlc(n, vr, vd)) begin
      failures++;
      $display("n=%0d vref=%0d vdc=%0d got %0d want %0d", n, vr, vd, n_ins, ref_nlc(n, vr, vd));
    end
    held = int'(n_ins);
    vref = VW'($urandom);
    @(negedge clk);
    checks++;
    if (int'(n_ins) != held) failures++;
  endtask

  initial begin
    vref = '0; vdc = '0; n_sm = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    one(16, 20000, 40000);   // half of the DC link -> 8
    one(16, 21249, 40000);   // 8.4996 -> 8
    one(16, 21250, 40000);   // 8.5 -> 9 (half-up)
    one(16, 50000, 40000);   // above Vdc -> saturates at 16
    one(16, 0, 40000);
    one(4, 1234, 0);         // Vdc = 0 -> 0
    one(64, 65535, 65535);
    for (int t = 0; t < 300; t++)
      one(int'($urandom_range(1, 64)), int'($urandom_range(0, 65535)), int'($urandom_range(1, 65535)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
