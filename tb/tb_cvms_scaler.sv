// tb_cvms_scaler: the document's worked example (Vc_min = 14 V,
// Vc_max = 18 V, M = 8, codes of 10 mV) must give the addresses
// 3 6 1 1 4 3; then every 12-bit code is mapped for several ranges and
// compared with the exact floor((Vc-Vc_min)*M/(Vc_max-Vc_min)), with the
// two-stage latency checked.
module tb_cvms_scaler;
  import tb_ref_pkg::*;
  localparam int BV = 12, BP = 6, LEVELS = 64, FRAC = 2 * BV + 2;
  localparam int INVW = FRAC + $clog2(LEVELS) + 1;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [BV-1:0] vc, vc_min;
  logic [BP-1:0] in_pos, out_pos;
  logic [INVW-1:0] inv_dv;
  logic [5:0] addr;
  int checks = 0, failures = 0;

  cvms_scaler #(.BV(BV), .BP(BP), .LEVELS(LEVELS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Issue one value and check the result two edges later.
  task automatic map_one(int v, int vmin, int vmax, int lv, int p);
    int want;
    @(negedge clk);
    vc = BV'(v); in_pos = BP'(p); in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (out_valid) failures++;
    @(negedge clk);
    want = ref_addr_hw(v, vmin, vmax, lv, LEVELS);
    checks++;
    if (!out_valid || int'(addr) != want || int'(out_pos) != p) begin
      failures++;
      if (failures < 10) $display("vc=%0d range %0d..%0d L=%0d got %0d want %0d", v, vmin, vmax, lv, addr, want);
    end
  endtask

  initial begin
    int ex_v[6] = '{1560, 1700, 1470, 1490, 1620, 1590};
    int ex_a[6] = '{3, 6, 1, 1, 4, 3};
    vc = '0; in_pos = '0;
    vc_min = 12'd1400; inv_dv = INVW'(ref_inv(1400, 1800, 8, FRAC));
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 6; i++) begin
      map_one(ex_v[i], 1400, 1800, 8, i + 1);
      checks++;
      if (int'(addr) != ex_a[i]) failures++;
    end
    // Out-of-range values clamp.
    map_one(100, 1400, 1800, 8, 7);
    map_one(1800, 1400, 1800, 8, 7);
    map_one(4095, 1400, 1800, 8, 7);
    // Exhaustive sweep over codes for several ranges and level counts.
    begin
      int vmins[4] = '{1400, 0, 1000, 2000};
      int vmaxs[4] = '{1800, 4095, 3500, 2001};
      int lvs[4]   = '{64, 64, 16, 64};
      for (int c = 0; c < 4; c++) begin
        vc_min = BV'(vmins[c]);
        inv_dv = INVW'(ref_inv(vmins[c], vmaxs[c], lvs[c], FRAC));
        for (int v = 0; v < 4096; v += (c == 1 ? 1 : 3))
          map_one(v, vmins[c], vmaxs[c], lvs[c], v % 64);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
