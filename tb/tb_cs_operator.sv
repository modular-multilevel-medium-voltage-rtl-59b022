// tb_cs_operator: exhaustive check of the comparator-and-swap element at
// small widths against a reference max/min with positions carried along.
module tb_cs_operator;
  localparam int BV = 4, BP = 3;
  logic [BV-1:0] va, vb, vsa, vsb;
  logic [BP-1:0] pa, pb, psa, psb;
  logic swap;
  int checks = 0, failures = 0;

  cs_operator #(.BV(BV), .BP(BP)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        va = BV'(a); vb = BV'(b); pa = 3'd2; pb = 3'd5;
        #1;
        checks++;
        if (b > a) begin
          if (!(vsa == vb && vsb == va && psa == 3'd5 && psb == 3'd2 && swap)) failures++;
        end else begin
          if (!(vsa == va && vsb == vb && psa == 3'd2 && psb == 3'd5 && !swap)) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
