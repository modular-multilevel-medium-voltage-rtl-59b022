// tb_bitonic_fsm: checks the gather/compare/scatter sequence of the sorting
// network controller, the stage counter and the 3-cycles-per-stage timing of
// the done pulse, for full and shortened runs.
module tb_bitonic_fsm;
  localparam int STAGES = 6;
  localparam int SW = $clog2(STAGES + 1);
  logic clk = 0, rst_n = 0, start = 0;
  logic [SW-1:0] last_stage, stage;
  logic gather_en, gather_ext, compare_en, scatter_en, busy, done;
  int checks = 0, failures = 0;

  bitonic_fsm #(.STAGES(STAGES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int nstages);
    int cyc, ng, nc, ns;
    ng = 0; nc = 0; ns = 0;
    @(negedge clk);
    start = 1; last_stage = SW'(nstages - 1);
    #1;
    checks++;
    if (!(gather_en && gather_ext)) failures++;
    @(posedge clk); ng++;
    @(negedge clk);
    start = 0; last_stage = '0;
    cyc = 1;
    while (!done && cyc < 200) begin
      // exactly one enable per cycle, in order gather -> compare -> scatter
      checks++;
      if (int'(gather_en) + int'(compare_en) + int'(scatter_en) != 1) begin failures++; $display("enables at %0d", cyc); end
      if (gather_ext) failures++;
      if (gather_en) ng++;
      if (compare_en) nc++;
      if (scatter_en) begin
        ns++;
        checks++;
        if (stage != SW'(ns - 1)) begin failures++; $display("stage %0d at %0d", stage, ns); end
      end
      @(posedge clk); @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 3 * nstages) begin
      failures++;
      $display("latency %0d expected %0d", cyc, 3 * nstages);
    end
    checks++;
    if (ng != nstages || nc != nstages || ns != nstages) begin failures++; $display("counts %0d %0d %0d", ng, nc, ns); end
    @(negedge clk);
    checks++;
    if (done || busy) begin failures++; $display("not idle"); end
  endtask

  initial begin
    last_stage = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(6);
    run(3);
    run(1);
    run(6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
