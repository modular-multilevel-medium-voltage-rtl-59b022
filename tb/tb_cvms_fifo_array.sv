// tb_cvms_fifo_array: pushes random positions into random rows, checks the
// per-row first-in-first-out order (the array is cleared before each
// fill, as in use) and the empty flags against a queue
// model, then fills one row beyond its depth to see the overflow flag, and
// checks that clear empties every row.
module tb_cvms_fifo_array;
  localparam int LEVELS = 8, DEPTH = 4, BP = 6;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0, overflow;
  logic [2:0] push_addr, pop_addr;
  logic [BP-1:0] push_data, head_data;
  logic [LEVELS-1:0] empty;
  int checks = 0, failures = 0;
  int q[LEVELS][$];

  cvms_fifo_array #(.LEVELS(LEVELS), .DEPTH(DEPTH), .BP(BP)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_empty();
    for (int r = 0; r < LEVELS; r++) begin
      checks++;
      if (empty[r] != (q[r].size() == 0)) begin failures++; if (failures < 5) $display("empty row %0d %b size %0d", r, empty[r], q[r].size()); end
    end
  endtask

  initial begin
    push_addr = '0; pop_addr = '0; push_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_empty();
    for (int round = 0; round < 30; round++) begin
      // every sampling period starts from a cleared array
      clear = 1;
      @(negedge clk);
      clear = 0;
      // fill
      for (int i = 0; i < 12; i++) begin
        int r;
        r = int'($urandom_range(0, LEVELS - 1));
        if (q[r].size() < DEPTH) begin
          push_addr = 3'(r); push_data = BP'($urandom); push = 1;
          q[r].push_back(int'(push_data));
          @(negedge clk);
          push = 0;
        end
      end
      check_empty();
      // drain every row in order
      for (int r = 0; r < LEVELS; r++) begin
        pop_addr = 3'(r);
        while (q[r].size() > 0) begin
          #1;
          checks++;
          if (int'(head_data) != q[r][0] || empty[r]) begin failures++; if (failures < 5) $display("row %0d head %0d want %0d empty %b", r, head_data, q[r][0], empty[r]); end
          void'(q[r].pop_front());
          pop = 1;
          @(negedge clk);
          pop = 0;
        end
      end
      check_empty();
    end
    // overflow: DEPTH+1 pushes into one row
    for (int i = 0; i <= DEPTH; i++) begin
      push_addr = 3'd5; push_data = BP'(i); push = 1;
      @(negedge clk);
    end
    push = 0;
    checks++;
    if (!overflow) failures++;
    pop_addr = 3'd5;
    #1;
    checks++;
    if (head_data != '0) failures++;
    // clear
    clear = 1;
    @(negedge clk);
    clear = 0;
    checks++;
    if (overflow || empty != '1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
