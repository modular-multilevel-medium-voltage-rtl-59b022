// cvms_fifo_array: memory array of the capacitor voltage mapping strategy.
//
// LEVELS first-in-first-out memories, one per voltage sub-range, each DEPTH
// cells of BP bits holding SM positions. Seen as a matrix, the row is the
// sub-range address and the column the fill level of that row's FIFO. The
// document sizes DEPTH = N (number of SMs), which can never overflow; it
// notes N/2 would usually suffice. A push into a full row is dropped and
// sets the sticky `overflow` flag (cleared by `clear`).
//
// Interface: `clear` empties every FIFO in one cycle (pointers reset, data
// kept). `push` writes push_data at the tail of row push_addr. `pop` advances
// the head of row pop_addr; head_data shows that row's head combinationally.
// empty[r] is 1 when row r holds nothing unread. A push and a pop in the
// same cycle are allowed (the balancer never does both).
module cvms_fifo_array #(
  parameter int LEVELS = 64,  // number of FIFOs (M)
  parameter int DEPTH  = 64,  // cells per FIFO (N)
  parameter int BP     = 6    // SM position width
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      push,
  input  logic [$clog2(LEVELS)-1:0] push_addr,
  input  logic [BP-1:0]             push_data,
  input  logic                      pop,
  input  logic [$clog2(LEVELS)-1:0] pop_addr,
  output logic [BP-1:0]             head_data,
  output logic [LEVELS-1:0]         empty,
  output logic                      overflow
);
  localparam int CW = $clog2(DEPTH + 1);
  localparam int DW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [BP-1:0] mem [LEVELS * DEPTH];
  logic [CW-1:0] wr_cnt [LEVELS];
  logic [CW-1:0] rd_ptr [LEVELS];
  logic          full_w;

  assign full_w = (wr_cnt[push_addr] == CW'(DEPTH));

  always_ff @(posedge clk) begin
    if (push && !clear && !full_w)
      mem[int'(push_addr) * DEPTH + int'(wr_cnt[push_addr])] <= push_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < LEVELS; r++) begin
        wr_cnt[r] <= '0;
        rd_ptr[r] <= '0;
      end
      overflow <= 1'b0;
    end else if (clear) begin
      for (int r = 0; r < LEVELS; r++) begin
        wr_cnt[r] <= '0;
        rd_ptr[r] <= '0;
      end
      overflow <= 1'b0;
    end else begin
      if (push) begin
        if (full_w) overflow <= 1'b1;
        else        wr_cnt[push_addr] <= wr_cnt[push_addr] + 1'b1;
      end
      if (pop && !empty[pop_addr]) rd_ptr[pop_addr] <= rd_ptr[pop_addr] + 1'b1;
    end
  end

  always_comb begin
    for (int r = 0; r < LEVELS; r++) empty[r] = (rd_ptr[r] == wr_cnt[r]);
    head_data = mem[int'(pop_addr) * DEPTH + int'(DW'(rd_ptr[pop_addr]))];
  end
endmodule
