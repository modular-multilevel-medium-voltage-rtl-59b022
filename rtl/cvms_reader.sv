// cvms_reader: reads the CVMS memory array to pick the SMs to insert.
//
// Rows of the array are already ordered by capacitor voltage (row 0 is the
// lowest sub-range). When the arm current is positive the lowest-voltage SMs
// are wanted and the rows are read from the bottom up; otherwise from the top
// down. Each clock cycle either pops one position from the current row (and
// sets its gate bit) or, when that row is empty, moves to the next row, so a
// run takes n_ins cycles plus one per empty row passed over. The run ends
// when n_ins SMs are selected or the last row has been passed; `done` is a
// one-cycle pulse and `gate` (indexed by SM position) holds the selection
// until the next start. The one-row-per-cycle skipping is this design's
// choice; the document only says that an empty row sends the read to the
// next address.
module cvms_reader #(
  parameter int LEVELS = 64,  // FIFOs in the array
  parameter int N      = 64,  // SMs per arm at most
  parameter int BP     = 6,   // SM position width
  parameter int IW     = 16   // arm current width
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [$clog2(N+1)-1:0]    n_ins,
  input  logic signed [IW-1:0]      i_arm,
  // memory array side
  input  logic [LEVELS-1:0]         empty,
  input  logic [BP-1:0]             head_data,
  output logic                      pop,
  output logic [$clog2(LEVELS)-1:0] pop_addr,
  // result
  output logic [N-1:0]              gate,
  output logic                      busy,
  output logic                      done,
  output logic [$clog2(N+1)-1:0]    n_selected
);
  localparam int AW = $clog2(LEVELS);
  localparam int NW = $clog2(N + 1);

  logic          up;        // 1: bottom-to-top (lowest voltages first)
  logic [AW-1:0] addr;
  logic [NW-1:0] target;
  logic          at_end;

  assign pop_addr = addr;
  assign at_end   = up ? (addr == AW'(LEVELS - 1)) : (addr == '0);
  assign pop      = busy && (n_selected != target) && !empty[addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      up         <= 1'b0;
      addr       <= '0;
      target     <= '0;
      n_selected <= '0;
      gate       <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy       <= 1'b1;
        up         <= (i_arm > 0);
        addr       <= (i_arm > 0) ? '0 : AW'(LEVELS - 1);
        target     <= n_ins;
        n_selected <= '0;
        gate       <= '0;
      end else if (busy) begin
        if (n_selected == target) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else if (!empty[addr]) begin
          if (int'(head_data) < N) gate[head_data] <= 1'b1;
          n_selected <= n_selected + 1'b1;
        end else if (at_end) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          addr <= up ? addr + 1'b1 : addr - 1'b1;
        end
      end
    end
  end
endmodule
