// sm_selection: SM selection step of the capacitor voltage balancing.
//
// Takes the SM positions ranked by decreasing capacitor voltage, the number
// of SMs present in the arm (n_sm), the insertion index n_ins from the
// nearest level control and the arm current. As the document's flowchart
// prescribes, when the arm current is positive (it charges the inserted
// capacitors) the n_ins SMs with the lowest voltages are inserted, otherwise
// the n_ins SMs with the highest voltages. Ranks 0..n_sm-1 hold the real SMs
// (dummies are sorted behind them), so "lowest" means ranks
// n_sm-n_ins .. n_sm-1. n_ins is clamped to n_sm.
// The gate vector, indexed by physical SM position (1 = inserted), is
// registered on `load` and held until the next load; `valid` is a one-cycle
// pulse one cycle after `load`.
module sm_selection #(
  parameter int M  = 64,  // list length / SMs per arm at most
  parameter int BP = 6,   // SM position width
  parameter int IW = 16   // arm current width (two's complement)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic [M-1:0][BP-1:0]   p_sorted,
  input  logic [$clog2(M+1)-1:0] n_sm,
  input  logic [$clog2(M+1)-1:0] n_ins,
  input  logic signed [IW-1:0]   i_arm,
  output logic [M-1:0]           gate,
  output logic                   valid
);
  localparam int NW = $clog2(M + 1);

  logic [NW-1:0] n_eff;
  logic [NW-1:0] first, last_x;   // selected ranks: first <= r < last_x
  logic [M-1:0]  gate_next;

  always_comb begin
    n_eff = (n_ins > n_sm) ? n_sm : n_ins;
    if (i_arm > 0) begin
      first  = n_sm - n_eff;
      last_x = n_sm;
    end else begin
      first  = '0;
      last_x = n_eff;
    end
    gate_next = '0;
    for (int r = 0; r < M; r++) begin
      if (r >= int'(first) && r < int'(last_x) && int'(p_sorted[r]) < M)
        gate_next[p_sorted[r]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gate  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= load;
      if (load) gate <= gate_next;
    end
  end
endmodule
