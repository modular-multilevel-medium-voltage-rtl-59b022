// sn_balancer: capacitor voltage balancing with the sorting network for
// ARMS converter arms that share one factorized Bitonic sorter.
//
// In the MMC controller the ranking runs once per sampling period for all
// six arms of a three-phase converter, so one network is time-shared: the
// arms are sorted one after another, and after each sort that arm's
// sm_selection turns the ranking, its insertion index and its arm-current
// sign into the arm's gate pattern (lowest voltages in when the current is
// positive, highest otherwise).
//
// `start` (sampled while idle) captures vc, n_sm, n_ins and i_arm of all
// arms. Arm a's sort starts one cycle after the previous arm's sort ended
// (the first one cycle after start) and takes 3*j(j+1)/2 cycles,
// j = ceil(log2(n_sm)) (at least 1); its gate vector is updated one cycle
// after its sort ends and `arm_done[a]` pulses then. `done` pulses with the
// last arm's update. A whole run is ARMS*(3*j(j+1)/2 + 1) + 1 cycles.
// Gate vectors are held between runs. The sorted voltages are only read by
// an assertion; the selection needs the positions alone. Assertions are
// disabled during reset, which some lint tools report as rst_n being used
// both synchronously and asynchronously; it is not a circuit issue.
module sn_balancer #(
  parameter int ARMS = 6,   // arms sharing the sorter
  parameter int M    = 64,  // sorter inputs / SMs per arm at most
  parameter int BV   = 12,  // capacitor voltage code width
  parameter int BP   = 6,   // SM position width
  parameter int IW   = 16   // arm current width
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                start,
  input  logic [$clog2(M+1)-1:0]              n_sm,
  input  logic [ARMS-1:0][$clog2(M+1)-1:0]    n_ins,
  input  logic [ARMS-1:0][IW-1:0]             i_arm,   // two's complement
  input  logic [ARMS-1:0][M-1:0][BV-1:0]      vc,
  output logic [ARMS-1:0][M-1:0]              gate,
  output logic [ARMS-1:0]                     arm_done,
  output logic                                busy,
  output logic                                done
);
  localparam int NW = $clog2(M + 1);
  localparam int AW = (ARMS > 1) ? $clog2(ARMS) : 1;

  logic [ARMS-1:0][M-1:0][BV-1:0] vc_q;
  logic [ARMS-1:0][NW-1:0]        n_ins_q;
  logic [ARMS-1:0][IW-1:0]        i_q;
  logic [NW-1:0]                  n_sm_q;
  logic [AW-1:0]                  arm;
  logic                           running, kick;
  logic                           sort_busy, sort_done;
  logic [M-1:0][BV-1:0]           v_sorted;
  logic [M-1:0][BP-1:0]           p_sorted;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vc_q    <= '0;
      n_ins_q <= '0;
      i_q     <= '0;
      n_sm_q  <= '0;
      arm     <= '0;
      running <= 1'b0;
      kick    <= 1'b0;
    end else begin
      kick <= 1'b0;
      if (start && !running) begin
        vc_q    <= vc;
        n_ins_q <= n_ins;
        i_q     <= i_arm;
        n_sm_q  <= n_sm;
        arm     <= '0;
        running <= 1'b1;
        kick    <= 1'b1;
      end else if (running && sort_done) begin
        if (arm == AW'(ARMS - 1)) running <= 1'b0;
        else begin
          arm  <= arm + 1'b1;
          kick <= 1'b1;
        end
      end
    end
  end

  bitonic_sorter #(.M(M), .BV(BV), .BP(BP)) u_sort (
    .clk, .rst_n,
    .start   (kick),
    .n_sm    (n_sm_q),
    .vc      (vc_q[arm]),
    .v_sorted,
    .p_sorted,
    .busy    (sort_busy),
    .done    (sort_done)
  );

  for (genvar a = 0; a < ARMS; a++) begin : g_arm
    sm_selection #(.M(M), .BP(BP), .IW(IW)) u_sel (
      .clk, .rst_n,
      .load    (sort_done && arm == AW'(a)),
      .p_sorted,
      .n_sm    (n_sm_q),
      .n_ins   (n_ins_q[a]),
      .i_arm   (i_q[a]),
      .gate    (gate[a]),
      .valid   (arm_done[a])
    );
  end

  assign done = arm_done[ARMS-1];
  assign busy = running || done;

  // The shared sorter is only started while it is idle.
  a_kick_idle: assert property (@(posedge clk) disable iff (!rst_n) kick |-> !sort_busy);
  // The ranking handed to the selections is in decreasing voltage order.
  a_ranked: assert property (@(posedge clk) disable iff (!rst_n)
    sort_done |-> (v_sorted[0] >= v_sorted[M/2]) && (v_sorted[M/2] >= v_sorted[M-1]));
endmodule
