// mmc_cvb_ctrl: capacitor voltage balancing controller of a three-phase
// Modular Multilevel Converter (MMC).
//
// Each of the six arms (a-upper, a-lower, b-upper, ...) is a string of up to
// N half-bridge sub-modules (SMs). Every sampling period the nearest level
// control (NLC) turns an arm's reference voltage into the number of SMs to
// insert, and the capacitor voltage balancing (CVB) decides which SMs those
// are: the lowest-voltage ones when the arm current charges them, the
// highest-voltage ones otherwise. Two CVB engines run side by side on the
// same inputs, the two ways of ranking the SMs built here:
//   - sn_balancer: one factorized Bitonic sorting network (N/2 shared
//     comparator-and-swap units, 3 cycles per stage), time-shared by the
//     six arms, followed by per-arm SM selection;
//   - cvms_balancer (one per arm): the sorting-less capacitor voltage
//     mapping strategy, which stores every SM in the FIFO of its voltage
//     sub-range and reads the FIFOs in voltage order.
// Each engine produces a gate vector per arm; which one drives the SM gate
// units is left to the integrator.
//
// Timing: `sample` (one cycle) loads the six NLC results; both engines start
// one cycle later. For N = 64 SMs the sorting-network engine updates its six
// gate vectors within 6*(63+1)+1 cycles, each CVMS engine within
// 3*64 + 64 + 64 + 5 cycles. sn_done / cvms_done pulse on completion.
// Arm order in all arrays: 0 = a upper, 1 = a lower, 2 = b upper,
// 3 = b lower, 4 = c upper, 5 = c lower.
// The outer current control, the circulating current control, the ADCs and
// the power stage are outside: arm references, DC-link voltage, arm
// currents and capacitor voltage codes are inputs, gate vectors outputs.
// The assertions of this design are disabled during reset, which some lint tools report
// as rst_n being used both synchronously and asynchronously; the flops
// themselves all reset asynchronously.
module mmc_cvb_ctrl #(
  parameter int ARMS   = 6,           // arms of a three-phase MMC
  parameter int N      = 64,          // SMs per arm at most (sorter inputs M)
  parameter int BV     = 12,          // capacitor voltage code width
  parameter int BP     = 6,           // SM position width
  parameter int VW     = 16,          // arm reference / DC-link code width
  parameter int IW     = 16,          // arm current width
  parameter int LEVELS = 64,          // CVMS sub-ranges (FIFOs) per arm
  parameter int FRAC   = 2 * BV + 2,  // fraction bits of inv_dv
  parameter int INVW   = FRAC + $clog2(LEVELS) + 1
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             sample,
  input  logic [$clog2(N+1)-1:0]           n_sm,      // SMs present per arm
  input  logic [VW-1:0]                    vdc,       // DC-link voltage
  input  logic [ARMS-1:0][VW-1:0]          vref,      // arm reference voltages
  input  logic [ARMS-1:0][IW-1:0]          i_arm,     // arm currents, two's complement
  input  logic [ARMS-1:0][N-1:0][BV-1:0]   vc,        // capacitor voltage codes
  input  logic [BV-1:0]                    vc_min,    // CVMS: bottom of the mapped range
  input  logic [INVW-1:0]                  inv_dv,    // CVMS: 1/dV, FRAC fraction bits
  output logic [ARMS-1:0][$clog2(N+1)-1:0] n_ins,     // NLC insertion indices
  output logic [ARMS-1:0][N-1:0]           gate_sn,   // sorting-network gate vectors
  output logic [ARMS-1:0][N-1:0]           gate_cvms, // CVMS gate vectors
  output logic [ARMS-1:0]                  sn_arm_done,
  output logic                             sn_done,
  output logic [ARMS-1:0]                  cvms_done,
  output logic [ARMS-1:0]                  cvms_overflow,
  output logic                             busy
);
  logic            go;
  logic            sn_busy;
  logic [ARMS-1:0] cvms_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) go <= 1'b0;
    else        go <= sample;
  end

  for (genvar a = 0; a < ARMS; a++) begin : g_arm
    nlc #(.VW(VW), .M(N)) u_nlc (
      .clk, .rst_n, .load(sample), .vref(vref[a]), .vdc, .n_sm, .n_ins(n_ins[a]));

    cvms_balancer #(.N(N), .BV(BV), .BP(BP), .LEVELS(LEVELS), .IW(IW),
                    .FRAC(FRAC), .INVW(INVW)) u_cvms (
      .clk, .rst_n, .start(go), .n_sm, .n_ins(n_ins[a]), .i_arm(i_arm[a]),
      .vc(vc[a]), .vc_min, .inv_dv, .gate(gate_cvms[a]), .busy(cvms_busy[a]),
      .done(cvms_done[a]), .overflow(cvms_overflow[a]));
  end

  sn_balancer #(.ARMS(ARMS), .M(N), .BV(BV), .BP(BP), .IW(IW)) u_sn (
    .clk, .rst_n, .start(go), .n_sm, .n_ins, .i_arm, .vc,
    .gate(gate_sn), .arm_done(sn_arm_done), .busy(sn_busy), .done(sn_done));

  assign busy = go || sn_busy || (|cvms_busy);
endmodule
