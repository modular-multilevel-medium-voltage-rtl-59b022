// nlc: nearest level control of one MMC arm.
//
// Computes the number of SMs to insert, N_pm = round(n_sm * Vref / Vdc), the
// arm reference voltage expressed in SM levels and rounded to the nearest
// level. Vref and Vdc are unsigned codes of the same scale; Vref above Vdc
// saturates at n_sm and Vdc = 0 gives 0. Rounding is half-up, done as
// floor((2*n_sm*Vref + Vdc) / (2*Vdc)). The result is registered on `load`.
// The document states the rule in two forms: "n_pm = round(V_ref_pm / V_dc)"
// in its equation and "N_pm = round(N * n_pm)" in its flowchart; this block
// implements the combination of both (normalised reference times the number
// of SMs). The divider is combinational.
module nlc #(
  parameter int VW = 16,  // voltage code width
  parameter int M  = 64   // SMs per arm at most
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic [VW-1:0]          vref,
  input  logic [VW-1:0]          vdc,
  input  logic [$clog2(M+1)-1:0] n_sm,
  output logic [$clog2(M+1)-1:0] n_ins
);
  localparam int NW = $clog2(M + 1);
  localparam int PW = VW + NW + 2;

  logic [PW-1:0] num, den, quo;
  logic [NW-1:0] n_next;

  always_comb begin
    num = (PW'(n_sm) * PW'(vref) << 1) + PW'(vdc);
    den = PW'(vdc) << 1;
    quo = (vdc == '0) ? '0 : num / den;
    n_next = (quo > PW'(n_sm)) ? n_sm : NW'(quo);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n_ins <= '0;
    else if (load) n_ins <= n_next;
  end
endmodule
