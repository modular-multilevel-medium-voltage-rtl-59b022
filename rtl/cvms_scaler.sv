// cvms_scaler: the "Map" of the capacitor voltage mapping strategy (CVMS).
//
// Converts a capacitor voltage into the address of the voltage sub-range it
// falls in: ADDR = floor((Vc - Vc_min) * (1/dV)), dV = (Vc_max - Vc_min)/M.
// As in the document it is a subtraction, a multiplication and a rounding
// step. 1/dV is an unsigned fixed-point input with FRAC fraction bits, so the
// sub-range width is set at run time; a value rounded up from the exact
// M*2^FRAC/(Vc_max-Vc_min) with FRAC >= 2*BV+2 reproduces the exact floor for
// every input code. The rounding step truncates: the document's worked
// example maps 0.9 V above Vc_min with dV = 0.5 V (1.8) to address 1, so its
// "round" is a floor. Voltages below Vc_min go to address 0 and addresses
// past the last FIFO are clamped to LEVELS-1, so with the range configured
// over all LEVELS rows every voltage at or above Vc_max lands in the top row,
// as in the document's simulations. A range configured over fewer rows
// leaves the rows above it for over-voltages, still in voltage order.
//
// Timing: two register stages; `out_valid`/`addr`/`out_pos` are valid two
// clock edges after `in_valid` is sampled, combinationally from the second
// stage, so the FIFO write happens on the third edge (3 cycles per SM).
// The fraction bits of the product are dropped on purpose (that is the
// truncation), so lint lists them as unused.
module cvms_scaler #(
  parameter int BV     = 12,          // capacitor voltage code width
  parameter int BP     = 6,           // SM position width
  parameter int LEVELS = 64,          // number of sub-ranges / FIFOs (M)
  parameter int FRAC   = 2 * BV + 2,  // fraction bits of inv_dv
  parameter int INVW   = FRAC + $clog2(LEVELS) + 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [BV-1:0]             vc,
  input  logic [BP-1:0]             in_pos,
  input  logic [BV-1:0]             vc_min,
  input  logic [INVW-1:0]           inv_dv,
  output logic                      out_valid,
  output logic [$clog2(LEVELS)-1:0] addr,
  output logic [BP-1:0]             out_pos
);
  localparam int AW = $clog2(LEVELS);
  localparam int PW = BV + INVW;

  // stage 1: subtraction
  logic          v1;
  logic [BV-1:0] vs1;
  logic [BP-1:0] p1;
  // stage 2: multiplication
  logic          v2;
  logic [PW-1:0] prod;
  logic [PW-FRAC-1:0] whole;   // integer part of the product, registered
  logic [BP-1:0] p2;

  assign prod = PW'(vs1) * PW'(inv_dv);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1  <= 1'b0;
      vs1 <= '0;
      p1  <= '0;
      v2  <= 1'b0;
      whole <= '0;
      p2  <= '0;
    end else begin
      v1  <= in_valid;
      vs1 <= (vc > vc_min) ? vc - vc_min : '0;
      p1  <= in_pos;
      v2  <= v1;
      whole <= prod[PW-1:FRAC];   // fraction bits dropped: truncation
      p2  <= p1;
    end
  end

  // clamping of the truncated address
  always_comb begin
    addr      = (whole >= (PW-FRAC)'(LEVELS)) ? AW'(LEVELS - 1) : AW'(whole);
    out_valid = v2;
    out_pos   = p2;
  end
endmodule
