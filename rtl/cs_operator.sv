// cs_operator: Comparator-and-Swap (CS) element of the sorting network.
//
// One magnitude comparator and four 2:1 multiplexers, purely combinational.
// When vb > va the comparator output is 1 and both the voltages and the SM
// positions are swapped; otherwise (vb <= va, ties included) they pass
// straight through. Output "a" therefore carries the larger voltage and
// output "b" the smaller one, so a chain of these produces a list in
// decreasing voltage order with the physical SM position travelling along
// with its voltage. This follows the document's CS structure; the voltage
// width BV and the position width BP are parameters (document: 12 and 6).
module cs_operator #(
  parameter int BV = 12,  // capacitor voltage (comparison key) width
  parameter int BP = 6    // SM position width
) (
  input  logic [BV-1:0] va,
  input  logic [BP-1:0] pa,
  input  logic [BV-1:0] vb,
  input  logic [BP-1:0] pb,
  output logic [BV-1:0] vsa,  // larger voltage
  output logic [BP-1:0] psa,
  output logic [BV-1:0] vsb,  // smaller voltage
  output logic [BP-1:0] psb,
  output logic          swap  // comparator output
);
  always_comb begin
    swap = (vb > va);
    vsa  = swap ? vb : va;
    vsb  = swap ? va : vb;
    psa  = swap ? pb : pa;
    psb  = swap ? pa : pb;
  end
endmodule
