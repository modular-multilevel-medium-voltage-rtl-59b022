// bitonic_sorter: M-input Bitonic sorting network at the maximum
// factorization level, for the capacitor voltages of one MMC arm.
//
// Each list element is a capacitor voltage together with the physical
// position of its sub-module (SM); the result lists the SMs in decreasing
// voltage order. Only M/2 CS operators exist. A Map multiplexer network
// routes, for every stage, the right pair of working registers into each CS
// operator (gather, en1), the CS outputs are registered (compare, en2) and
// written back to the wires of that stage (scatter); bitonic_fsm sequences
// this, three cycles per stage, 3*P(P+1)/2 cycles for a full list of M = 2^P
// elements (18 cycles for M = 8, 63 for M = 64).
//
// An arm with n_sm < M SMs fills the unused inputs with dummy elements of
// voltage 0 and position all-ones (the document's "P = -1"), so they sink to
// the end of the list. Because the network is modular, the first 2^j wires
// are completely sorted after the first j phases; the sorter therefore stops
// after j(j+1)/2 stages, j = ceil(log2(n_sm)), and raises `done` early.
// This design's own choice: the comparison key is {voltage, real} so that a
// real SM wins a tie against a dummy; the document compares voltages only.
//
// Interface: `start` (one cycle, while idle) samples `vc` and `n_sm`; the
// outputs `v_sorted`/`p_sorted` are valid from the `done` pulse until the next
// start. Positions are 0-based wire indices.
// The CS operators' swap outputs are left open: the stage needs only the
// routed data, not the comparison result.
// The assertions of this design are disabled during reset, which some lint tools report
// as rst_n being used both synchronously and asynchronously; the flops
// themselves all reset asynchronously.
module bitonic_sorter
  import mmc_pkg::*;
#(
  parameter int M  = 64,  // inputs of the network (power of two)
  parameter int BV = 12,  // capacitor voltage width
  parameter int BP = 6    // SM position width, log2(M)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [$clog2(M+1)-1:0]   n_sm,
  input  logic [M-1:0][BV-1:0]     vc,
  output logic [M-1:0][BV-1:0]     v_sorted,
  output logic [M-1:0][BP-1:0]     p_sorted,
  output logic                     busy,
  output logic                     done
);
  localparam int P      = $clog2(M);
  localparam int S      = bitonic_stages(P);
  localparam int SW     = $clog2(S + 1);
  localparam int NW     = $clog2(M + 1);
  localparam int KW     = BV + 1;          // comparison key: {voltage, real}
  localparam int HALF   = M / 2;

  typedef struct packed {
    logic [KW-1:0] key;
    logic [BP-1:0] pos;
  } elem_t;

  // Stage count for n_sm SMs: first ceil(log2(n_sm)) phases, at least one.
  function automatic logic [SW-1:0] stages_for_n(input logic [NW-1:0] n);
    int j;
    j = 1;
    while (j < P && (1 << j) < int'(n)) j++;
    return SW'(bitonic_stages_for(j) - 1);
  endfunction

  logic gather_en, gather_ext, compare_en, scatter_en;
  logic [SW-1:0] stage;

  bitonic_fsm #(.STAGES(S)) u_fsm (
    .clk, .rst_n, .start,
    .last_stage (stages_for_n(n_sm)),
    .gather_en, .gather_ext, .compare_en, .scatter_en,
    .stage, .busy, .done
  );

  // Input elements with dummy filling.
  elem_t ext [M];
  always_comb begin
    for (int w = 0; w < M; w++) begin
      if (w < int'(n_sm)) ext[w] = '{key: {vc[w], 1'b1}, pos: BP'(w)};
      else                ext[w] = '{key: '0, pos: '1};
    end
  end

  elem_t work [M];          // working registers, one per wire
  elem_t in_a [HALF];       // CS input registers (en1)
  elem_t in_b [HALF];
  elem_t out_a [HALF];      // CS output registers (en2)
  elem_t out_b [HALF];
  elem_t cs_a [HALF];       // CS combinational results
  elem_t cs_b [HALF];

  // Map: per stage, the wires feeding each slot and the slot feeding each wire.
  elem_t cand_a [S][HALF];
  elem_t cand_b [S][HALF];
  elem_t back   [S][M];

  for (genvar s = 0; s < S; s++) begin : g_stage
    for (genvar k = 0; k < HALF; k++) begin : g_slot
      localparam int LO = bitonic_wire(P, s, k, 1'b0);
      localparam int HI = bitonic_wire(P, s, k, 1'b1);
      if (s == 0) begin : g_first
        assign cand_a[s][k] = ext[LO];
        assign cand_b[s][k] = ext[HI];
      end else begin : g_later
        assign cand_a[s][k] = work[LO];
        assign cand_b[s][k] = work[HI];
      end
    end
    for (genvar w = 0; w < M; w++) begin : g_wire
      localparam int K   = bitonic_slot(P, s, w);
      localparam bit IHI = bitonic_is_hi(P, s, w);
      assign back[s][w] = IHI ? out_b[K] : out_a[K];
    end
  end

  for (genvar k = 0; k < HALF; k++) begin : g_cs
    cs_operator #(.BV(KW), .BP(BP)) u_cs (
      .va (in_a[k].key), .pa (in_a[k].pos),
      .vb (in_b[k].key), .pb (in_b[k].pos),
      .vsa(cs_a[k].key), .psa(cs_a[k].pos),
      .vsb(cs_b[k].key), .psb(cs_b[k].pos),
      .swap()
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < HALF; k++) begin
        in_a[k]  <= '0;
        in_b[k]  <= '0;
        out_a[k] <= '0;
        out_b[k] <= '0;
      end
      for (int w = 0; w < M; w++) work[w] <= '0;
    end else begin
      if (gather_en) begin
        for (int k = 0; k < HALF; k++) begin
          in_a[k] <= gather_ext ? cand_a[0][k] : cand_a[stage][k];
          in_b[k] <= gather_ext ? cand_b[0][k] : cand_b[stage][k];
        end
      end
      if (compare_en) begin
        for (int k = 0; k < HALF; k++) begin
          out_a[k] <= cs_a[k];
          out_b[k] <= cs_b[k];
        end
      end
      if (scatter_en) begin
        for (int w = 0; w < M; w++) work[w] <= back[stage][w];
      end
    end
  end

  always_comb begin
    for (int w = 0; w < M; w++) begin
      v_sorted[w] = work[w].key[KW-1:1];
      p_sorted[w] = work[w].pos;
    end
  end

  initial assert (M == (1 << P) && M >= 2) else $error("M must be a power of two");
  initial assert (BP >= P) else $error("BP too small for M positions");
endmodule
