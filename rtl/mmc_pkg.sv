// mmc_pkg: constants and elaboration-time functions shared by the capacitor
// voltage balancing (CVB) blocks of the MMC phase-leg controller.
//
// The Bitonic sorting network used here is the variant drawn with all
// comparators pointing the same way: every phase i (block size 2^i) starts
// with a "flip" stage that compares wire j of a block with its mirror wire,
// followed by half-cleaner stages at distances 2^(i-2) .. 1. An M = 2^P input
// network has S(M) = P(P+1)/2 stages of M/2 comparisons each. The functions
// below give, for stage `st` and comparator slot `k`, the two wires it
// connects (lo < hi), and the inverse (which slot and which side a wire uses).
// They are evaluated only at elaboration time to build the Map multiplexers.
package mmc_pkg;

  // Number of stages of an M = 2^p input Bitonic network.
  function automatic int bitonic_stages(input int p);
    return (p * (p + 1)) / 2;
  endfunction

  // Stages needed to sort the first 2^j wires completely (the sub-network
  // of Fig. 5 style modularisation): the first j phases.
  function automatic int bitonic_stages_for(input int j);
    return (j * (j + 1)) / 2;
  endfunction

  // Wire of the larger-index or smaller-index side of slot k in stage st.
  function automatic int bitonic_wire(input int p, input int st, input int k, input bit hi);
    int s, i, t, blk, half, j, d, grp, lo_w, hi_w;
    s = st;
    lo_w = 0;
    hi_w = 0;
    for (i = 1; i <= p; i++) begin
      if (s < i) begin
        t = s;
        if (t == 0) begin
          blk  = 1 << i;
          half = blk / 2;
          j    = k % half;
          lo_w = (k / half) * blk + j;
          hi_w = (k / half) * blk + blk - 1 - j;
        end else begin
          d    = 1 << (i - 1 - t);
          grp  = k / d;
          j    = k % d;
          lo_w = grp * 2 * d + j;
          hi_w = lo_w + d;
        end
        break;
      end
      s = s - i;
    end
    return hi ? hi_w : lo_w;
  endfunction

  // Comparator slot that wire w uses in stage st.
  function automatic int bitonic_slot(input int p, input int st, input int w);
    int k;
    for (k = 0; k < (1 << (p - 1)); k++) begin
      if (bitonic_wire(p, st, k, 1'b0) == w || bitonic_wire(p, st, k, 1'b1) == w)
        return k;
    end
    return 0;
  endfunction

  // 1 when wire w is the higher-index (smaller-value) side of its slot.
  function automatic bit bitonic_is_hi(input int p, input int st, input int w);
    return bitonic_wire(p, st, bitonic_slot(p, st, w), 1'b1) == w;
  endfunction

  // Number of bits needed to count 0..n.
  function automatic int cnt_bits(input int n);
    return $clog2(n + 1);
  endfunction

endpackage
