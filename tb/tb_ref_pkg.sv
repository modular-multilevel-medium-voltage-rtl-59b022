// tb_ref_pkg: reference models used by the testbenches, written directly
// from the balancing rules rather than from the RTL structure.
package tb_ref_pkg;

  // Exact sub-range address: floor((vc - vmin) * levels / (vmax - vmin)),
  // below vmin -> 0, at or above vmax -> levels-1.
  function automatic int ref_addr(int vc, int vmin, int vmax, int levels);
    longint a;
    if (vc <= vmin) return 0;
    a = (longint'(vc - vmin) * levels) / (vmax - vmin);
    if (a >= levels) return levels - 1;
    return int'(a);
  endfunction

  // Same, for hardware with hw_levels FIFOs configured for `levels`
  // sub-ranges: voltages above vmax keep climbing the rows up to the last one.
  function automatic int ref_addr_hw(int vc, int vmin, int vmax, int levels, int hw_levels);
    longint a;
    if (vc <= vmin) return 0;
    a = (longint'(vc - vmin) * levels) / (vmax - vmin);
    if (a >= hw_levels) return hw_levels - 1;
    return int'(a);
  endfunction

  // 1/dV as an unsigned fixed-point number with frac fraction bits, rounded up.
  function automatic longint ref_inv(int vmin, int vmax, int levels, int frac);
    longint num;
    num = longint'(levels) << frac;
    return (num + (vmax - vmin) - 1) / (vmax - vmin);
  endfunction

  // Nearest-level insertion index round(n * vref / vdc), saturated at n.
  function automatic int ref_nlc(int n, int vref, int vdc);
    longint q;
    if (vdc == 0) return 0;
    q = (2 * longint'(n) * vref + vdc) / (2 * longint'(vdc));
    return (q > n) ? n : int'(q);
  endfunction

  // Checks that a gate pattern is a valid balancing choice for key values
  // (voltages or sub-range addresses): exactly min(n_ins, n_sm) real SMs,
  // and every selected key on the correct side of every unselected key.
  // Returns the number of violated rules.
  function automatic int ref_check_choice(int key[], int n_sm, int n_ins, bit i_pos,
                                          logic [127:0] gate);
    int cnt, errs, want;
    int sel_max, sel_min, un_max, un_min;
    errs = 0; cnt = 0;
    sel_max = -1; sel_min = 1 << 30; un_max = -1; un_min = 1 << 30;
    want = (n_ins > n_sm) ? n_sm : n_ins;
    for (int i = 0; i < 128; i++) begin
      if (gate[i]) begin
        if (i >= n_sm) errs++;
        else begin
          cnt++;
          if (key[i] > sel_max) sel_max = key[i];
          if (key[i] < sel_min) sel_min = key[i];
        end
      end else if (i < n_sm) begin
        if (key[i] > un_max) un_max = key[i];
        if (key[i] < un_min) un_min = key[i];
      end
    end
    if (cnt != want) errs++;
    if (cnt > 0 && cnt < n_sm) begin
      if (i_pos && sel_max > un_min) errs++;
      if (!i_pos && sel_min < un_max) errs++;
    end
    return errs;
  endfunction

  // Exact CVMS choice: rows in address order (ascending when i_pos, else
  // descending), SMs within a row in the order they were stored (position
  // ascending); the first min(n_ins, n_sm) are inserted.
  function automatic logic [127:0] ref_cvms_gate(int addr[], int n_sm, int n_ins,
                                                 bit i_pos, int levels);
    logic [127:0] g;
    int left, r;
    g = '0;
    left = (n_ins > n_sm) ? n_sm : n_ins;
    for (int t = 0; t < levels; t++) begin
      r = i_pos ? t : levels - 1 - t;
      for (int i = 0; i < n_sm; i++) begin
        if (left > 0 && addr[i] == r) begin
          g[i] = 1'b1;
          left--;
        end
      end
    end
    return g;
  endfunction

endpackage
