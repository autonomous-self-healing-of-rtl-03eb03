// nsclb_ref_pkg: reference models shared by the testbenches of the
// self-healing CLB fabric. They are written independently of the RTL:
// the nearest spare is found by growing a search distance, and the fabric
// is evaluated one clock at a time from its configuration words.
package nsclb_ref_pkg;
  import nsclb_pkg::*;

  // Nearest free spare to CLB f; on equal distance the higher CLB number.
  // Returns -1 when there is none.
  function automatic int ref_nearest(int f, logic [N_CLB-1:0] spare);
    for (int d = 1; d < N_CLB; d++) begin
      if (f + d < N_CLB && spare[f + d]) return f + d;
      if (f - d >= 0 && spare[f - d]) return f - d;
    end
    return -1;
  endfunction

  // Value of source s given CLB outputs q and primary inputs pins.
  function automatic logic ref_src(int s, logic [N_CLB-1:0] q, logic [N_IN-1:0] pins);
    if (s < N_CLB) return q[s];
    if (s < N_CLB + N_IN) return pins[s - N_CLB];
    return 1'b0;
  endfunction

  // CLB outputs after one clock.
  function automatic logic [N_CLB-1:0] ref_step(clb_cfg_array_t cfg, logic [N_CLB-1:0] q,
                                                logic [N_IN-1:0] pins, logic [N_CLB-1:0] defect);
    logic [N_CLB-1:0] nq;
    for (int i = 0; i < N_CLB; i++) begin
      int a;
      a = 0;
      for (int k = 0; k < LUT_K; k++)
        if (ref_src(int'(cfg[i].sel[k]), q, pins)) a += (1 << k);
      nq[i] = cfg[i].used && !defect[i] && cfg[i].lut[a];
    end
    return nq;
  endfunction

  // Output pin values given CLB outputs.
  function automatic logic [N_OUT-1:0] ref_pins(out_cfg_array_t ocfg, logic [N_CLB-1:0] q);
    logic [N_OUT-1:0] p;
    for (int o = 0; o < N_OUT; o++)
      p[o] = ocfg[o].en && int'(ocfg[o].sel) < N_CLB && q[ocfg[o].sel];
    return p;
  endfunction

  // A random CLB word whose inputs come from the primary inputs or from the
  // CLBs listed in `srcs` (n entries).
  function automatic clb_cfg_t rand_word(int srcs[$]);
    clb_cfg_t w;
    w.used = 1'b1;
    w.lut  = LUT_N'({$urandom, $urandom});
    for (int k = 0; k < LUT_K; k++) begin
      if (srcs.size() > 0 && ($urandom % 2) == 1)
        w.sel[k] = src_t'(srcs[$urandom % srcs.size()]);
      else
        w.sel[k] = src_t'(N_CLB + ($urandom % N_IN));
    end
    return w;
  endfunction

  // Repairs every active faulty CLB of the configuration in ascending
  // order, as the restructuring unit should: the word moves to the nearest
  // spare, the faulty CLB is cleared and every connection to it follows.
  // repl[f] receives the spare chosen for f; unrec marks CLBs left without
  // a spare. Returns the clocks the repairs keep the unit busy: 2 for a
  // CLB without spare, 5 + R otherwise, R being the larger of the CLB words
  // and the output pins that still name the faulty CLB after the copy.
  function automatic int ref_heal(ref clb_cfg_array_t c, ref out_cfg_array_t o,
                                  input logic [N_CLB-1:0] fault, ref int repl[N_CLB],
                                  ref logic [N_CLB-1:0] unrec);
    int cycles;
    cycles = 0;
    forever begin
      int f, s, rc, ro;
      logic [N_CLB-1:0] sp;
      f = -1;
      for (int i = N_CLB - 1; i >= 0; i--)
        if (c[i].used && fault[i] && !unrec[i]) f = i;
      if (f < 0) break;
      for (int i = 0; i < N_CLB; i++) sp[i] = !c[i].used && !fault[i];
      s = ref_nearest(f, sp);
      if (s < 0) begin
        unrec[f] = 1'b1;
        cycles += 2;
        continue;
      end
      c[s] = c[f];
      c[f] = '0;
      repl[f] = s;
      rc = 0; ro = 0;
      for (int i = 0; i < N_CLB; i++) begin
        bit hit;
        hit = 0;
        for (int k = 0; k < LUT_K; k++)
          if (c[i].used && int'(c[i].sel[k]) == f) begin
            c[i].sel[k] = src_t'(s);
            hit = 1;
          end
        rc += int'(hit);
      end
      for (int p = 0; p < N_OUT; p++)
        if (o[p].en && int'(o[p].sel) == f) begin
          o[p].sel = clb_idx_t'(s);
          ro++;
        end
      cycles += 5 + (rc > ro ? rc : ro);
    end
    return cycles;
  endfunction

endpackage
