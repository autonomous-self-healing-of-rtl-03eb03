// tb_structure_id: random configurations and fault maps; the active, spare
// and needs-repair vectors, their counts and the fan-out of a random CLB
// are recomputed in the testbench and compared.
module tb_structure_id;
  import nsclb_pkg::*;

  clb_cfg_array_t   clb_cfg;
  out_cfg_array_t   out_cfg;
  logic [N_CLB-1:0] fault;
  clb_idx_t         query;
  logic [N_CLB-1:0] active, spare, needs_repair, clb_reader;
  logic [N_OUT-1:0] out_reader;
  logic [CNT_W-1:0] n_active, n_spare, n_fault;
  int checks = 0, failures = 0;

  structure_id dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [N_CLB-1:0] e_act, e_sp, e_nr, e_rd;
      logic [N_OUT-1:0] e_ord;
      int q, na, ns, nf;
      q = $urandom % N_CLB;
      query = clb_idx_t'(q);
      for (int i = 0; i < N_CLB; i++) begin
        clb_cfg[i].used = ($urandom % 4) != 0;
        clb_cfg[i].lut  = LUT_N'($urandom);
        for (int k = 0; k < LUT_K; k++)
          clb_cfg[i].sel[k] = ($urandom % 3 == 0) ? src_t'(q) : src_t'($urandom % N_SRC);
        fault[i] = ($urandom % 5) == 0;
      end
      for (int o = 0; o < N_OUT; o++) begin
        out_cfg[o].en  = ($urandom % 4) != 0;
        out_cfg[o].sel = ($urandom % 3 == 0) ? clb_idx_t'(q) : clb_idx_t'($urandom % N_CLB);
      end
      na = 0; ns = 0; nf = 0;
      for (int i = 0; i < N_CLB; i++) begin
        bit hit;
        hit = 0;
        e_act[i] = clb_cfg[i].used;
        e_sp[i]  = !clb_cfg[i].used && !fault[i];
        e_nr[i]  = clb_cfg[i].used && fault[i];
        for (int k = 0; k < LUT_K; k++) if (int'(clb_cfg[i].sel[k]) == q) hit = 1;
        e_rd[i] = hit && clb_cfg[i].used;
        na += int'(e_act[i]); ns += int'(e_sp[i]); nf += int'(fault[i]);
      end
      for (int o = 0; o < N_OUT; o++) e_ord[o] = out_cfg[o].en && int'(out_cfg[o].sel) == q;
      #1;
      checks++;
      if (active !== e_act || spare !== e_sp || needs_repair !== e_nr ||
          clb_reader !== e_rd || out_reader !== e_ord ||
          int'(n_active) != na || int'(n_spare) != ns || int'(n_fault) != nf) begin
        failures++;
        $display("FAIL n=%0d act %b/%b spare %b/%b rd %b/%b ord %b/%b", n,
                 active, e_act, spare, e_sp, clb_reader, e_rd, out_reader, e_ord);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
