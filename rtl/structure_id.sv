// structure_id: structural identification of the configured application.
//
// From the configuration words the block works out which CLBs are active
// (carry part of the application), which are spares (unused and not
// faulty) and which are active but diagnosed faulty, i.e. need repair. For
// one queried CLB it also decodes every input connection and output-pin
// source and reports who is connected to that CLB: the CLBs that read it
// and the output pins that show it.
//
// Interface: `clb_cfg`, `out_cfg` are the whole configuration, `fault` the
// diagnosed fault status (1 = faulty). `query` is the CLB whose fan-out is
// wanted; `clb_reader` and `out_reader` are that fan-out. `n_active`,
// `n_spare` and `n_fault` count the three classes.
//
// Timing: purely combinational.
//
// The classification into active and spare CLBs from the decoded structure
// follows the design description; the fan-out query is this design's way of
// finding the connections that have to move.
module structure_id
  import nsclb_pkg::*;
(
  input  clb_cfg_array_t   clb_cfg,
  input  out_cfg_array_t   out_cfg,
  input  logic [N_CLB-1:0] fault,
  input  clb_idx_t         query,
  output logic [N_CLB-1:0] active,
  output logic [N_CLB-1:0] spare,
  output logic [N_CLB-1:0] needs_repair,
  output logic [N_CLB-1:0] clb_reader,
  output logic [N_OUT-1:0] out_reader,
  output logic [CNT_W-1:0] n_active,
  output logic [CNT_W-1:0] n_spare,
  output logic [CNT_W-1:0] n_fault
);

  always_comb begin
    n_active = '0;
    n_spare  = '0;
    n_fault  = '0;
    for (int i = 0; i < N_CLB; i++) begin
      active[i]       = clb_cfg[i].used;
      spare[i]        = !clb_cfg[i].used && !fault[i];
      needs_repair[i] = clb_cfg[i].used && fault[i];
      clb_reader[i]   = 1'b0;
      for (int k = 0; k < LUT_K; k++)
        if (clb_cfg[i].sel[k] == src_t'(query))
          clb_reader[i] = clb_cfg[i].used;
      n_active = n_active + CNT_W'(active[i]);
      n_spare  = n_spare  + CNT_W'(spare[i]);
      n_fault  = n_fault  + CNT_W'(fault[i]);
    end
    for (int o = 0; o < N_OUT; o++)
      out_reader[o] = out_cfg[o].en && out_cfg[o].sel == query;
  end

endmodule
