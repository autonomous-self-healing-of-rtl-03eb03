// restructuring_unit: the autonomous healing controller.
//
// Whenever an active CLB is diagnosed faulty, the unit repairs it without
// outside help, taking the faulty CLBs in ascending order:
//   SELECT  the nearest free spare is chosen (nearest_spare);
//   COPY    the faulty CLB's configuration word (input connections and
//           function bits) is written to the spare: functional replacement;
//   RETIRE  the faulty CLB's word is cleared, so it drops out of the
//           application, and the choice is recorded in the status outputs;
//   REMAP   every CLB input and output pin connected to the faulty CLB is
//           rewritten, one CLB word and one pin word per clock, to the
//           spare: structural replacement. The spare itself is among them if
//           the faulty CLB fed back on itself.
// A faulty CLB for which no spare exists is reported in `unrecoverable` and
// left in place; the mark clears when its fault flag drops, and all marks
// clear (so the repairs are tried again) when a new spare appears. A CLB whose
// fault flag drops becomes a spare again, so transient faults give their
// CLBs back. The fabric keeps running throughout.
//
// Interface: `clb_cfg`/`out_cfg` are read from the configuration memory,
// `wr` writes it. `fault` is the diagnosed fault status (1 = faulty).
// `busy` is high while a repair is pending or running; configuration writes
// from elsewhere must wait for it to drop. `repl_valid[i]`/`repl_idx[i]`
// give the spare that took over CLB i, `spare_taken` marks every CLB that
// has been taken as a spare, `repairs` counts finished repairs and
// `last_distance` is the distance between the last repaired CLB and its
// spare. `n_active`, `n_spare` and `n_fault` count the CLB classes.
//
// Timing: one repair keeps `busy` high for 5 + R clocks (one to notice the
// fault, one each for SELECT, COPY and RETIRE, R + 1 in REMAP), where R is
// the larger of the number of CLBs and of output pins connected to the
// faulty CLB. Its writes take effect on the edge after they are issued.
//
// The order of the steps, the nearest-spare choice and the copying of input
// and function bits follow the design description; the state encoding,
// the one-word-per-clock rewrite and the handling of missing spares are this
// design's own choices.
module restructuring_unit
  import nsclb_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  clb_cfg_array_t          clb_cfg,
  input  out_cfg_array_t          out_cfg,
  input  logic [N_CLB-1:0]        fault,
  output cfg_wr_t                 wr,
  output logic                    busy,
  output logic [N_CLB-1:0]        active,
  output logic [N_CLB-1:0]        spare,
  output logic [N_CLB-1:0]        repl_valid,
  output clb_idx_t [N_CLB-1:0]    repl_idx,
  output logic [N_CLB-1:0]        spare_taken,
  output logic [N_CLB-1:0]        unrecoverable,
  output logic [15:0]             repairs,
  output clb_idx_t                last_distance,
  output logic [CNT_W-1:0]        n_active,
  output logic [CNT_W-1:0]        n_spare,
  output logic [CNT_W-1:0]        n_fault
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_SELECT,
    S_COPY,
    S_RETIRE,
    S_REMAP
  } state_t;

  state_t   state;
  clb_idx_t f_idx;      // CLB under repair
  clb_idx_t s_idx;      // spare replacing it

  logic [N_CLB-1:0] needs_repair;
  logic [N_CLB-1:0] pending;
  logic [N_CLB-1:0] spare_d;    // spare map of the previous clock
  logic [N_CLB-1:0] clb_reader;
  logic [N_OUT-1:0] out_reader;

  logic     ns_found;
  clb_idx_t ns_idx;
  clb_idx_t ns_dist;

  structure_id u_structure (
    .clb_cfg      (clb_cfg),
    .out_cfg      (out_cfg),
    .fault        (fault),
    .query        (f_idx),
    .active       (active),
    .spare        (spare),
    .needs_repair (needs_repair),
    .clb_reader   (clb_reader),
    .out_reader   (out_reader),
    .n_active     (n_active),
    .n_spare      (n_spare),
    .n_fault      (n_fault)
  );

  nearest_spare u_nearest (
    .fault_idx   (f_idx),
    .spare       (spare),
    .found       (ns_found),
    .spare_idx   (ns_idx),
    .distance      (ns_dist),
    .left_found  (),
    .left_idx    (),
    .right_found (),
    .right_idx   ()
  );

  // A spare that has just appeared lifts every unrecoverable mark at once.
  logic new_spare;
  assign new_spare = (spare & ~spare_d) != '0;
  assign pending   = needs_repair & ~(new_spare ? '0 : unrecoverable);
  assign busy    = (state != S_IDLE) || (pending != '0);

  // Lowest set bit of the pending vector and of the reader vectors.
  clb_idx_t first_pending;
  clb_idx_t first_clb_reader;
  out_idx_t first_out_reader;

  always_comb begin
    first_pending = '0;
    for (int i = N_CLB - 1; i >= 0; i--)
      if (pending[i]) first_pending = clb_idx_t'(i);
    first_clb_reader = '0;
    for (int i = N_CLB - 1; i >= 0; i--)
      if (clb_reader[i]) first_clb_reader = clb_idx_t'(i);
    first_out_reader = '0;
    for (int o = N_OUT - 1; o >= 0; o--)
      if (out_reader[o]) first_out_reader = out_idx_t'(o);
  end

  // The reading CLB's word with every connection to the faulty CLB moved to
  // the spare.
  clb_cfg_t remapped;

  always_comb begin
    remapped = clb_cfg[first_clb_reader];
    for (int k = 0; k < LUT_K; k++)
      if (remapped.sel[k] == src_t'(f_idx))
        remapped.sel[k] = src_t'(s_idx);
  end

  // Configuration writes.
  always_comb begin
    wr = '0;
    unique case (state)
      S_COPY: begin
        wr.clb_we   = 1'b1;
        wr.clb_addr = s_idx;
        wr.clb_data = clb_cfg[f_idx];
      end
      S_RETIRE: begin
        wr.clb_we   = 1'b1;
        wr.clb_addr = f_idx;
        wr.clb_data = '0;
      end
      S_REMAP: begin
        wr.clb_we       = clb_reader != '0;
        wr.clb_addr     = first_clb_reader;
        wr.clb_data     = remapped;
        wr.out_we       = out_reader != '0;
        wr.out_addr     = first_out_reader;
        wr.out_data.en  = 1'b1;
        wr.out_data.sel = s_idx;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      f_idx         <= '0;
      s_idx         <= '0;
      repl_valid    <= '0;
      repl_idx      <= '0;
      spare_taken   <= '0;
      unrecoverable <= '0;
      repairs       <= '0;
      last_distance <= '0;
      spare_d       <= '0;
    end else begin
      spare_d <= spare;
      if (new_spare)
        unrecoverable <= '0;
      else
        unrecoverable <= unrecoverable & fault;
      unique case (state)
        S_IDLE:
          if (pending != '0) begin
            f_idx <= first_pending;
            state <= S_SELECT;
          end
        S_SELECT:
          if (ns_found) begin
            s_idx         <= ns_idx;
            last_distance <= ns_dist;
            state         <= S_COPY;
          end else begin
            unrecoverable[f_idx] <= 1'b1;
            state                <= S_IDLE;
          end
        S_COPY:
          state <= S_RETIRE;
        S_RETIRE: begin
          repl_valid[f_idx]  <= 1'b1;
          repl_idx[f_idx]    <= s_idx;
          spare_taken[s_idx] <= 1'b1;
          state              <= S_REMAP;
        end
        S_REMAP:
          if (clb_reader == '0 && out_reader == '0) begin
            repairs <= repairs + 16'd1;
            state   <= S_IDLE;
          end
        default:
          state <= S_IDLE;
      endcase
    end
  end

  // The spare must be free and healthy when the faulty word is copied onto it.
  always_ff @(posedge clk) begin
    if (state == S_COPY)
      assert (!clb_cfg[s_idx].used && !fault[s_idx])
        else $error("restructuring_unit: spare %0d is not free", s_idx);
  end

endmodule
