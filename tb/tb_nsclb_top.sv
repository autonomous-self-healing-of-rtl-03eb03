// tb_nsclb_top: end-to-end test of the self-healing fabric at its full
// size. An application of feed-forward CLB logic is loaded through the host
// port, and a clock-by-clock model of the same application, kept in the
// testbench and never damaged, gives the expected output pins. Damage is
// then injected into CLBs (outputs stuck at 0) together with the matching
// fault flags; after each repair and a flush of the pipeline the pins must
// again match the model.
//
// Scenarios: the worked example (spares 3, 5, 7, faults on 0, 1, 2);
// cumulative single faults; a fault on an unused spare; faults that find no
// spare and are repaired once a transient fault clears and gives a CLB back.
// Mechanisms counted, each of which must occur: repair, spare to the right,
// spare to the left, output pin moved, CLB input moved, several faults in
// one busy period, host port held off, no spare, retry after a spare
// returned, spare lost to a fault, outputs corrupted by damage.
module tb_nsclb_top;
  import nsclb_pkg::*;
  import nsclb_ref_pkg::*;

  logic                 clk = 0, rst_n = 0;
  logic                 host_clb_we;
  clb_idx_t             host_clb_addr;
  clb_cfg_t             host_clb_data;
  logic                 host_out_we;
  out_idx_t             host_out_addr;
  out_cfg_t             host_out_data;
  logic                 host_ready;
  logic [N_IN-1:0]      pin_in;
  logic [N_OUT-1:0]     pin_out;
  logic [N_CLB-1:0]     fault, defect;
  logic [N_CLB-1:0]     active, spare, repl_valid, spare_taken, unrecoverable;
  clb_idx_t [N_CLB-1:0] repl_idx;
  logic [15:0]          repairs;
  clb_idx_t             last_distance;
  logic [CNT_W-1:0]     n_active, n_spare, n_fault;
  logic [N_CLB-1:0]     clb_q;

  nsclb_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  string scen = "start";

  // Mechanism counters.
  typedef enum int {
    M_REPAIR, M_RIGHT, M_LEFT, M_PIN_MOVED, M_INPUT_MOVED, M_MULTI,
    M_HOLD, M_NO_SPARE, M_RETRY, M_SPARE_LOST, M_CORRUPT, M_NUM
  } mech_t;
  int    mech[M_NUM];
  string mech_name[M_NUM] = '{"repair", "spare right", "spare left", "output pin moved",
                              "CLB input moved", "several faults at once", "host held off",
                              "no spare", "retry after spare returned", "spare lost to fault",
                              "outputs corrupted by damage"};

  // The application in its original placement and its model state.
  clb_cfg_array_t   app_clb;
  out_cfg_array_t   app_out;
  logic [N_CLB-1:0] model_q;
  int               phys[N_CLB];   // original CLB -> CLB now holding it

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%s] %s", scen, what);
    end
  endtask

  // One clock of the application: new inputs, pins compared unless
  // `compare` is low. Returns 1 on a pin mismatch.
  task automatic tick(bit compare, output bit mismatch);
    @(negedge clk);
    pin_in = N_IN'($urandom);
    #1;
    mismatch = pin_out !== ref_pins(app_out, model_q);
    if (compare)
      check(!mismatch, $sformatf("pins %b, expected %b", pin_out, ref_pins(app_out, model_q)));
    model_q = ref_step(app_clb, model_q, pin_in, '0);
  endtask

  task automatic run(int n, bit compare);
    bit mm;
    for (int c = 0; c < n; c++) tick(compare, mm);
  endtask

  // Feed-forward application on every CLB that `free` does not mark: each
  // CLB reads primary inputs and CLBs placed before it in a random order.
  task automatic load_app(logic [N_CLB-1:0] free);
    int order[$];
    int placed[$];
    for (int i = 0; i < N_CLB; i++) if (!free[i]) order.push_back(i);
    order.shuffle();
    app_clb = '0;
    foreach (order[p]) begin
      app_clb[order[p]] = rand_word(placed);
      placed.push_back(order[p]);
    end
    for (int o = 0; o < N_OUT; o++) begin
      app_out[o].en  = 1'b1;
      app_out[o].sel = clb_idx_t'(order[$urandom % order.size()]);
    end
    for (int i = 0; i < N_CLB; i++) phys[i] = i;
    for (int i = 0; i < N_CLB; i++) begin
      @(negedge clk);
      check(host_ready, "host port ready while loading");
      host_clb_we   = 1'b1;
      host_clb_addr = clb_idx_t'(i);
      host_clb_data = app_clb[i];
      if (i < N_OUT) begin
        host_out_we   = 1'b1;
        host_out_addr = out_idx_t'(i);
        host_out_data = app_out[i];
      end else begin
        host_out_we = 1'b0;
      end
    end
    @(negedge clk);
    host_clb_we = 1'b0;
    host_out_we = 1'b0;
    // The application is feed-forward: after as many clocks as it has
    // CLBs, fabric and model hold the same state.
    model_q = '0;
    run(N_CLB + 2, 1'b0);
  endtask

  // Counts what moving original CLB `l` will involve.
  task automatic note_connections(int l);
    bit pin, inp;
    pin = 0; inp = 0;
    for (int o = 0; o < N_OUT; o++) if (int'(app_out[o].sel) == l) pin = 1;
    for (int i = 0; i < N_CLB; i++)
      if (app_clb[i].used)
        for (int k = 0; k < LUT_K; k++) if (int'(app_clb[i].sel[k]) == l) inp = 1;
    if (pin) mech[M_PIN_MOVED]++;
    if (inp) mech[M_INPUT_MOVED]++;
  endtask

  // Damages the CLBs in `hit` (by current placement), raises their fault
  // flags and waits for the unit to finish. Returns the busy clocks.
  task automatic damage(logic [N_CLB-1:0] hit, bit expect_heal, output int busy_clocks);
    bit mm, corrupt;
    int r0, idle;
    r0 = int'(repairs);
    for (int l = 0; l < N_CLB; l++) if (hit[phys[l]] && app_clb[l].used) note_connections(l);
    for (int p = 0; p < N_CLB; p++) if (hit[p] && spare[p]) mech[M_SPARE_LOST]++;
    @(negedge clk);
    defect = defect | hit;
    fault  = fault | hit;
    busy_clocks = 0;
    idle = 0;
    corrupt = 0;
    while (idle < 2 && busy_clocks < 5000) begin
      if (!host_ready) begin
        busy_clocks++;
        idle = 0;
        mech[M_HOLD]++;
      end else begin
        idle++;
      end
      tick(1'b0, mm);
      corrupt |= mm;
    end
    if (corrupt) mech[M_CORRUPT]++;
    if (int'(repairs) - r0 > 1) mech[M_MULTI]++;
    mech[M_REPAIR] += int'(repairs) - r0;
    // Follow the moves.
    for (int l = 0; l < N_CLB; l++) begin
      int p;
      p = phys[l];
      if (fault[p] && app_clb[l].used && repl_valid[p] && !active[p]) begin
        phys[l] = int'(repl_idx[p]);
        if (phys[l] > p) mech[M_RIGHT]++; else mech[M_LEFT]++;
        check(active[phys[l]], $sformatf("CLB %0d moved onto active CLB %0d", l, phys[l]));
      end
    end
    if (expect_heal) begin
      check(unrecoverable == '0, "every damaged CLB repaired");
      run(N_CLB + 2, 1'b0);   // flush the state held by the moved CLBs
      run(60, 1'b1);
    end
  endtask

  task automatic reset_all;
    @(negedge clk);
    rst_n = 0; fault = '0; defect = '0;
    @(negedge clk);
    rst_n = 1;
  endtask

  initial begin
    logic [N_CLB-1:0] free, hit;
    int bc;
    host_clb_we = 0; host_out_we = 0;
    host_clb_addr = '0; host_out_addr = '0; host_clb_data = '0; host_out_data = '0;
    pin_in = '0; fault = '0; defect = '0;
    foreach (mech[m]) mech[m] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Worked example: spares 3, 5, 7 and faults on CLBs 0, 1, 2.
    free = '0; free[3] = 1; free[5] = 1; free[7] = 1;
    load_app(free);
    check(n_spare == CNT_W'(3) && int'(n_active) == N_CLB - 3, "example: 3 spares");
    run(40, 1'b1);
    hit = '0; hit[0] = 1; hit[1] = 1; hit[2] = 1;
    damage(hit, 1'b1, bc);
    check(repl_idx[0] == 3 && repl_idx[1] == 5 && repl_idx[2] == 7,
          $sformatf("example: spares %0d %0d %0d, expected 3 5 7", repl_idx[0], repl_idx[1], repl_idx[2]));
    check(spare_taken == 24'h0000A8, "example: spares taken 3, 5, 7");
    check(n_spare == '0 && int'(n_fault) == 3, "example: spares used up");

    // Cumulative single faults on a fabric with about a quarter spare.
    for (int r = 0; r < 6; r++) begin
      reset_all;
      scen = $sformatf("round %0d load", r);
      free = '0;
      for (int i = 0; i < N_CLB; i++) free[i] = ($urandom % 4) == 0;
      free[r + 2] = 1'b1;
      load_app(free);
      run(30, 1'b1);
      for (int step = 0; step < 3; step++) begin
        int p;
        if (n_spare == '0) break;
        do p = $urandom % N_CLB; while (!active[p]);
        hit = '0; hit[p] = 1'b1;
        // Sometimes also damage a spare.
        if (step == 1)
          for (int i = 0; i < N_CLB; i++) if (spare[i] && n_spare > CNT_W'(2)) begin hit[i] = 1'b1; break; end
        scen = $sformatf("round %0d step %0d hit %b", r, step, hit);
        damage(hit, 1'b1, bc);
      end
    end

    scen = "no spare";
    // No spare: CLB 10 cannot be repaired until the transient fault on the
    // retired CLB 4 goes away.
    reset_all;
    free = '0; free[5] = 1;
    load_app(free);
    hit = '0; hit[4] = 1;
    damage(hit, 1'b1, bc);           // 4 -> 5, no spare left
    check(repl_idx[4] == 5, "CLB 4 moved to 5");
    hit = '0; hit[10] = 1;
    damage(hit, 1'b0, bc);
    check(unrecoverable[10], "CLB 10 without spare");
    if (unrecoverable[10]) mech[M_NO_SPARE]++;
    // The fault on CLB 4 was transient: clear it and its damage.
    @(negedge clk);
    fault[4] = 1'b0; defect[4] = 1'b0;
    begin
      int r0;
      bit mm;
      r0 = int'(repairs);
      for (int c = 0; c < 40; c++) tick(1'b0, mm);
      if (int'(repairs) == r0 + 1 && !unrecoverable[10] && repl_idx[10] == 4) mech[M_RETRY]++;
      check(repl_idx[10] == 4 && !unrecoverable[10], "CLB 10 repaired onto CLB 4 once it returned");
      phys[10] = 4;
      run(N_CLB + 2, 1'b0);
      run(60, 1'b1);
    end

    foreach (mech[m]) begin
      $display("mechanism %-28s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism '%s' never happened", mech_name[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
