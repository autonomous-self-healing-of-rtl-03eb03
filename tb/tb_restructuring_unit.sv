// tb_restructuring_unit: the healing controller runs against a
// configuration memory kept in the testbench. Each scenario loads a
// configuration, raises fault flags and waits for the unit to go idle; the
// resulting memory, the chosen spares, the status outputs and the number of
// busy clocks are compared with a software repair of the same
// configuration. Scenarios: the worked example (faults 0, 1, 2 with spares
// 3, 5, 7), CLB 9 replaced by CLB 10, a self-referencing CLB, faults with no
// spare left, a transient fault on a spare, and random cumulative faults.
module tb_restructuring_unit;
  import nsclb_pkg::*;
  import nsclb_ref_pkg::*;

  logic                 clk = 0, rst_n = 0;
  clb_cfg_array_t       clb_cfg;
  out_cfg_array_t       out_cfg;
  logic [N_CLB-1:0]     fault;
  cfg_wr_t              wr;
  logic                 busy;
  logic [N_CLB-1:0]     active, spare, repl_valid, spare_taken, unrecoverable;
  clb_idx_t [N_CLB-1:0] repl_idx;
  logic [15:0]          repairs;
  clb_idx_t             last_distance;
  logic [CNT_W-1:0]     n_active, n_spare, n_fault;
  int checks = 0, failures = 0;

  restructuring_unit dut (.*);

  always #5 clk = ~clk;

  // Configuration memory model.
  always_ff @(posedge clk) begin
    if (wr.clb_we) clb_cfg[wr.clb_addr] <= wr.clb_data;
    if (wr.out_we) out_cfg[wr.out_addr] <= wr.out_data;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Random application occupying every CLB that `free` does not mark.
  task automatic load(logic [N_CLB-1:0] free, int self_loop = -1);
    @(negedge clk);
    for (int i = 0; i < N_CLB; i++) begin
      int srcs[$];
      for (int j = 0; j < N_CLB; j++) if (!free[j]) srcs.push_back(j);
      clb_cfg[i] = free[i] ? clb_cfg_t'(0) : rand_word(srcs);
    end
    if (self_loop >= 0) clb_cfg[self_loop].sel[0] = src_t'(self_loop);
    for (int o = 0; o < N_OUT; o++) begin
      int j;
      do j = $urandom % N_CLB; while (free[j]);
      out_cfg[o].en  = 1'b1;
      out_cfg[o].sel = clb_idx_t'(j);
    end
  endtask

  // Applies a fault map and checks the repair against the reference.
  task automatic run_faults(logic [N_CLB-1:0] fmap, string name);
    clb_cfg_array_t c_exp;
    out_cfg_array_t o_exp;
    logic [N_CLB-1:0] unrec_exp;
    int repl[N_CLB];
    int exp_cycles, cycles, idle;
    c_exp = clb_cfg; o_exp = out_cfg;
    // A spare that appears makes the unit retry every unrecoverable CLB.
    unrec_exp = unrecoverable & fmap;
    for (int i = 0; i < N_CLB; i++)
      if (!clb_cfg[i].used && !fmap[i] && fault[i]) unrec_exp = '0;
    for (int i = 0; i < N_CLB; i++) repl[i] = repl_valid[i] ? int'(repl_idx[i]) : -1;
    exp_cycles = ref_heal(c_exp, o_exp, fmap, repl, unrec_exp);
    @(negedge clk);
    fault = fmap;
    cycles = 0;
    idle = 0;
    // Count the clocks in which the unit is busy until it has been idle for
    // two clocks in a row.
    while (idle < 2 && cycles < 5000) begin
      #1;
      if (busy) begin
        cycles++;
        idle = 0;
      end else begin
        idle++;
      end
      @(negedge clk);
    end
    #1;
    check(cycles == exp_cycles, $sformatf("%s: busy %0d clocks, expected %0d", name, cycles, exp_cycles));
    check(clb_cfg == c_exp, $sformatf("%s: CLB words differ from reference", name));
    check(out_cfg == o_exp, $sformatf("%s: output pin words differ from reference", name));
    check(unrecoverable == unrec_exp, $sformatf("%s: unrecoverable %b, expected %b", name, unrecoverable, unrec_exp));
    for (int i = 0; i < N_CLB; i++)
      if (repl[i] >= 0)
        check(repl_valid[i] && int'(repl_idx[i]) == repl[i],
              $sformatf("%s: CLB %0d replaced by %0d, expected %0d", name, i, repl_idx[i], repl[i]));
    for (int i = 0; i < N_CLB; i++) begin
      check(active[i] == clb_cfg[i].used, $sformatf("%s: active[%0d]", name, i));
      check(spare[i] == (!clb_cfg[i].used && !fault[i]), $sformatf("%s: spare[%0d]", name, i));
    end
    check(int'(n_fault) == $countones(fault), $sformatf("%s: n_fault", name));
    check(int'(n_active) == $countones(active) && int'(n_spare) == $countones(spare),
          $sformatf("%s: counts", name));
  endtask

  task automatic do_reset;
    @(negedge clk);
    rst_n = 0;
    fault = '0;
    @(negedge clk);
    rst_n = 1;
  endtask

  initial begin
    logic [N_CLB-1:0] free, fm;
    int n_before;
    fault = '0;
    clb_cfg = '0; out_cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Worked example: spares 3, 5, 7 and faults on CLBs 0, 1, 2.
    free = '0; free[3] = 1; free[5] = 1; free[7] = 1;
    load(free);
    fm = '0; fm[0] = 1; fm[1] = 1; fm[2] = 1;
    run_faults(fm, "example 0,1,2");
    check(repl_idx[0] == 3 && repl_idx[1] == 5 && repl_idx[2] == 7, "example spares 3, 5, 7");
    check(spare_taken == 24'h0000A8, $sformatf("example spare_taken %b", spare_taken));
    check(int'(repairs) == 3, "example repairs");
    check(int'(last_distance) == 5, $sformatf("example last distance %0d", last_distance));

    // CLB 9 replaced by CLB 10.
    do_reset;
    free = '0; free[10] = 1; free[20] = 1; free[1] = 1;
    load(free);
    fm = '0; fm[9] = 1;
    run_faults(fm, "CLB 9");
    check(repl_idx[9] == 10, "CLB 9 -> 10");

    // A CLB that feeds back on itself: the spare must read itself.
    do_reset;
    free = '0; free[15] = 1;
    load(free, 12);
    fm = '0; fm[12] = 1;
    run_faults(fm, "self loop");
    check(clb_cfg[15].sel[0] == src_t'(15), "self loop moved onto spare");

    // No spare left: the fault is reported and the configuration kept.
    do_reset;
    free = '0; free[4] = 1;
    load(free);
    fm = '0; fm[6] = 1; fm[20] = 1;
    run_faults(fm, "no spare");
    check(unrecoverable[20] && !unrecoverable[6], "no spare: CLB 20 unrecoverable");
    fm = '0; fm[6] = 1;
    run_faults(fm, "no spare, fault 20 dropped");
    check(!unrecoverable[20], "unrecoverable clears with the fault");
    // CLB 6 was repaired onto CLB 4; a fault on 8 finds no spare until the
    // fault on the retired CLB 6 goes away.
    fm = '0; fm[6] = 1; fm[8] = 1;
    run_faults(fm, "no spare for 8");
    check(unrecoverable[8], "CLB 8 unrecoverable");
    fm = '0; fm[8] = 1;
    run_faults(fm, "CLB 6 freed, 8 retried");
    check(!unrecoverable[8] && repl_idx[8] == 6, "CLB 8 repaired onto freed CLB 6");

    // Transient fault on a spare: it leaves the pool and comes back.
    do_reset;
    free = '0; free[8] = 1; free[11] = 1;
    load(free);
    fm = '0; fm[11] = 1;
    run_faults(fm, "fault on spare");
    check(!spare[11] && spare[8], "faulty spare left the pool");
    fm = '0; fm[10] = 1; fm[11] = 1;
    run_faults(fm, "CLB 10 with spare 11 faulty");
    check(repl_idx[10] == 8, "CLB 10 -> 8 while 11 faulty");
    fm = '0; fm[10] = 1;
    run_faults(fm, "transient on 11 cleared");
    check(spare[11], "CLB 11 back in the pool");

    // Random cumulative faults, arriving one or several at a time.
    for (int r = 0; r < 40; r++) begin
      do_reset;
      free = '0;
      for (int i = 0; i < N_CLB; i++) free[i] = ($urandom % 4) == 0;
      load(free, (r % 3 == 0) ? $urandom % N_CLB : -1);
      fm = '0;
      for (int step = 0; step < 6; step++) begin
        n_before = int'(repairs);
        for (int n = 0; n < 1 + $urandom % 3; n++) fm[$urandom % N_CLB] = 1'b1;
        if ($urandom % 4 == 0) fm[$urandom % N_CLB] = 1'b0;
        run_faults(fm, $sformatf("random %0d step %0d", r, step));
        check(int'(repairs) >= n_before, "repairs count grows");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
