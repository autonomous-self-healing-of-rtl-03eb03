// tb_nsclb_example: the two worked examples of the method, run on the full
// fabric at its default size.
//   1. CLBs 3, 5 and 7 are the only spares; CLBs 0, 1 and 2 fail together.
//      They must be repaired by 3, 5 and 7 in that order, the status must
//      show three faults, the three spares taken and none left, the whole
//      repair must take exactly the clocks predicted by the reference
//      repair, and the application must compute correctly afterwards.
//   2. CLB 9 fails with CLB 10 free (and farther spares on both sides): it
//      must be repaired by CLB 10 at distance 1.
module tb_nsclb_example;
  import nsclb_pkg::*;
  import nsclb_ref_pkg::*;

  logic                 clk = 0, rst_n = 0;
  logic                 host_clb_we = 0, host_out_we = 0;
  clb_idx_t             host_clb_addr = '0;
  clb_cfg_t             host_clb_data = '0;
  out_idx_t             host_out_addr = '0;
  out_cfg_t             host_out_data = '0;
  logic                 host_ready;
  logic [N_IN-1:0]      pin_in = '0;
  logic [N_OUT-1:0]     pin_out;
  logic [N_CLB-1:0]     fault = '0, defect = '0;
  logic [N_CLB-1:0]     active, spare, repl_valid, spare_taken, unrecoverable;
  clb_idx_t [N_CLB-1:0] repl_idx;
  logic [15:0]          repairs;
  clb_idx_t             last_distance;
  logic [CNT_W-1:0]     n_active, n_spare, n_fault;
  logic [N_CLB-1:0]     clb_q;

  nsclb_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  clb_cfg_array_t   app_clb;
  out_cfg_array_t   app_out;
  logic [N_CLB-1:0] model_q;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic run(int n, bit compare);
    for (int c = 0; c < n; c++) begin
      @(negedge clk);
      pin_in = N_IN'($urandom);
      #1;
      if (compare)
        check(pin_out === ref_pins(app_out, model_q),
              $sformatf("pins %b, expected %b", pin_out, ref_pins(app_out, model_q)));
      model_q = ref_step(app_clb, model_q, pin_in, '0);
    end
  endtask

  // Feed-forward application on every CLB not marked free, loaded through
  // the host port.
  task automatic load_app(logic [N_CLB-1:0] free);
    int placed[$];
    app_clb = '0;
    for (int i = 0; i < N_CLB; i++)
      if (!free[i]) begin
        app_clb[i] = rand_word(placed);
        placed.push_back(i);
      end
    for (int o = 0; o < N_OUT; o++) begin
      app_out[o].en  = 1'b1;
      app_out[o].sel = clb_idx_t'(placed[(o * 3) % placed.size()]);
    end
    for (int i = 0; i < N_CLB; i++) begin
      @(negedge clk);
      host_clb_we = 1'b1; host_clb_addr = clb_idx_t'(i); host_clb_data = app_clb[i];
      host_out_we = i < N_OUT; host_out_addr = out_idx_t'(i % N_OUT); host_out_data = app_out[i % N_OUT];
    end
    @(negedge clk);
    host_clb_we = 1'b0; host_out_we = 1'b0;
    model_q = '0;
    run(N_CLB + 2, 1'b0);
    run(30, 1'b1);
  endtask

  // Damages and flags the CLBs in `hit`; checks the busy time against the
  // reference repair and the outputs after a flush.
  task automatic fail_clbs(logic [N_CLB-1:0] hit, output int repl[N_CLB]);
    clb_cfg_array_t c_exp;
    out_cfg_array_t o_exp;
    logic [N_CLB-1:0] unrec;
    int exp_cycles, cycles;
    c_exp = app_clb; o_exp = app_out; unrec = '0;
    foreach (repl[i]) repl[i] = -1;
    exp_cycles = ref_heal(c_exp, o_exp, hit, repl, unrec);
    @(negedge clk);
    fault = hit; defect = hit;
    cycles = 0;
    #1;
    while (!host_ready && cycles < 1000) begin
      @(negedge clk); #1;
      cycles++;
    end
    check(cycles == exp_cycles, $sformatf("repair took %0d clocks, expected %0d", cycles, exp_cycles));
    run(N_CLB + 2, 1'b0);
    run(50, 1'b1);
  endtask

  initial begin
    logic [N_CLB-1:0] free, hit;
    int repl[N_CLB];
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Example 1.
    free = '0; free[3] = 1; free[5] = 1; free[7] = 1;
    load_app(free);
    check(int'(n_spare) == 3 && spare == free, "three spares before the faults");
    hit = '0; hit[0] = 1; hit[1] = 1; hit[2] = 1;
    fail_clbs(hit, repl);
    check(repl[0] == 3 && repl[1] == 5 && repl[2] == 7, "reference picks 3, 5, 7");
    check(repl_valid[2:0] == 3'b111, "CLBs 0, 1, 2 repaired");
    check(repl_idx[0] == 3 && repl_idx[1] == 5 && repl_idx[2] == 7,
          $sformatf("spares %0d %0d %0d, expected 3 5 7", repl_idx[0], repl_idx[1], repl_idx[2]));
    check(fault == 24'h000007 && int'(n_fault) == 3, "fault status: CLBs 0, 1, 2");
    check(spare_taken == 24'h0000A8, $sformatf("spares taken %b", spare_taken));
    check(n_spare == '0 && int'(n_active) == N_CLB - 3, "no spare left, 21 active");
    check(int'(repairs) == 3, "three repairs");

    // Example 2.
    @(negedge clk);
    rst_n = 0; fault = '0; defect = '0;
    @(negedge clk);
    rst_n = 1;
    free = '0; free[10] = 1; free[2] = 1; free[21] = 1;
    load_app(free);
    hit = '0; hit[9] = 1;
    fail_clbs(hit, repl);
    check(repl_idx[9] == 10 && repl_valid[9], "CLB 9 repaired by CLB 10");
    check(int'(last_distance) == 1, "distance 1");
    check(active[10] && !active[9], "CLB 10 active, CLB 9 retired");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
