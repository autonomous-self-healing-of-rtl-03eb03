// tb_nearest_spare: checks the spare selection against a reference that
// grows the search distance step by step, on the worked examples of the
// design (faults 0, 1, 2 with spares 3, 5, 7; CLB 9 replaced by CLB 10) and
// on random fault positions and spare maps.
module tb_nearest_spare;
  import nsclb_pkg::*;
  import nsclb_ref_pkg::*;

  clb_idx_t         fault_idx;
  logic [N_CLB-1:0] spare;
  logic             found, lf, rf;
  clb_idx_t         spare_idx, distance, li, ri;
  int checks = 0, failures = 0;

  nearest_spare dut (
    .fault_idx (fault_idx), .spare (spare), .found (found),
    .spare_idx (spare_idx), .distance (distance),
    .left_found (lf), .left_idx (li), .right_found (rf), .right_idx (ri)
  );

  task automatic check_one(int f, logic [N_CLB-1:0] sp);
    int exp;
    fault_idx = clb_idx_t'(f);
    spare     = sp;
    #1;
    exp = ref_nearest(f, sp);
    checks++;
    if ((exp < 0) != !found || (exp >= 0 && (int'(spare_idx) != exp ||
        int'(distance) != (exp > f ? exp - f : f - exp)))) begin
      failures++;
      $display("FAIL f=%0d spare=%b: found=%0b idx=%0d dist=%0d, expected %0d",
               f, sp, found, spare_idx, distance, exp);
    end
  endtask

  task automatic check_expect(int f, logic [N_CLB-1:0] sp, int exp);
    fault_idx = clb_idx_t'(f);
    spare     = sp;
    #1;
    checks++;
    if (!found || int'(spare_idx) != exp) begin
      failures++;
      $display("FAIL example f=%0d: got %0d, expected %0d", f, spare_idx, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N_CLB-1:0] sp;
    // Worked example: spares 3, 5, 7; faults 0, 1, 2 repaired in order.
    sp = '0; sp[3] = 1; sp[5] = 1; sp[7] = 1;
    check_expect(0, sp, 3); sp[3] = 0;
    check_expect(1, sp, 5); sp[5] = 0;
    check_expect(2, sp, 7);
    // CLB 9 with CLB 10 free.
    sp = '0; sp[10] = 1; sp[20] = 1; sp[2] = 1;
    check_expect(9, sp, 10);
    // Left is nearer.
    sp = '0; sp[8] = 1; sp[12] = 1;
    check_expect(9, sp, 8);
    // Equal distance: right-hand spare.
    sp = '0; sp[7] = 1; sp[11] = 1;
    check_expect(9, sp, 11);
    // Edges and no spare.
    check_one(0, '0);
    sp = '0; sp[0] = 1;
    check_expect(N_CLB - 1, sp, 0);
    // Random maps, sparse and dense.
    for (int n = 0; n < 3000; n++) begin
      sp = '0;
      for (int i = 0; i < N_CLB; i++)
        sp[i] = ($urandom % 8) < (n % 4) + 1;
      check_one($urandom % N_CLB, sp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
