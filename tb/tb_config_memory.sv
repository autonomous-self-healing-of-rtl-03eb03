// tb_config_memory: random writes of CLB words and output-pin words, some of
// them in the same clock and some to addresses beyond the arrays, checked
// against a copy of the memory kept in the testbench. Also checks that reset
// clears every word.
module tb_config_memory;
  import nsclb_pkg::*;

  logic           clk = 0, rst_n = 0;
  cfg_wr_t        wr;
  clb_cfg_array_t clb_cfg, clb_exp;
  out_cfg_array_t out_cfg, out_exp;
  int checks = 0, failures = 0;

  config_memory dut (.clk, .rst_n, .wr, .clb_cfg, .out_cfg);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    checks++;
    if (clb_cfg !== clb_exp || out_cfg !== out_exp) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    wr = '0;
    clb_exp = '0; out_exp = '0;
    repeat (2) @(posedge clk);
    #1 compare("reset");
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      wr.clb_we   = ($urandom % 3) != 0;
      wr.clb_addr = clb_idx_t'($urandom % (2 ** IDX_W));
      wr.clb_data = clb_cfg_t'({$urandom, $urandom});
      wr.out_we   = ($urandom % 3) == 0;
      wr.out_addr = out_idx_t'($urandom % (2 ** OIDX_W));
      wr.out_data = out_cfg_t'($urandom);
      if (wr.clb_we && int'(wr.clb_addr) < N_CLB) clb_exp[wr.clb_addr] = wr.clb_data;
      if (wr.out_we && int'(wr.out_addr) < N_OUT) out_exp[wr.out_addr] = wr.out_data;
      @(posedge clk); #1;
      compare($sformatf("after write %0d", n));
    end
    rst_n = 0;
    clb_exp = '0; out_exp = '0;
    #1 compare("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
