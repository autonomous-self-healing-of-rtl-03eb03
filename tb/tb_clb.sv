// tb_clb: drives one CLB with random configuration words, source buses and
// defect flags and checks each registered output against the look-up table
// entry addressed by the selected sources, one clock later.
module tb_clb;
  import nsclb_pkg::*;

  logic               clk = 0, rst_n = 0;
  clb_cfg_t           cfg;
  logic [2**SRC_W-1:0] srcs;
  logic               defect;
  logic               q;
  int checks = 0, failures = 0;

  clb dut (.clk, .rst_n, .cfg, .srcs, .defect, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    cfg = '0; srcs = '0; defect = 0;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      cfg.used = ($urandom % 8) != 0;
      cfg.lut  = LUT_N'($urandom);
      for (int k = 0; k < LUT_K; k++) cfg.sel[k] = src_t'($urandom % N_SRC);
      srcs   = '0;
      srcs[N_SRC-1:0] = N_SRC'({$urandom, $urandom});
      defect = ($urandom % 6) == 0;
      begin
        int a;
        a = 0;
        for (int k = 0; k < LUT_K; k++) if (srcs[int'(cfg.sel[k])]) a |= 1 << k;
        exp = cfg.used && !defect && cfg.lut[a];
      end
      @(posedge clk); #1;
      checks++;
      if (q !== exp) begin
        failures++;
        $display("FAIL n=%0d cfg=%h srcs=%h defect=%0b q=%0b exp=%0b", n, cfg, srcs, defect, q, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
