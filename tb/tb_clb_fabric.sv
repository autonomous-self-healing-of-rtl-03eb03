// tb_clb_fabric: loads random configurations into the 24-CLB array,
// including CLBs that feed back on themselves or on each other, drives
// random primary inputs and defect flags and compares every CLB output and
// every output pin, each clock, with a clock-by-clock evaluation of the
// same configuration in the testbench.
module tb_clb_fabric;
  import nsclb_pkg::*;
  import nsclb_ref_pkg::*;

  logic             clk = 0, rst_n = 0;
  clb_cfg_array_t   clb_cfg;
  out_cfg_array_t   out_cfg;
  logic [N_IN-1:0]  pin_in;
  logic [N_CLB-1:0] defect;
  logic [N_OUT-1:0] pin_out;
  logic [N_CLB-1:0] clb_q;
  logic [N_CLB-1:0] q_ref;
  int checks = 0, failures = 0;

  clb_fabric dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clb_cfg = '0; out_cfg = '0; pin_in = '0; defect = '0;
    q_ref = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      @(negedge clk);
      for (int i = 0; i < N_CLB; i++) begin
        clb_cfg[i].used = ($urandom % 5) != 0;
        clb_cfg[i].lut  = LUT_N'($urandom);
        for (int k = 0; k < LUT_K; k++) clb_cfg[i].sel[k] = src_t'($urandom % N_SRC);
      end
      for (int o = 0; o < N_OUT; o++) begin
        out_cfg[o].en  = ($urandom % 6) != 0;
        out_cfg[o].sel = clb_idx_t'($urandom % N_CLB);
      end
      defect = '0;
      if (round % 2 == 1) defect[$urandom % N_CLB] = 1'b1;
      for (int c = 0; c < 50; c++) begin
        if (c > 0) @(negedge clk);
        pin_in = N_IN'($urandom);
        #1;
        checks++;
        if (pin_out !== ref_pins(out_cfg, q_ref)) begin
          failures++;
          $display("FAIL round %0d cycle %0d pins %b exp %b", round, c, pin_out, ref_pins(out_cfg, q_ref));
        end
        q_ref = ref_step(clb_cfg, q_ref, pin_in, defect);
        @(posedge clk); #1;
        checks++;
        if (clb_q !== q_ref) begin
          failures++;
          $display("FAIL round %0d cycle %0d q %b exp %b", round, c, clb_q, q_ref);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
