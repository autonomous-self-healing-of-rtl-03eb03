// config_memory: the configuration memory of the fabric.
//
// It holds one configuration word per CLB (used flag, input connections,
// function bits) and one per output pin (enable, source CLB). All words are
// read in parallel, because the configuration is what drives the fabric's
// logic and because the restructuring logic inspects the whole structure at
// once. Writes arrive as a `cfg_wr_t`: one CLB word and one output-pin word
// can be written in the same cycle.
//
// Interface: `wr` is the write request, `clb_cfg`/`out_cfg` the stored
// words. Reset clears every word, which leaves all CLBs unused and all pins
// disabled.
//
// Timing: a write is visible on the outputs after the clock edge that takes
// it. An address beyond the array is ignored.
//
// That the configuration consists of input and function bits per CLB
// follows the design description; the word layout, the parallel read and
// the reset value are this design's own choices.
module config_memory
  import nsclb_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  cfg_wr_t        wr,
  output clb_cfg_array_t clb_cfg,
  output out_cfg_array_t out_cfg
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clb_cfg <= '0;
      out_cfg <= '0;
    end else begin
      if (wr.clb_we && int'(wr.clb_addr) < N_CLB)
        clb_cfg[wr.clb_addr] <= wr.clb_data;
      if (wr.out_we && int'(wr.out_addr) < N_OUT)
        out_cfg[wr.out_addr] <= wr.out_data;
    end
  end

endmodule
