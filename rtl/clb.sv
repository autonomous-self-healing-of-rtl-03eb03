// clb: one configurable logic block of the fabric.
//
// The block picks LUT_K signals out of the fabric's source bus according to
// the input connections of its configuration word, uses them as the address
// of its look-up table (input 0 is the least significant address bit) and
// registers the addressed function bit. An unused CLB holds 0.
//
// Interface: `cfg` is the CLB's configuration word, `srcs` carries every
// routable signal (CLB outputs 0..N_CLB-1, then the primary inputs, then
// zeros up to the next power of two), `q` is
// the registered output. `defect` models a physical defect of this CLB: while
// it is high the output is stuck at 0, whatever the configuration. A
// fabricated part ties it low; it exists so that a damaged CLB can be
// simulated.
//
// Timing: one clock of latency from the sources to `q`; a configuration
// change takes effect on the next clock edge.
//
// That a CLB is configured by input connections and function bits follows
// the design description; the look-up-table-plus-flip-flop structure, its
// size and the stuck-at-0 defect model are this design's own choices.
module clb
  import nsclb_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  clb_cfg_t         cfg,
  input  logic [2**SRC_W-1:0] srcs,
  input  logic             defect,
  output logic             q
);

  logic [LUT_K-1:0] lut_addr;
  logic             lut_out;

  always_comb begin
    for (int k = 0; k < LUT_K; k++)
      lut_addr[k] = srcs[cfg.sel[k]];
    lut_out = cfg.lut[lut_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      q <= 1'b0;
    else
      q <= cfg.used && !defect && lut_out;
  end

endmodule
