// clb_fabric: the reconfigurable array, N_CLB CLBs in a row with their
// programmable interconnect and output pins.
//
// Every CLB sees one source bus made of all CLB outputs (sources
// 0..N_CLB-1) and the primary inputs (sources N_CLB..N_CLB+N_IN-1); its
// configuration word chooses which of them feed its look-up table. Each
// output pin shows the registered output of the CLB its configuration word
// names, or 0 when the pin is disabled.
//
// Interface: `clb_cfg` and `out_cfg` are the whole configuration, read in
// parallel from the configuration memory. `pin_in` and `pin_out` are the
// primary pins. `defect` marks physically damaged CLBs for simulation (their
// outputs stick at 0); tie it low in a real part. `clb_q` exposes every CLB
// output.
//
// Timing: each CLB adds one register stage; output pins are combinational
// from the CLB registers. Source numbers at or above N_SRC do not exist;
// the source bus is zero-padded so that such a number reads 0.
//
// The 24-CLB array follows the design description; the one-dimensional
// shared source bus and the pin counts are this design's own choices.
module clb_fabric
  import nsclb_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  clb_cfg_array_t       clb_cfg,
  input  out_cfg_array_t       out_cfg,
  input  logic [N_IN-1:0]      pin_in,
  input  logic [N_CLB-1:0]     defect,
  output logic [N_OUT-1:0]     pin_out,
  output logic [N_CLB-1:0]     clb_q
);

  localparam int unsigned BUS_N = 2 ** SRC_W;

  logic [BUS_N-1:0] bus;

  always_comb begin
    bus = '0;
    bus[N_SRC-1:0] = {pin_in, clb_q};
  end

  for (genvar i = 0; i < N_CLB; i++) begin : g_clb
    clb u_clb (
      .clk    (clk),
      .rst_n  (rst_n),
      .cfg    (clb_cfg[i]),
      .srcs   (bus),
      .defect (defect[i]),
      .q      (clb_q[i])
    );
  end

  // CLB outputs padded to every value of a CLB number.
  logic [2**IDX_W-1:0] q_pad;

  always_comb begin
    q_pad = '0;
    q_pad[N_CLB-1:0] = clb_q;
    for (int o = 0; o < N_OUT; o++)
      pin_out[o] = out_cfg[o].en && q_pad[out_cfg[o].sel];
  end

endmodule
