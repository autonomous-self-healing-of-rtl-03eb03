// nsclb_top: a self-healing reconfigurable fabric.
//
// A row of N_CLB configurable logic blocks runs a user application loaded
// into the configuration memory. When a fault diagnosis marks an active CLB
// faulty, the restructuring unit moves that CLB's function to the nearest
// free spare CLB and re-routes every connection to it, while the rest of the
// fabric keeps running. Several faults are repaired one after the other;
// faults on unused CLBs just remove them from the pool of spares.
//
// Interface:
//   host_*         configuration load port (one CLB word and/or one output
//                  pin word per clock). A write is taken only while
//                  `host_ready` is high; during a repair the restructuring
//                  unit owns the memory.
//   pin_in/pin_out primary inputs and outputs of the application.
//   fault          diagnosed fault status, 1 = CLB faulty. Fault detection
//                  and diagnosis are outside this design.
//   defect         simulation model of physical damage: a CLB whose bit is
//                  high has its output stuck at 0. Tie low in a real part.
//   active, spare, repl_*, spare_taken, unrecoverable, repairs,
//   last_distance, n_*
//                  status of the healing (see restructuring_unit).
//   clb_q          output of every CLB, for observation.
//
// Timing: pin_out follows pin_in through the configured CLB register
// stages. A repair finishes 5 + R clocks after the fault is seen (R: the
// connections to move, see restructuring_unit).
//
// The overall structure (CLB array, configuration bits, autonomous
// restructuring by nearest spare) follows the design description; the host
// port and the defect model are this design's own additions for loading and
// for testing.
module nsclb_top
  import nsclb_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 host_clb_we,
  input  clb_idx_t             host_clb_addr,
  input  clb_cfg_t             host_clb_data,
  input  logic                 host_out_we,
  input  out_idx_t             host_out_addr,
  input  out_cfg_t             host_out_data,
  output logic                 host_ready,
  input  logic [N_IN-1:0]      pin_in,
  output logic [N_OUT-1:0]     pin_out,
  input  logic [N_CLB-1:0]     fault,
  input  logic [N_CLB-1:0]     defect,
  output logic [N_CLB-1:0]     active,
  output logic [N_CLB-1:0]     spare,
  output logic [N_CLB-1:0]     repl_valid,
  output clb_idx_t [N_CLB-1:0] repl_idx,
  output logic [N_CLB-1:0]     spare_taken,
  output logic [N_CLB-1:0]     unrecoverable,
  output logic [15:0]          repairs,
  output clb_idx_t             last_distance,
  output logic [CNT_W-1:0]     n_active,
  output logic [CNT_W-1:0]     n_spare,
  output logic [CNT_W-1:0]     n_fault,
  output logic [N_CLB-1:0]     clb_q
);

  clb_cfg_array_t clb_cfg;
  out_cfg_array_t out_cfg;
  cfg_wr_t        heal_wr;
  cfg_wr_t        mem_wr;
  logic           busy;

  assign host_ready = !busy;

  always_comb begin
    if (busy) begin
      mem_wr = heal_wr;
    end else begin
      mem_wr          = '0;
      mem_wr.clb_we   = host_clb_we;
      mem_wr.clb_addr = host_clb_addr;
      mem_wr.clb_data = host_clb_data;
      mem_wr.out_we   = host_out_we;
      mem_wr.out_addr = host_out_addr;
      mem_wr.out_data = host_out_data;
    end
  end

  config_memory u_cfg (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr      (mem_wr),
    .clb_cfg (clb_cfg),
    .out_cfg (out_cfg)
  );

  restructuring_unit u_heal (
    .clk           (clk),
    .rst_n         (rst_n),
    .clb_cfg       (clb_cfg),
    .out_cfg       (out_cfg),
    .fault         (fault),
    .wr            (heal_wr),
    .busy          (busy),
    .active        (active),
    .spare         (spare),
    .repl_valid    (repl_valid),
    .repl_idx      (repl_idx),
    .spare_taken   (spare_taken),
    .unrecoverable (unrecoverable),
    .repairs       (repairs),
    .last_distance (last_distance),
    .n_active      (n_active),
    .n_spare       (n_spare),
    .n_fault       (n_fault)
  );

  clb_fabric u_fabric (
    .clk     (clk),
    .rst_n   (rst_n),
    .clb_cfg (clb_cfg),
    .out_cfg (out_cfg),
    .pin_in  (pin_in),
    .defect  (defect),
    .pin_out (pin_out),
    .clb_q   (clb_q)
  );

endmodule
