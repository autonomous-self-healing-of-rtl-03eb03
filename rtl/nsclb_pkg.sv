// nsclb_pkg: sizes, configuration-word layout and shared types of the
// self-healing CLB fabric.
//
// The fabric is a linear array of N_CLB configurable logic blocks (CLBs).
// Each CLB is described by one configuration word: a "used" flag, the
// source of each of its LUT_K inputs (its input connections) and the
// 2**LUT_K function bits of its look-up table. A source number below N_CLB
// names the registered output of that CLB; a number N_CLB + p names primary
// input p. Each of the N_OUT output pins has a word naming the CLB it shows.
//
// N_CLB = 24 is the size of the array the design is demonstrated on. The
// input and output pin counts, the look-up table size and the word layout
// are this design's own choices.
package nsclb_pkg;

  parameter int unsigned N_CLB = 24;   // CLBs in the array
  parameter int unsigned N_IN  = 8;    // primary input pins
  parameter int unsigned N_OUT = 8;    // primary output pins
  parameter int unsigned LUT_K = 4;    // inputs per CLB look-up table

  localparam int unsigned N_SRC  = N_CLB + N_IN;          // routable sources
  localparam int unsigned SRC_W  = $clog2(N_SRC);         // source number width
  localparam int unsigned IDX_W  = $clog2(N_CLB);         // CLB number width
  localparam int unsigned OIDX_W = $clog2(N_OUT);         // output pin number width
  localparam int unsigned LUT_N  = 2 ** LUT_K;            // function bits per CLB
  localparam int unsigned CNT_W  = $clog2(N_CLB + 1);     // counts of CLBs

  typedef logic [SRC_W-1:0]  src_t;
  typedef logic [IDX_W-1:0]  clb_idx_t;
  typedef logic [OIDX_W-1:0] out_idx_t;

  // Configuration word of one CLB.
  typedef struct packed {
    logic                  used;   // CLB carries part of the application
    src_t [LUT_K-1:0]      sel;    // input connections
    logic [LUT_N-1:0]      lut;    // function bits
  } clb_cfg_t;

  // Configuration word of one output pin.
  typedef struct packed {
    logic     en;                  // pin driven from a CLB
    clb_idx_t sel;                 // CLB whose output the pin shows
  } out_cfg_t;

  // One write to the configuration memory: a CLB word, an output-pin word,
  // or both in the same cycle.
  typedef struct packed {
    logic     clb_we;
    clb_idx_t clb_addr;
    clb_cfg_t clb_data;
    logic     out_we;
    out_idx_t out_addr;
    out_cfg_t out_data;
  } cfg_wr_t;

  typedef clb_cfg_t [N_CLB-1:0] clb_cfg_array_t;
  typedef out_cfg_t [N_OUT-1:0] out_cfg_array_t;

endpackage
