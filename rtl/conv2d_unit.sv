// conv2d_unit: bandwidth-efficient 2D convolution unit (top level).
//
// Computes O(x,y) = sum_{m,n} I(x+m, y+n) * W(m,n) for an image I of
// N x N words and a K x K kernel W (K <= KMAX), giving M x M outputs with
// M = N-K+1. Every input word is fetched from external memory once per band
// instead of once per window: the Loader reads the image as M overlapping
// bands of K rows, column by column, and the Circle Buffer keeps the K*(K-1)
// words that consecutive windows of a band share, so each new window costs
// only K new words. This cuts the input traffic from M*M*K*K words to
// M*N*K words.
//
// Blocks: conv_regfile (control registers and kernel weights), loader (DMA
// engine with bus request/grant), circle_buffer (reuse buffer) and mac_unit
// (one multiplier-accumulator). Loader and MAC form a two-stage pipeline
// through the buffer and run concurrently.
//
// Clocks: `clk` drives the register file, the Loader and the buffer's write
// side; `mac_clk` drives the MAC unit and the buffer's read side, so the two
// stages can run at different speeds. With DUAL_CLOCK = 1 (default) the two
// clocks may be unrelated and the buffer pointers cross through handshake
// synchronizers; with DUAL_CLOCK = 0 mac_clk must be the same clock as clk
// and the pointers are compared directly (one cycle less latency). rst_n is
// synchronized into each domain. Signals belong to the clk domain except
// mac_start, mac_busy, mac_done, conv_done and the o_* port, which belong to
// the mac_clk domain. The MAC configuration registers and the weights are
// read across the domains without synchronization: the MAC registers are
// sampled at mac_start and must be stable a few cycles around it, and the
// weights must not change between mac_start and mac_done.
//
// Use: write IADDR, B = M, C = N, R = K and the MAC registers OADDR, K,
// OCOLS = M, OROWS = M through the configuration port; write the K*K weights
// (W(m,n) at address m*K+n) through the coefficient port; pulse loader_start
// and mac_start (in either order). Results appear on o_we/o_addr/o_data in
// row-major output order, each one accompanied by a conv_done pulse;
// loader_done and mac_done rise when each side has finished; cb_full and
// cb_empty show the state of the Circle Buffer. The Loader can
// be restarted with a new configuration as soon as loader_done rises, while
// the MAC unit is still working. The image word at row r, column c must be at
// address IADDR + r*N + c.
//
// Throughput: one multiply-accumulate per cycle; each output takes K*K+1
// cycles when the buffer does not run dry. Data words are 24-bit signed
// fixed point (FRAC_BITS fraction bits, see conv2d_pkg).
module conv2d_unit
  import conv2d_pkg::*;
#(
  parameter int unsigned KMAX_P     = KMAX,
  parameter bit          DUAL_CLOCK = 1'b1,
  localparam int unsigned WAW       = $clog2(KMAX_P * KMAX_P)
) (
  input  logic              clk,
  input  logic              mac_clk,
  input  logic              rst_n,
  // host configuration port
  input  logic              cfg_we,
  input  logic [3:0]        cfg_addr,
  input  logic [ADDR_W-1:0] cfg_wdata,
  output logic [ADDR_W-1:0] cfg_rdata,
  // kernel coefficient port
  input  word_t             coeff_in,
  input  logic              c_we_in,
  input  logic [WAW-1:0]    c_wa_in,
  // control and status
  input  logic              loader_start,
  output logic              loader_busy,
  output logic              loader_done,
  input  logic              mac_start,
  output logic              mac_busy,
  output logic              mac_done,
  output logic              conv_done,
  output logic              cb_full,     // Circle Buffer has no free location
  output logic              cb_empty,    // next word of the window not loaded yet
  // bus ownership and external memory read port
  output logic              hreq,
  input  logic              hlda,
  output logic              mem_rd,
  output addr_t             mem_addr,
  input  word_t             mem_rdata,
  // next stage / output memory write port
  output logic              o_we,
  output addr_t             o_addr,
  output word_t             o_data,
  input  logic              o_busy
);

  loader_cfg_t    loader_cfg;
  mac_cfg_t       mac_cfg;
  logic [WAW-1:0] w_raddr;
  word_t          w_rdata;
  logic           fifo_wr, fifo_full;
  word_t          fifo_data;
  dim_t           cb_k, cb_cols;
  logic           cb_valid, cb_ready, cb_last;
  word_t          cb_data;
  logic           ld_rst_n, mac_rst_n;

  reset_sync u_ld_rst  (.clk (clk),     .rst_n_in (rst_n), .rst_n_out (ld_rst_n));
  reset_sync u_mac_rst (.clk (mac_clk), .rst_n_in (rst_n), .rst_n_out (mac_rst_n));

  conv_regfile #(.KMAX_P(KMAX_P)) u_rf (
    .clk, .rst_n (ld_rst_n),
    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .coeff_in, .c_we_in, .c_wa_in,
    .loader_cfg, .mac_cfg,
    .w_raddr, .w_rdata
  );

  loader u_loader (
    .clk, .rst_n (ld_rst_n),
    .start     (loader_start),
    .cfg       (loader_cfg),
    .busy      (loader_busy),
    .done      (loader_done),
    .hreq, .hlda,
    .mem_rd, .mem_addr, .mem_rdata,
    .fifo_wr, .fifo_data, .fifo_full
  );

  circle_buffer #(.KMAX_P(KMAX_P), .DUAL_CLOCK(DUAL_CLOCK)) u_cb (
    .wclk     (clk),
    .wrst_n   (ld_rst_n),
    .wr_en    (fifo_wr),
    .wr_data  (fifo_data),
    .wr_full  (fifo_full),
    .rclk     (mac_clk),
    .rrst_n   (mac_rst_n),
    .cfg_k    (cb_k),
    .cfg_cols (cb_cols),
    .rd_valid (cb_valid),
    .rd_ready (cb_ready),
    .rd_data  (cb_data),
    .rd_last  (cb_last)
  );

  mac_unit #(.KMAX_P(KMAX_P)) u_mac (
    .clk      (mac_clk),
    .rst_n    (mac_rst_n),
    .start    (mac_start),
    .cfg      (mac_cfg),
    .busy     (mac_busy),
    .done     (mac_done),
    .w_raddr, .w_rdata,
    .cb_k, .cb_cols,
    .cb_valid, .cb_ready, .cb_data,
    .o_we, .o_addr, .o_data, .o_busy,
    .conv_done
  );

  assign cb_full  = fifo_full;    // clk domain
  assign cb_empty = !cb_valid;    // mac_clk domain

  // The MAC unit and the buffer agree on where each window ends.
  a_window_aligned: assert property (@(posedge mac_clk) disable iff (!mac_rst_n)
    (cb_valid && cb_ready && cb_last) |=> !cb_ready);

endmodule
