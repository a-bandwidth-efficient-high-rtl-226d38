// circle_buffer: the data-reuse buffer between the Loader and the MAC unit.
//
// The Loader writes the image band column by column (K words per column).
// The MAC unit reads one K x K window per "read round". Three pointers manage
// the memory of CAP = KMAX*KMAX+1 words, all counted modulo CAP:
//   WP  write pointer: next free location; +1 after every write.
//   RP  read pointer: first word of the current window.
//   CP  circle pointer: next word to read in the current round; it runs from
//       RP over K*K locations. At the end of a round RP moves forward by K
//       (the oldest column is dropped, the other K*(K-1) words are reused by
//       the next window) and CP is set to the new RP.
// Full is WP+1 == RP, so one location always stays free; the reader sees
// "empty" when CP == WP, i.e. the next word of the round has not arrived yet.
//
// Band ends are this design's own addition, needed to make the scheme work
// over a whole image: after the last window of a band (cfg_cols rounds) RP
// moves by K*K instead of K, because the first window of the next band shares
// nothing with it. Read-side configuration (cfg_k, cfg_cols) must stay stable
// while a convolution runs.
//
// Write and read side have their own clocks and resets, as in the design
// description. With DUAL_CLOCK = 1 each side sees the other's pointer through
// a ptr_sync handshake synchronizer (a few cycles late, which only delays,
// never corrupts); with DUAL_CLOCK = 0 both clocks must be the same and the
// pointers are used directly, so a word can be read the cycle after it is
// written. Pointers are binary-coded on both sides.
//
// Interface: wr_en/wr_data/wr_full (write when !wr_full), and a valid/ready
// read stream rd_valid/rd_ready/rd_data whose data is combinational from CP
// (first-word-fall-through). rd_last marks the last word of a round.
module circle_buffer
  import conv2d_pkg::*;
#(
  parameter int unsigned KMAX_P     = KMAX,
  parameter bit          DUAL_CLOCK = 1'b1,
  localparam int unsigned CAP = KMAX_P * KMAX_P + 1,
  localparam int unsigned PW  = $clog2(CAP)
) (
  // write side
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr_en,
  input  word_t         wr_data,
  output logic          wr_full,
  // read side
  input  logic          rclk,
  input  logic          rrst_n,
  input  dim_t          cfg_k,     // kernel size K, 1..KMAX_P
  input  dim_t          cfg_cols,  // windows (read rounds) per band
  output logic          rd_valid,
  input  logic          rd_ready,
  output word_t         rd_data,
  output logic          rd_last
);

  logic [PW-1:0] wp, rp, cp;
  logic [PW-1:0] rp_at_w;   // RP as seen by the write side
  logic [PW-1:0] wp_at_r;   // WP as seen by the read side
  logic [PW-1:0] wp_inc;
  logic [PW-1:0] rcnt;      // words read in the current round
  dim_t          round_cnt; // rounds done in the current band
  logic [PW-1:0] kk_m1;     // K*K - 1
  logic [PW-1:0] step;
  logic [PW-1:0] rp_next;
  logic          wr_fire, rd_fire;

  function automatic logic [PW-1:0] wrap_add(logic [PW-1:0] a, logic [PW-1:0] b);
    logic [PW:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= (PW+1)'(CAP)) s = s - (PW+1)'(CAP);
    return s[PW-1:0];
  endfunction

  // ---------------------------------------------------------------- memory
  dp_ram #(.WIDTH(DATA_W), .DEPTH(CAP)) u_mem (
    .wclk  (wclk),
    .we    (wr_fire),
    .waddr (wp),
    .wdata (wr_data),
    .raddr (cp),
    .rdata (rd_data)
  );

  // ---------------------------------------------------- pointer crossing
  if (DUAL_CLOCK) begin : g_sync
    ptr_sync #(.WIDTH(PW)) u_wp_sync (
      .src_clk (wclk), .src_rst_n (wrst_n), .src_val (wp),
      .dst_clk (rclk), .dst_rst_n (rrst_n), .dst_val (wp_at_r)
    );
    ptr_sync #(.WIDTH(PW)) u_rp_sync (
      .src_clk (rclk), .src_rst_n (rrst_n), .src_val (rp),
      .dst_clk (wclk), .dst_rst_n (wrst_n), .dst_val (rp_at_w)
    );
  end else begin : g_direct
    assign wp_at_r = wp;
    assign rp_at_w = rp;
  end

  // ------------------------------------------------------------ write side
  assign wp_inc  = wrap_add(wp, PW'(1));
  assign wr_full = (wp_inc == rp_at_w);
  assign wr_fire = wr_en && !wr_full;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n)      wp <= '0;
    else if (wr_fire) wp <= wp_inc;
  end

  // ------------------------------------------------------------- read side
  assign kk_m1    = PW'(cfg_k * cfg_k - 1);
  assign rd_valid = (cp != wp_at_r);
  assign rd_fire  = rd_valid && rd_ready;
  assign rd_last  = (rcnt == kk_m1);
  assign step     = (round_cnt == cfg_cols - 1'b1) ? kk_m1 + 1'b1 : PW'(cfg_k);
  assign rp_next  = wrap_add(rp, step);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rp        <= '0;
      cp        <= '0;
      rcnt      <= '0;
      round_cnt <= '0;
    end else if (rd_fire) begin
      if (rd_last) begin
        rp        <= rp_next;
        cp        <= rp_next;
        rcnt      <= '0;
        round_cnt <= (round_cnt == cfg_cols - 1'b1) ? '0 : round_cnt + 1'b1;
      end else begin
        cp   <= wrap_add(cp, PW'(1));
        rcnt <= rcnt + 1'b1;
      end
    end
  end

  // A round never reads past the data that has been written.
  a_read_has_data: assert property (@(posedge rclk) disable iff (!rrst_n)
    rd_fire |-> cp != wp_at_r);
  // The kernel must fit the buffer.
  a_k_range: assert property (@(posedge rclk) disable iff (!rrst_n)
    rd_fire |-> (cfg_k >= 1 && cfg_k <= dim_t'(KMAX_P)));

endmodule
