// mac_unit: multiply-accumulate unit of the 2D convolution unit.
//
// For every output O(x,y) the unit reads the K*K words of the window from
// the Circle Buffer (a valid/ready stream that delivers the window column by
// column, top to bottom) and the matching weight from the Weight Registers,
// and accumulates their products in mac_datapath. When the window is done it
// waits while the next stage is busy (o_busy, "status of next stage"), then
// writes the result with a one-cycle o_we ("write enable to next stage") to
// address OADDR + output index, and pulses conv_done. After rows*cols
// outputs it raises `done`. The control follows the MAC algorithm and state
// machine of the design description.
//
// Because the buffer delivers the window column-major while the weights are
// stored row-major (W(m,n) at m*K+n), the weight address walks down a column
// in steps of K and restarts at the top of the next column.
//
// The configuration (K, outputs per band, bands, output address) is latched
// on `start`, so the host may reprogram the registers for the next job while
// this one runs. The latched K and outputs-per-band drive the read side of
// the Circle Buffer (cb_k, cb_cols). Timing: one word per cycle while the
// buffer has data; one more cycle per output for the write, so an
// uninterrupted job takes rows*cols*(K*K+1) cycles after `start` plus one.
module mac_unit
  import conv2d_pkg::*;
#(
  parameter int unsigned KMAX_P = KMAX,
  localparam int unsigned WAW   = $clog2(KMAX_P * KMAX_P)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  mac_cfg_t       cfg,
  output logic           busy,
  output logic           done,
  // Weight Registers read port
  output logic [WAW-1:0] w_raddr,
  input  word_t          w_rdata,
  // Circle Buffer read port
  output dim_t           cb_k,
  output dim_t           cb_cols,
  input  logic           cb_valid,
  output logic           cb_ready,
  input  word_t          cb_data,
  // next stage write port
  output logic           o_we,
  output addr_t          o_addr,
  output word_t          o_data,
  input  logic           o_busy,
  output logic           conv_done
);

  typedef enum logic [1:0] {S_IDLE, S_ACC, S_WRITE} state_e;

  state_e         state_q;
  mac_cfg_t       cfg_q;
  dim_t           row_cnt, col_cnt;   // position inside the kernel window
  logic [WAW-1:0] widx;               // weight address m*K+n
  addr_t          out_cnt;            // outputs written so far
  addr_t          out_total;
  logic           first_q;            // next product starts a new sum
  logic           done_q;
  logic           fire, win_last;
  word_t          result;

  assign fire     = (state_q == S_ACC) && cb_valid;
  assign cb_ready = (state_q == S_ACC);
  assign win_last = (row_cnt == cfg_q.k - 1'b1) && (col_cnt == cfg_q.k - 1'b1);
  assign w_raddr  = widx;
  assign cb_k     = cfg_q.k;
  assign cb_cols  = cfg_q.cols;
  assign out_total = addr_t'(cfg_q.rows) * addr_t'(cfg_q.cols);

  mac_datapath #(.KMAX_P(KMAX_P)) u_dp (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (fire),
    .clr    (first_q),
    .x      (cb_data),
    .y      (w_rdata),
    .result (result)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cfg_q   <= '0;
      row_cnt <= '0;
      col_cnt <= '0;
      widx    <= '0;
      out_cnt <= '0;
      first_q <= 1'b1;
      done_q  <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (start) begin
            cfg_q   <= cfg;
            row_cnt <= '0;
            col_cnt <= '0;
            widx    <= '0;
            out_cnt <= '0;
            first_q <= 1'b1;
            done_q  <= 1'b0;
            if (cfg.k == '0 || cfg.cols == '0 || cfg.rows == '0) done_q <= 1'b1;
            else                                                  state_q <= S_ACC;
          end
        end
        S_ACC: begin
          if (fire) begin
            first_q <= 1'b0;
            if (row_cnt == cfg_q.k - 1'b1) begin
              row_cnt <= '0;
              col_cnt <= col_cnt + 1'b1;
              widx    <= WAW'(col_cnt + 1'b1);
            end else begin
              row_cnt <= row_cnt + 1'b1;
              widx    <= widx + WAW'(cfg_q.k);
            end
            if (win_last) begin
              col_cnt <= '0;
              widx    <= '0;
              state_q <= S_WRITE;
            end
          end
        end
        S_WRITE: begin
          if (!o_busy) begin
            first_q <= 1'b1;
            out_cnt <= out_cnt + 1'b1;
            if (out_cnt + 1'b1 == out_total) begin
              state_q <= S_IDLE;
              done_q  <= 1'b1;
            end else begin
              state_q <= S_ACC;
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign o_we      = (state_q == S_WRITE) && !o_busy;
  assign o_addr    = cfg_q.oaddr + out_cnt;
  assign o_data    = result;
  assign conv_done = o_we;
  assign busy      = (state_q != S_IDLE);
  assign done      = done_q;

  // A result is never written while the next stage is busy.
  a_no_write_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    o_we |-> !o_busy);

endmodule
