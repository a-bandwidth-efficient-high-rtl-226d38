// loader: DMA engine that streams the input image into the Circle Buffer.
//
// The N x N image is read as B overlapping bands of R rows (R = K) and
// C columns (C = N), top band first; inside a band the words are read column
// by column from left to right, and top to bottom inside a column. Three
// counters (i_cnt over bands, j_cnt over columns, k_cnt over rows) control
// these loops and the loader_agu address unit produces the addresses. This
// follows the Loader algorithm of the design description.
//
// Operation: a `start` pulse latches the configuration and raises `hreq` to
// ask the host for the bus; once `hlda` (bus granted) is seen the Loader owns
// the bus until the last word is pushed, then drops `hreq` and raises `done`.
// The host must keep `hlda` high while `hreq` is high. Memory reads are
// synchronous: `mem_rd` with `mem_addr` in one cycle returns `mem_rdata` in
// the next. Reads are pipelined, so a word is moved every clock cycle while
// the buffer has room. When `fifo_full` is high the word just returned is
// parked in the Dout register and pushed once there is room, after which
// reading resumes. With B, C or R zero nothing is read.
//
// Timing with an immediate grant and a buffer that never fills:
// start -> hreq (1 cycle) -> first read (1 cycle) -> B*C*R pushes in
// B*C*R cycles -> done one cycle after the last push.
// The FSM states, the pipelining of reads and the parking register are this
// design's own choices.
module loader
  import conv2d_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  loader_cfg_t cfg,
  output logic        busy,
  output logic        done,
  // bus ownership handshake with the host
  output logic        hreq,
  input  logic        hlda,
  // external memory read port
  output logic        mem_rd,
  output addr_t       mem_addr,
  input  word_t       mem_rdata,
  // Circle Buffer write port
  output logic        fifo_wr,
  output word_t       fifo_data,
  input  logic        fifo_full
);

  typedef enum logic [2:0] {
    S_IDLE, S_BUSREQ, S_READ, S_XFER, S_HOLD, S_FINISH
  } state_e;

  state_e      state_q, state_d;
  loader_cfg_t cfg_q;
  dim_t        i_cnt, j_cnt, k_cnt;
  logic        last_q;       // the word in flight is the last one
  word_t       dout_q;       // parked word while the buffer is full
  logic        issue;        // a read is issued this cycle
  logic        agu_load, next_row, next_col;
  logic        last_row, last_col, last_band;
  logic        done_q;

  assign last_row  = (k_cnt == cfg_q.r - 1'b1);
  assign last_col  = (j_cnt == cfg_q.c - 1'b1);
  assign last_band = (i_cnt == cfg_q.b - 1'b1);

  loader_agu u_agu (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (agu_load),
    .iaddr    (cfg_q.iaddr),
    .c        (cfg_q.c),
    .next_row (next_row),
    .next_col (next_col),
    .addr     (mem_addr)
  );

  always_comb begin
    state_d   = state_q;
    issue     = 1'b0;
    fifo_wr   = 1'b0;
    fifo_data = mem_rdata;
    agu_load  = 1'b0;
    unique case (state_q)
      S_IDLE: begin
        if (start) begin
          state_d  = (cfg.b == '0 || cfg.c == '0 || cfg.r == '0) ? S_FINISH : S_BUSREQ;
        end
      end
      S_BUSREQ: begin
        agu_load = 1'b1;
        if (hlda) state_d = S_READ;
      end
      S_READ: begin
        issue   = 1'b1;
        state_d = S_XFER;
      end
      S_XFER: begin
        if (!fifo_full) begin
          fifo_wr = 1'b1;
          if (last_q) state_d = S_FINISH;
          else        issue   = 1'b1;
        end else begin
          state_d = S_HOLD;
        end
      end
      S_HOLD: begin
        fifo_data = dout_q;
        if (!fifo_full) begin
          fifo_wr = 1'b1;
          state_d = last_q ? S_FINISH : S_READ;
        end
      end
      S_FINISH: state_d = S_IDLE;
      default:  state_d = S_IDLE;
    endcase
  end

  assign mem_rd   = issue;
  assign next_row = issue && !last_row;
  assign next_col = issue && last_row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cfg_q   <= '0;
      i_cnt   <= '0;
      j_cnt   <= '0;
      k_cnt   <= '0;
      last_q  <= 1'b0;
      dout_q  <= '0;
      done_q  <= 1'b0;
    end else begin
      state_q <= state_d;
      if (state_q == S_IDLE && start) begin
        cfg_q  <= cfg;
        i_cnt  <= '0;
        j_cnt  <= '0;
        k_cnt  <= '0;
        last_q <= 1'b0;
        done_q <= 1'b0;
      end
      if (state_q == S_FINISH) done_q <= 1'b1;
      if (state_q == S_XFER && fifo_full) dout_q <= mem_rdata;
      if (issue) begin
        last_q <= last_row && last_col && last_band;
        if (!last_row) begin
          k_cnt <= k_cnt + 1'b1;
        end else begin
          k_cnt <= '0;
          if (!last_col) begin
            j_cnt <= j_cnt + 1'b1;
          end else begin
            j_cnt <= '0;
            i_cnt <= i_cnt + 1'b1;
          end
        end
      end
    end
  end

  assign busy = (state_q != S_IDLE);
  assign done = done_q;
  assign hreq = (state_q == S_BUSREQ) || (state_q == S_READ) ||
                (state_q == S_XFER)   || (state_q == S_HOLD);

  // Memory is only read while the bus is granted.
  a_read_with_grant: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rd |-> hlda);
  // A word is never pushed into a full buffer.
  a_no_push_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    fifo_wr |-> !fifo_full);

endmodule
