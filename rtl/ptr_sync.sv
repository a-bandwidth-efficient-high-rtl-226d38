// ptr_sync: carries a multi-bit pointer from one clock domain to another.
//
// The Circle Buffer's pointers do not move by one step at a time (the read
// pointer jumps by K, or by K*K at the end of a band), so a Gray-coded
// pointer cannot be synchronized bit by bit. Instead this block uses a
// two-phase (toggle) handshake: the source side captures the pointer in
// a holding register and flips a request bit; the destination synchronizes
// the request through SYNC_STAGES flip-flops, then copies the (by then stable)
// holding register and returns the flip as an acknowledge, which the source
// synchronizes back before it captures the next value. The destination thus
// sees a pointer that is a few cycles old but never corrupted; for a FIFO this
// is safe, since a stale pointer only under-reports data or space.
//
// Both sides reset to pointer value zero. Latency: about SYNC_STAGES+1
// destination cycles from capture to update; a new value is captured at most
// every 2*(SYNC_STAGES+1) cycles or so.
module ptr_sync #(
  parameter int unsigned WIDTH       = 7,
  parameter int unsigned SYNC_STAGES = 2   // at least 2
) (
  input  logic             src_clk,
  input  logic             src_rst_n,
  input  logic [WIDTH-1:0] src_val,
  input  logic             dst_clk,
  input  logic             dst_rst_n,
  output logic [WIDTH-1:0] dst_val
);

  logic [WIDTH-1:0]       hold_q;
  logic                   req_q;
  logic                   ack_q;
  logic [SYNC_STAGES-1:0] req_sync;
  logic [SYNC_STAGES-1:0] ack_sync;

  // Source side: capture a new value whenever the last one has been taken.
  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) begin
      hold_q   <= '0;
      req_q    <= 1'b0;
      ack_sync <= '0;
    end else begin
      ack_sync <= {ack_sync[SYNC_STAGES-2:0], ack_q};
      if (req_q == ack_sync[SYNC_STAGES-1]) begin
        if (hold_q != src_val) begin
          hold_q <= src_val;
          req_q  <= ~req_q;
        end
      end
    end
  end

  // Destination side: take the held value once the request has settled.
  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      req_sync <= '0;
      ack_q    <= 1'b0;
      dst_val  <= '0;
    end else begin
      req_sync <= {req_sync[SYNC_STAGES-2:0], req_q};
      if (req_sync[SYNC_STAGES-1] != ack_q) begin
        dst_val <= hold_q;
        ack_q   <= req_sync[SYNC_STAGES-1];
      end
    end
  end

endmodule
