// reset_sync: reset synchronizer for one clock domain.
//
// The reset is asserted asynchronously (as soon as rst_n_in falls) and
// released synchronously, STAGES rising edges of clk after rst_n_in rises,
// so that no flip-flop of the domain leaves reset near a clock edge. Used
// once per clock domain of the convolution unit; a design choice of this
// implementation.
module reset_sync #(
  parameter int unsigned STAGES = 2   // at least 2
) (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);

  logic [STAGES-1:0] sync_q;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) sync_q <= '0;
    else           sync_q <= {sync_q[STAGES-2:0], 1'b1};
  end

  assign rst_n_out = sync_q[STAGES-1];

endmodule
