// dp_ram: simple dual-port memory used as the Circle Buffer store.
//
// One write port, clocked by wclk, and one read port. The read port is
// asynchronous (combinational from the read address), which maps to
// distributed (LUT) RAM on an FPGA, so a word written on one edge can be read
// from the next. Because the read has no clock, the write and read sides may
// run from unrelated clocks; the Circle Buffer's pointers guarantee that a
// location is never read while it is being written. The memory is not reset.
module dp_ram #(
  parameter int unsigned WIDTH = 24,
  parameter int unsigned DEPTH = 122,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             wclk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
