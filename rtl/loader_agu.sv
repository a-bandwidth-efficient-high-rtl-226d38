// loader_agu: address generating unit of the Loader.
//
// Holds the two address registers of the Loader algorithm: Paddr, the top
// of the current band column, and Addr, the word being read. On `load` both
// take the image start address. `next_row` moves Addr down one image row
// (Addr += C). `next_col` moves to the top of the next column
// (Paddr += 1, Addr = Paddr + 1). Since bands overlap by all but one row,
// the column after the last one of a band is exactly the first column of the
// next band, so no separate band step is needed. Registers update on the
// rising clock edge; addr is the current Addr.
module loader_agu
  import conv2d_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  addr_t iaddr,
  input  dim_t  c,
  input  logic  next_row,
  input  logic  next_col,
  output addr_t addr
);

  addr_t paddr_q, addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      paddr_q <= '0;
      addr_q  <= '0;
    end else if (load) begin
      paddr_q <= iaddr;
      addr_q  <= iaddr;
    end else if (next_col) begin
      paddr_q <= paddr_q + 1'b1;
      addr_q  <= paddr_q + 1'b1;
    end else if (next_row) begin
      addr_q  <= addr_q + addr_t'(c);
    end
  end

  assign addr = addr_q;

endmodule
