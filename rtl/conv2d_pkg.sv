// conv2d_pkg: constants and types shared by the 2D convolution unit.
//
// The unit works on 24-bit signed fixed-point words, following the design
// description. The number of fraction bits, the address width and the width
// of the geometry registers are this design's own choices. KMAX is the largest
// kernel size the unit supports; it sets the Circle Buffer depth
// (KMAX*KMAX+1 words) and the number of weight registers (KMAX*KMAX).
package conv2d_pkg;

  localparam int unsigned DATA_W    = 24;  // image, weight and result words
  localparam int unsigned FRAC_BITS = 12;  // fraction bits of every word (Q12.12)
  localparam int unsigned ADDR_W    = 32;  // external memory word address
  localparam int unsigned DIM_W     = 16;  // band / column / row counts
  localparam int unsigned KMAX      = 11;  // largest kernel size

  typedef logic signed [DATA_W-1:0] word_t;
  typedef logic        [ADDR_W-1:0] addr_t;
  typedef logic        [DIM_W-1:0]  dim_t;

  // Loader configuration: start address and band geometry (B bands of
  // R rows by C columns), as in the Loader algorithm.
  typedef struct packed {
    addr_t iaddr;
    dim_t  b;
    dim_t  c;
    dim_t  r;
  } loader_cfg_t;

  // MAC configuration: kernel size K, windows per band, number of bands and
  // the address where the first result is written.
  typedef struct packed {
    addr_t oaddr;
    dim_t  k;
    dim_t  cols;
    dim_t  rows;
  } mac_cfg_t;

  // Register map of the host configuration port (word addresses).
  typedef enum logic [3:0] {
    REG_IADDR = 4'd0,
    REG_B     = 4'd1,
    REG_C     = 4'd2,
    REG_R     = 4'd3,
    REG_OADDR = 4'd4,
    REG_K     = 4'd5,
    REG_OCOLS = 4'd6,
    REG_OROWS = 4'd7
  } reg_addr_e;

endpackage
