// conv_regfile: control and weight registers of the 2D convolution unit.
//
// The host writes the control registers through a simple word-wide
// configuration port (cfg_we/cfg_addr/cfg_wdata, register map in
// conv2d_pkg::reg_addr_e) and reads them back combinationally on cfg_rdata.
// Loader registers: IADDR (image start address), B (bands), C (columns per
// band, the image width), R (rows per band, the kernel size). MAC registers:
// OADDR (first result address), K (kernel size), OCOLS (outputs per band)
// and OROWS (bands, i.e. output rows).
//
// The Weight Registers hold the K x K kernel, written once per layer through
// the coefficient port (coeff_in/c_we_in/c_wa_in), so the weights are never
// reloaded during a convolution. Weight W(m,n) (kernel row m, column n) is
// stored at address m*K+n. The MAC unit reads them combinationally through
// w_raddr/w_rdata.
//
// The document names the registers and their purpose; the register map,
// widths and the separate MAC geometry registers are this design's choice.
// The control registers reset to zero; the weight store has no reset, like
// a small distributed RAM. All writes take effect on the rising clock edge.
module conv_regfile
  import conv2d_pkg::*;
#(
  parameter int unsigned KMAX_P = KMAX,
  localparam int unsigned NW    = KMAX_P * KMAX_P,
  localparam int unsigned WAW   = $clog2(NW)
) (
  input  logic              clk,
  input  logic              rst_n,
  // host configuration port
  input  logic              cfg_we,
  input  logic [3:0]        cfg_addr,
  input  logic [ADDR_W-1:0] cfg_wdata,
  output logic [ADDR_W-1:0] cfg_rdata,
  // coefficient (weight) write port
  input  word_t             coeff_in,
  input  logic              c_we_in,
  input  logic [WAW-1:0]    c_wa_in,
  // to the Loader and MAC unit
  output loader_cfg_t       loader_cfg,
  output mac_cfg_t          mac_cfg,
  input  logic [WAW-1:0]    w_raddr,
  output word_t             w_rdata
);

  word_t weights [NW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loader_cfg <= '0;
      mac_cfg    <= '0;
    end else if (cfg_we) begin
      unique case (cfg_addr)
        REG_IADDR: loader_cfg.iaddr <= cfg_wdata;
        REG_B:     loader_cfg.b     <= dim_t'(cfg_wdata);
        REG_C:     loader_cfg.c     <= dim_t'(cfg_wdata);
        REG_R:     loader_cfg.r     <= dim_t'(cfg_wdata);
        REG_OADDR: mac_cfg.oaddr    <= cfg_wdata;
        REG_K:     mac_cfg.k        <= dim_t'(cfg_wdata);
        REG_OCOLS: mac_cfg.cols     <= dim_t'(cfg_wdata);
        REG_OROWS: mac_cfg.rows     <= dim_t'(cfg_wdata);
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (cfg_addr)
      REG_IADDR: cfg_rdata = loader_cfg.iaddr;
      REG_B:     cfg_rdata = ADDR_W'(loader_cfg.b);
      REG_C:     cfg_rdata = ADDR_W'(loader_cfg.c);
      REG_R:     cfg_rdata = ADDR_W'(loader_cfg.r);
      REG_OADDR: cfg_rdata = mac_cfg.oaddr;
      REG_K:     cfg_rdata = ADDR_W'(mac_cfg.k);
      REG_OCOLS: cfg_rdata = ADDR_W'(mac_cfg.cols);
      REG_OROWS: cfg_rdata = ADDR_W'(mac_cfg.rows);
      default:   cfg_rdata = '0;
    endcase
  end

  // Weight store: a memory without reset (distributed RAM on an FPGA); the
  // MAC unit only reads weights the host has written.
  always_ff @(posedge clk) begin
    if (c_we_in && int'(c_wa_in) < int'(NW)) weights[c_wa_in] <= coeff_in;
  end

  assign w_rdata = (int'(w_raddr) < int'(NW)) ? weights[w_raddr] : '0;

endmodule
