// tb_conv_regfile: self-checking test of the control and weight registers.
//
// Checks that every control register resets to zero, that each control register is
// written through the configuration port, appears in the right field of the
// Loader or MAC configuration and reads back on cfg_rdata, that an unmapped
// address reads zero and changes nothing, and that every weight register can
// be written and read back while writes past the last weight are ignored.
module tb_conv_regfile;
  import conv2d_pkg::*;

  localparam int KM = 3;
  localparam int NW = KM * KM;
  localparam int WAW = $clog2(NW);

  int checks = 0;
  int failures = 0;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              cfg_we = 1'b0, c_we_in = 1'b0;
  logic [3:0]        cfg_addr = '0;
  logic [ADDR_W-1:0] cfg_wdata = '0, cfg_rdata;
  word_t             coeff_in = '0, w_rdata;
  logic [WAW-1:0]    c_wa_in = '0, w_raddr = '0;
  loader_cfg_t       loader_cfg;
  mac_cfg_t          mac_cfg;
  logic [ADDR_W-1:0] val [8];
  word_t             wv [NW];

  always #5 clk = ~clk;

  conv_regfile #(.KMAX_P(KM)) dut (.*);

  task automatic check(string what, logic [ADDR_W-1:0] got, logic [ADDR_W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0h, expected %0h", what, got, exp);
    end
  endtask

  function automatic logic [ADDR_W-1:0] field(int a);
    case (a)
      0: return loader_cfg.iaddr;
      1: return ADDR_W'(loader_cfg.b);
      2: return ADDR_W'(loader_cfg.c);
      3: return ADDR_W'(loader_cfg.r);
      4: return mac_cfg.oaddr;
      5: return ADDR_W'(mac_cfg.k);
      6: return ADDR_W'(mac_cfg.cols);
      default: return ADDR_W'(mac_cfg.rows);
    endcase
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    for (int a = 0; a < 8; a++) check("reset value", field(a), '0);
    rst_n = 1'b1;
    for (int a = 0; a < 8; a++) begin
      val[a] = (a == 0 || a == 4) ? $urandom : ADDR_W'($urandom_range(1, 65535));
      @(negedge clk);
      cfg_we = 1'b1; cfg_addr = 4'(a); cfg_wdata = val[a];
    end
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = 4'd12; cfg_wdata = '1;   // unmapped
    @(negedge clk);
    cfg_we = 1'b0;
    for (int a = 0; a < 8; a++) begin
      check("config field", field(a), val[a]);
      cfg_addr = 4'(a); #1;
      check("read back", cfg_rdata, val[a]);
    end
    cfg_addr = 4'd12; #1;
    check("unmapped read", cfg_rdata, '0);
    for (int i = 0; i < NW; i++) begin
      wv[i] = word_t'($urandom);
      @(negedge clk);
      c_we_in = 1'b1; c_wa_in = WAW'(i); coeff_in = wv[i];
    end
    @(negedge clk);
    c_wa_in = WAW'(NW); coeff_in = '1;                 // past the last weight
    @(negedge clk);
    c_we_in = 1'b0;
    for (int i = 0; i < NW; i++) begin
      w_raddr = WAW'(i); #1;
      check("weight", ADDR_W'(w_rdata), ADDR_W'(wv[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
