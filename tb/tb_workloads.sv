// tb_workloads: runs the evaluated convolution workloads on the unit at its
// default parameters and checks every output.
//
// Each job is a list of independent 2D convolutions of an N x N image with a
// K x K kernel (one per filter and input channel; summing channels is left to
// the next stage). Jobs:
//   table3  N=28,  K=5, 20 filters, one channel
//   fig16   N=256 with K = 3, 5, 7, 9, 11, and N=255 with K=11
//   table4  N=224, K=3, 16 filters x 3 channels
// For every convolution the testbench fills the image with random words,
// writes the registers and the kernel, starts Loader and MAC, compares every
// result with a reference computed here, counts the memory reads, which must
// be (N-K+1)*N*K, and reports the bandwidth reduction ratio
// 1 - N/((N-K+1)*K) and the cycle count of the MAC runs. The grant is
// immediate and the next stage never busy, so the MAC run of each
// convolution must take (N-K+1)^2*(K*K+1) cycles plus at most K*K+24 cycles
// of start-up and 16 cycles per band. Both clock inputs get the same clock
// but the unit keeps its default pointer synchronizers. When K = KMAX the
// buffer holds only one window, so the first window of a band cannot be
// fetched ahead: the MAC unit waits for the Loader at each band change, for
// about 14 cycles including the synchronizer latency.
module tb_workloads;
  import conv2d_pkg::*;

  localparam int WAW = $clog2(KMAX * KMAX);
  localparam int MEMW = 1 << 16;
  localparam int NJOB = 8;
  localparam string JNAME [NJOB] = '{"table3", "fig16", "fig16", "fig16", "fig16", "fig16", "fig16", "table4"};
  localparam int JN [NJOB] = '{28, 256, 256, 256, 256, 256, 255, 224};
  localparam int JK [NJOB] = '{5, 3, 5, 7, 9, 11, 11, 3};
  localparam int JCONV [NJOB] = '{20, 1, 1, 1, 1, 1, 1, 48};

  int checks = 0;
  int failures = 0;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              cfg_we = 1'b0, c_we_in = 1'b0;
  logic [3:0]        cfg_addr = '0;
  logic [ADDR_W-1:0] cfg_wdata = '0, cfg_rdata;
  word_t             coeff_in = '0;
  logic [WAW-1:0]    c_wa_in = '0;
  logic              loader_start = 1'b0, loader_busy, loader_done;
  logic              mac_start = 1'b0, mac_busy, mac_done, conv_done, cb_full, cb_empty;
  logic              hreq, hlda, mem_rd, o_we;
  logic              o_busy = 1'b0;
  addr_t             mem_addr, o_addr;
  word_t             mem_rdata, o_data;

  logic              mac_clk;
  always #5 clk = ~clk;
  assign mac_clk = clk;   // both domains from one clock

  conv2d_unit dut (.*);

  word_t mem [MEMW];
  word_t wts [KMAX * KMAX];
  int    cur_n, cur_k, cur_m, out_idx, reads, bad;

  always @(posedge clk) mem_rdata <= mem_rd ? mem[mem_addr % MEMW] : '0;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) hlda <= 1'b0; else hlda <= hreq;

  function automatic word_t ref_out(int x, int y);
    longint s;
    s = 0;
    for (int m = 0; m < cur_k; m++)
      for (int c = 0; c < cur_k; c++)
        s += longint'(mem[(x + m) * cur_n + y + c]) * longint'(wts[m * cur_k + c]);
    s = s >>> FRAC_BITS;
    if (s > 64'sd8388607)  return word_t'(24'h7FFFFF);
    if (s < -64'sd8388608) return word_t'(24'h800000);
    return word_t'(s);
  endfunction

  // results are checked as they are written
  always @(posedge clk) begin
    if (rst_n && mem_rd) reads++;
    if (rst_n && o_we) begin
      automatic word_t e = ref_out(out_idx / cur_m, out_idx % cur_m);
      checks++;
      if (o_data !== e || o_addr !== addr_t'(out_idx)) begin
        failures++;
        if (bad++ < 5)
          $display("N=%0d K=%0d output %0d: got %0d @%0d, expected %0d",
                   cur_n, cur_k, out_idx, o_data, o_addr, e);
      end
      out_idx++;
    end
  end

  task automatic wr_reg(reg_addr_e a, int v);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = a; cfg_wdata = ADDR_W'(v);
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic run_conv(int n, int k, output longint cyc);
    cur_n = n; cur_k = k; cur_m = n - k + 1; out_idx = 0; reads = 0;
    for (int i = 0; i < n * n; i++) mem[i] = word_t'($urandom_range(0, 65535) - 32768);
    for (int i = 0; i < k * k; i++) wts[i] = word_t'($urandom_range(0, 16383) - 8192);
    wr_reg(REG_IADDR, 0);
    wr_reg(REG_B, cur_m);
    wr_reg(REG_C, n);
    wr_reg(REG_R, k);
    wr_reg(REG_OADDR, 0);
    wr_reg(REG_K, k);
    wr_reg(REG_OCOLS, cur_m);
    wr_reg(REG_OROWS, cur_m);
    for (int i = 0; i < k * k; i++) begin
      @(negedge clk);
      c_we_in = 1'b1; c_wa_in = WAW'(i); coeff_in = wts[i];
    end
    @(negedge clk);
    c_we_in = 1'b0;
    loader_start = 1'b1; mac_start = 1'b1;
    @(negedge clk);
    loader_start = 1'b0; mac_start = 1'b0;
    cyc = 0;
    while (!mac_done) begin @(posedge clk); #1; if (!mac_done) cyc++; end
    while (!loader_done) @(posedge clk);
    checks++;
    if (out_idx != cur_m * cur_m || reads != cur_m * n * k) begin
      failures++;
      $display("N=%0d K=%0d: %0d outputs (expected %0d), %0d reads (expected %0d)",
               n, k, out_idx, cur_m * cur_m, reads, cur_m * n * k);
    end
    checks++;
    if (cyc < longint'(cur_m * cur_m * (k * k + 1)) ||
        cyc > longint'(cur_m * cur_m * (k * k + 1) + 16 * cur_m + k * k + 24)) begin
      failures++;
      $display("N=%0d K=%0d: MAC run took %0d cycles, expected %0d plus start-up",
               n, k, cyc, cur_m * cur_m * (k * k + 1));
    end
  endtask

  initial begin
    longint cyc, total;
    real    r;
    for (int i = 0; i < MEMW; i++) mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    for (int j = 0; j < NJOB; j++) begin
      int m;
      total = 0;
      for (int c = 0; c < JCONV[j]; c++) begin
        run_conv(JN[j], JK[j], cyc);
        total += cyc;
      end
      m = JN[j] - JK[j] + 1;
      r = 1.0 - real'(JN[j]) / real'(m * JK[j]);
      $display("%s: N=%0d K=%0d x%0d: %0d MACs, %0d MAC-run cycles, %0d reads per convolution (%0d without reuse), reduction %0.1f%%",
               JNAME[j], JN[j], JK[j], JCONV[j], longint'(JCONV[j]) * m * m * JK[j] * JK[j], total,
               m * JN[j] * JK[j], m * m * JK[j] * JK[j], 100.0 * r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
