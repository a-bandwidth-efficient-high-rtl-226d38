// tb_conv2d_unit: end-to-end test of the 2D convolution unit.
//
// The unit runs at its default parameters (kernels up to 11 x 11, two clock
// domains). The Loader side runs from a 10 ns clock, the MAC side from an
// unrelated 8 ns clock. The testbench plays the host (register and weight writes, bus grant after a
// random delay), the external image memory (one-cycle read latency) and the
// next stage (busy at random). Four jobs:
//   A. N=6,  K=3  (the 6x6 / 3x3 example): 16 outputs.
//   B. N=12, K=11 (largest kernel, the buffer holds a single window).
//   C. N=9,  K=2, whose Loader is started as soon as B's Loader is done,
//      while the MAC unit is still busy with B.
//   D. N=10, K=4 with an immediate grant and no busy next stage: the MAC run
//      must take between M*M*(K*K+1) and that plus K*K+24 MAC clock cycles
//      (start-up, including the pointer synchronizers).
// Every output value and address is compared with a reference convolution
// computed here, and the number of memory reads of each job must be
// (N-K+1)*N*K, the reuse count of the Circle Buffer. The test counts how
// often each mechanism happened (bus grant wait, buffer full, MAC waiting on
// an empty buffer, next stage busy, band change in the buffer, Loader restart
// while the MAC is busy) and fails if one never did.
module tb_conv2d_unit;
  import conv2d_pkg::*;

  localparam int WAW = $clog2(KMAX * KMAX);
  localparam int MEMW = 4096;

  int checks = 0;
  int failures = 0;

  logic              clk = 1'b0, mac_clk = 1'b0, rst_n = 1'b0;
  logic              cfg_we = 1'b0, c_we_in = 1'b0;
  logic [3:0]        cfg_addr = '0;
  logic [ADDR_W-1:0] cfg_wdata = '0, cfg_rdata;
  word_t             coeff_in = '0;
  logic [WAW-1:0]    c_wa_in = '0;
  logic              loader_start = 1'b0, loader_busy, loader_done;
  logic              mac_start = 1'b0, mac_busy, mac_done, conv_done, cb_full, cb_empty;
  logic              hreq, hlda, mem_rd, o_we, o_busy;
  addr_t             mem_addr, o_addr;
  word_t             mem_rdata, o_data;

  always #5 clk = ~clk;
  always #4 mac_clk = ~mac_clk;

  conv2d_unit dut (.*);

  word_t mem [MEMW];
  word_t outmem [MEMW];
  word_t wts [KMAX * KMAX];
  bit    slow_grant = 1'b1, rand_busy = 1'b1;
  int    reads, writes, cfg_rdata_cols;
  int    out_idx, out_cols;   // output counter of the running MAC job
  int    n_grant_wait, n_full, n_empty, n_busy, n_band, n_restart;

  always @(posedge clk) mem_rdata <= mem_rd ? mem[mem_addr % MEMW] : word_t'($urandom);

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hlda <= 1'b0;
    end else begin
      if (!hreq)      hlda <= 1'b0;
      else if (!hlda) hlda <= !slow_grant || ($urandom_range(0, 3) == 0);
    end
  end

  always @(posedge mac_clk or negedge rst_n) begin
    if (!rst_n) o_busy <= 1'b0;
    else        o_busy <= rand_busy && ($urandom_range(0, 2) == 0);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (mem_rd) reads++;
      if (hreq && !hlda) n_grant_wait++;
      if (cb_full && loader_busy) n_full++;
    end
  end

  always @(posedge mac_clk) begin
    if (rst_n) begin
      if (o_we) begin
        outmem[o_addr % MEMW] = o_data;
        writes++;
      end
      if (cb_empty && mac_busy && !o_we) n_empty++;
      if (o_busy && mac_busy) n_busy++;
      if (o_we && out_idx > 0 && out_idx % out_cols == 0) n_band++;
      if (o_we) out_idx++;
    end
  end

  task automatic wr_reg(reg_addr_e a, logic [ADDR_W-1:0] v);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = a; cfg_wdata = v;
    @(negedge clk);
    cfg_we = 1'b0;
    checks++;
    if (cfg_rdata !== v) begin
      failures++;
      $display("register %0d reads %0h, expected %0h", a, cfg_rdata, v);
    end
  endtask

  task automatic setup_loader(int ia, int n, int k);
    for (int i = 0; i < n * n; i++) mem[ia + i] = word_t'($urandom_range(0, 32767) - 16384);
    wr_reg(REG_IADDR, ADDR_W'(ia));
    wr_reg(REG_B, ADDR_W'(n - k + 1));
    wr_reg(REG_C, ADDR_W'(n));
    wr_reg(REG_R, ADDR_W'(k));
  endtask

  task automatic setup_mac(int oa, int n, int k);
    wr_reg(REG_OADDR, ADDR_W'(oa));
    wr_reg(REG_K, ADDR_W'(k));
    wr_reg(REG_OCOLS, ADDR_W'(n - k + 1));
    cfg_rdata_cols = n - k + 1;
    wr_reg(REG_OROWS, ADDR_W'(n - k + 1));
    for (int i = 0; i < k * k; i++) begin
      wts[i] = word_t'($urandom_range(0, 16383) - 8192);
      @(negedge clk);
      c_we_in = 1'b1; c_wa_in = WAW'(i); coeff_in = wts[i];
    end
    @(negedge clk);
    c_we_in = 1'b0;
  endtask

  task automatic pulse_loader();
    @(negedge clk) loader_start = 1'b1;
    @(negedge clk) loader_start = 1'b0;
  endtask

  task automatic pulse_mac();
    out_idx = 0;
    out_cols = cfg_rdata_cols;
    @(negedge mac_clk) mac_start = 1'b1;
    @(negedge mac_clk) mac_start = 1'b0;
  endtask

  function automatic word_t ref_out(int ia, int n, int k, int x, int y);
    longint s;
    s = 0;
    for (int m = 0; m < k; m++)
      for (int c = 0; c < k; c++)
        s += longint'(mem[ia + (x + m) * n + y + c]) * longint'(wts[m * k + c]);
    s = s >>> FRAC_BITS;
    if (s > 64'sd8388607)  return word_t'(24'h7FFFFF);
    if (s < -64'sd8388608) return word_t'(24'h800000);
    return word_t'(s);
  endfunction

  task automatic check_job(string name, int ia, int oa, int n, int k, int nreads);
    int m, bad;
    m = n - k + 1;
    bad = 0;
    for (int x = 0; x < m; x++)
      for (int y = 0; y < m; y++) begin
        checks++;
        if (outmem[oa + x * m + y] !== ref_out(ia, n, k, x, y)) begin
          failures++;
          if (bad++ < 5)
            $display("job %s O(%0d,%0d) = %0d, expected %0d", name, x, y,
                     outmem[oa + x * m + y], ref_out(ia, n, k, x, y));
        end
      end
    checks++;
    if (nreads != m * n * k) begin
      failures++;
      $display("job %s: %0d memory reads, expected %0d", name, nreads, m * n * k);
    end
    $display("job %s: N=%0d K=%0d, %0d outputs, %0d reads (%0d without reuse)",
             name, n, k, m * m, nreads, m * m * k * k);
  endtask

  initial begin
    int r0, cyc;
    reads = 0; writes = 0;
    n_grant_wait = 0; n_full = 0; n_empty = 0; n_busy = 0; n_band = 0; n_restart = 0;
    for (int i = 0; i < MEMW; i++) begin mem[i] = '0; outmem[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    // job A
    setup_loader(0, 6, 3);
    setup_mac(2000, 6, 3);
    r0 = reads;
    pulse_mac();
    repeat (5) @(posedge clk);
    pulse_loader();
    wait (mac_done);
    check_job("A", 0, 2000, 6, 3, reads - r0);

    // job B, then C's Loader while B's MAC still runs
    setup_loader(100, 12, 11);
    setup_mac(2100, 12, 11);
    r0 = reads;
    pulse_loader();
    pulse_mac();
    wait (loader_done);
    @(posedge clk);
    setup_loader(300, 9, 2);
    if (mac_busy) n_restart++;
    pulse_loader();
    wait (mac_done);
    check_job("B", 100, 2100, 12, 11, 2 * 12 * 11);
    checks++;
    setup_mac(2200, 9, 2);
    pulse_mac();
    wait (mac_done);
    wait (loader_done);
    if (reads - r0 != 2 * 12 * 11 + 8 * 9 * 2) begin
      failures++;
      $display("jobs B+C: %0d reads, expected %0d", reads - r0, 2 * 12 * 11 + 8 * 9 * 2);
    end
    check_job("C", 300, 2200, 9, 2, 8 * 9 * 2);

    // job D: timing
    slow_grant = 1'b0; rand_busy = 1'b0;
    setup_loader(500, 10, 4);
    setup_mac(2400, 10, 4);
    r0 = reads;
    pulse_loader();
    pulse_mac();
    cyc = 0;
    while (!mac_done) begin @(posedge mac_clk); #1; if (!mac_done) cyc++; end
    wait (loader_done);
    check_job("D", 500, 2400, 10, 4, reads - r0);
    checks++;
    if (cyc < 49 * 17 || cyc > 49 * 17 + 16 + 24) begin
      failures++;
      $display("job D: MAC took %0d cycles, expected %0d to %0d", cyc, 49 * 17, 49 * 17 + 40);
    end
    $display("job D: MAC took %0d cycles for %0d outputs (%0d MAC cycles)", cyc, 49, 49 * 16);

    checks++;
    if (writes != 16 + 4 + 64 + 49) begin
      failures++;
      $display("%0d results written, expected %0d", writes, 16 + 4 + 64 + 49);
    end
    $display("events: grant wait %0d, buffer full %0d, buffer empty %0d, next stage busy %0d, band changes %0d, loader restarts during MAC %0d",
             n_grant_wait, n_full, n_empty, n_busy, n_band, n_restart);
    checks++;
    if (n_grant_wait == 0 || n_full == 0 || n_empty == 0 || n_busy == 0 || n_band == 0 || n_restart == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
