// tb_mac_unit: self-checking test of the MAC unit.
//
// The testbench stands in for the Circle Buffer and the Weight Registers: it
// streams each K x K window column by column (as the buffer does) from a
// random image, with random gaps, and answers weight reads from its own
// row-major weight table. The next stage is busy at random. Every result is
// compared with a reference convolution computed here (sum of products,
// arithmetic shift by FRAC_BITS, saturation to 24 bits), and its address
// with OADDR + output index. Jobs:
//   1. N=6, K=3 with small random values, random gaps and busy.
//   2. N=5, K=2 with large values so that results saturate both ways.
//   3. N=7, K=4 with no gaps and no busy: the job must take exactly
//      M*M*(K*K+1) cycles from start to done.
module tb_mac_unit;
  import conv2d_pkg::*;

  localparam int KM = 5;
  localparam int WAW = $clog2(KM * KM);

  int checks = 0;
  int failures = 0;

  logic           clk = 1'b0, rst_n = 1'b0;
  logic           start = 1'b0, busy, done;
  mac_cfg_t       cfg;
  logic [WAW-1:0] w_raddr;
  word_t          w_rdata;
  dim_t           cb_k, cb_cols;
  logic           cb_valid, cb_ready;
  word_t          cb_data;
  logic           o_we, o_busy, conv_done;
  addr_t          o_addr;
  word_t          o_data;

  always #5 clk = ~clk;

  mac_unit #(.KMAX_P(KM)) dut (.*);

  word_t img [16][16];
  word_t wts [KM * KM];
  int    n_img, k_img, m_img;
  int    sidx;            // index of the next word in the window stream
  bit    gaps = 1'b0, rand_busy = 1'b0;
  int    busy_stalls, sat_hi, sat_lo;

  assign w_rdata = wts[w_raddr];

  // window stream: output (x,y), column n, row m
  always_comb begin
    int per, o, e, x, y;
    per = k_img * k_img;
    o = sidx / per;
    e = sidx % per;
    x = o / m_img;
    y = o % m_img;
    cb_data = img[(x + e % k_img) % 16][(y + e / k_img) % 16];
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sidx <= 0; cb_valid <= 1'b0; o_busy <= 1'b0;
    end else begin
      if (cb_valid && cb_ready) sidx <= sidx + 1;
      cb_valid <= !gaps || ($urandom_range(0, 3) != 0);
      o_busy   <= rand_busy && ($urandom_range(0, 1) == 0);
      if (o_busy && busy && !cb_ready) busy_stalls++;
    end
  end

  function automatic word_t ref_out(int x, int y);
    longint s;
    s = 0;
    for (int m = 0; m < k_img; m++)
      for (int n = 0; n < k_img; n++)
        s += longint'(img[x + m][y + n]) * longint'(wts[m * k_img + n]);
    s = s >>> FRAC_BITS;
    if (s > 64'sd8388607)  return word_t'(24'h7FFFFF);
    if (s < -64'sd8388608) return word_t'(24'h800000);
    return word_t'(s);
  endfunction

  task automatic run_job(int n, int k, int range_img, int range_w, bit check_timing);
    int outs, cyc;
    n_img = n; k_img = k; m_img = n - k + 1;
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++)
        img[r][c] = word_t'($urandom_range(0, 2 * range_img) - range_img);
    for (int i = 0; i < KM * KM; i++)
      wts[i] = word_t'($urandom_range(0, 2 * range_w) - range_w);
    cfg = '{oaddr: addr_t'(3000), k: dim_t'(k), cols: dim_t'(m_img), rows: dim_t'(m_img)};
    sidx = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    outs = 0; cyc = 1;
    checks++;
    if (cb_k != dim_t'(k) || cb_cols != dim_t'(m_img)) begin
      failures++;
      $display("buffer configuration not passed on");
    end
    while (!done) begin
      @(posedge clk);
      if (o_we) begin
        automatic word_t e = ref_out(outs / m_img, outs % m_img);
        checks++;
        if (o_data !== e || o_addr !== addr_t'(3000 + outs) || !conv_done) begin
          failures++;
          $display("n=%0d k=%0d output %0d: got %0d @%0d, expected %0d @%0d",
                   n, k, outs, o_data, o_addr, e, 3000 + outs);
        end
        if (e == word_t'(24'h7FFFFF)) sat_hi++;
        if (e == word_t'(24'h800000)) sat_lo++;
        outs++;
      end
      #1;
      if (!done) cyc++;
    end
    checks++;
    if (outs != m_img * m_img) begin
      failures++;
      $display("n=%0d k=%0d: %0d outputs, expected %0d", n, k, outs, m_img * m_img);
    end
    if (check_timing) begin
      checks++;
      if (cyc != m_img * m_img * (k * k + 1)) begin
        failures++;
        $display("n=%0d k=%0d: %0d cycles, expected %0d", n, k, cyc, m_img * m_img * (k * k + 1));
      end
    end
  endtask

  initial begin
    busy_stalls = 0; sat_hi = 0; sat_lo = 0;
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    gaps = 1'b1; rand_busy = 1'b1;
    run_job(6, 3, 4096, 4096, 1'b0);
    run_job(5, 2, 8388607, 8388607, 1'b0);
    gaps = 1'b0; rand_busy = 1'b0;
    @(posedge clk);
    run_job(7, 4, 100000, 50000, 1'b1);
    checks++;
    if (busy_stalls == 0 || sat_hi == 0 || sat_lo == 0) begin
      failures++;
      $display("not exercised: busy stalls %0d, saturations high %0d low %0d",
               busy_stalls, sat_hi, sat_lo);
    end
    $display("busy stalls %0d, saturations high %0d low %0d", busy_stalls, sat_hi, sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
