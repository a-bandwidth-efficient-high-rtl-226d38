// tb_loader: self-checking test of the Loader.
//
// A behavioural memory (one-cycle read latency) holds mem[a] = 7*a+3. The
// test runs three jobs:
//   1. B=4, C=6, R=3 (a 6x6 image, 3x3 kernel) with a slow, random bus grant
//      and a buffer that reports full at random; every pushed word is checked
//      against the band/column/row order, and the word count must be B*C*R.
//   2. B=4, C=5, R=2 started right after, same checks.
//   3. B=3, C=7, R=4 with an immediate grant and a buffer that never fills:
//      the pushes must come one per cycle and, with the grant answered one
//      cycle after the request, `done` must be seen exactly
//      B*C*R+4 cycles after `start`.
// It also checks that hreq is dropped at the end and that reads only happen
// while the bus is granted.
module tb_loader;
  import conv2d_pkg::*;

  int checks = 0;
  int failures = 0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start = 1'b0, busy, done, hreq, hlda, mem_rd, fifo_wr, fifo_full;
  loader_cfg_t cfg;
  addr_t       mem_addr;
  word_t       mem_rdata, fifo_data;
  bit          rand_full = 1'b0, slow_grant = 1'b0;
  int          pushes, full_cycles, grant_wait;

  always #5 clk = ~clk;

  loader dut (.*);

  // memory model: data on the cycle after the read strobe
  // (the data bus carries junk in cycles without a read)
  always @(posedge clk) mem_rdata <= mem_rd ? word_t'(7 * mem_addr + 3) : word_t'($urandom);

  // bus grant: immediate or after a random delay, held while hreq is high
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) hlda <= 1'b0;
    else if (!hreq) hlda <= 1'b0;
    else if (!hlda) hlda <= !slow_grant || ($urandom_range(0, 3) == 0);
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) fifo_full <= 1'b0;
    else        fifo_full <= rand_full && ($urandom_range(0, 2) == 0);
  end

  always @(posedge clk) begin
    if (rst_n && hreq && !hlda) grant_wait++;
    if (rst_n && fifo_full && busy) full_cycles++;
    if (rst_n && mem_rd && !hlda) begin
      failures++;
      $display("read without bus grant");
    end
  end

  task automatic run_job(addr_t ia, int b, int c, int r, bit check_timing);
    int n, t0, t_first, t_last;
    cfg = '{iaddr: ia, b: dim_t'(b), c: dim_t'(c), r: dim_t'(r)};
    n = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    t0 = 0; t_first = -1; t_last = -1;
    while (!done) begin
      @(posedge clk);
      t0++;
      if (fifo_wr) begin
        automatic int bb = n / (c * r);
        automatic int jj = (n % (c * r)) / r;
        automatic int kk = n % r;
        automatic word_t e = word_t'(7 * (ia + addr_t'((bb + kk) * c + jj)) + 3);
        checks++;
        if (fifo_full || fifo_data !== e) begin
          failures++;
          $display("job b=%0d c=%0d r=%0d word %0d: got %0d (full=%0b), expected %0d",
                   b, c, r, n, fifo_data, fifo_full, e);
        end
        if (t_first < 0) t_first = t0;
        t_last = t0;
        n++;
      end
      #1;
    end
    pushes += n;
    checks++;
    if (n != b * c * r) begin
      failures++;
      $display("job b=%0d c=%0d r=%0d: %0d words, expected %0d", b, c, r, n, b * c * r);
    end
    @(posedge clk); #1;
    checks++;
    if (hreq) begin
      failures++;
      $display("hreq still high after done");
    end
    if (check_timing) begin
      checks++;
      if (t_last - t_first != b * c * r - 1 || t0 != b * c * r + 4) begin
        failures++;
        $display("timing: pushes over %0d cycles (expected %0d), done after %0d (expected %0d)",
                 t_last - t_first + 1, b * c * r, t0, b * c * r + 4);
      end
    end
  endtask

  initial begin
    pushes = 0; full_cycles = 0; grant_wait = 0;
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    rand_full = 1'b1; slow_grant = 1'b1;
    run_job(addr_t'(100), 4, 6, 3, 1'b0);
    run_job(addr_t'(5000), 4, 5, 2, 1'b0);
    rand_full = 1'b0; slow_grant = 1'b0;
    repeat (2) @(posedge clk);
    run_job(addr_t'(0), 3, 7, 4, 1'b1);
    checks++;
    if (full_cycles == 0 || grant_wait == 0) begin
      failures++;
      $display("full (%0d cycles) or grant wait (%0d cycles) never happened", full_cycles, grant_wait);
    end
    $display("words pushed %0d, full cycles %0d, grant wait cycles %0d", pushes, full_cycles, grant_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
