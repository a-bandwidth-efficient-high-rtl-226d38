// tb_circle_buffer: self-checking test of the Circle Buffer.
//
// Two buffers run side by side, one with a single clock (DUAL_CLOCK = 0) and
// one with unrelated write and read clocks (DUAL_CLOCK = 1). Each is fed an
// image band by band, column by column, exactly as the Loader does, with
// random write gaps, and drained by a reader with random stalls that acts like
// the MAC unit. The reader checks every word of every K x K window against
// the image, in column-major window order. Two configurations run back to
// back: N = 6, K = 3 (the buffer sized for K = 3, so it fills up) and then
// N = 5, K = 2. The test also checks that the number of words written is
// (N-K+1)*N*K per image, and that the buffer reported full at least once.
module tb_circle_buffer;
  import conv2d_pkg::*;

  localparam int KM = 3;
  localparam int NPH = 2;
  localparam int PH_N [NPH] = '{6, 5};
  localparam int PH_K [NPH] = '{3, 2};

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0, clk2 = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  always #7 clk2 = ~clk2;

  function automatic word_t pix(int ph, int r, int c);
    return word_t'(ph * 1000 + r * 16 + c + 1);
  endfunction

  int done_inst [2];
  int full_seen [2];

  for (genvar g = 0; g < 2; g++) begin : g_inst
    logic  rclk;
    logic  wr_en, wr_full, rd_valid, rd_ready, rd_last;
    word_t wr_data, rd_data;
    dim_t  cfg_k, cfg_cols;
    int    wph, widx, rph, ridx, writes;

    assign rclk = (g == 1) ? clk2 : clk;

    circle_buffer #(.KMAX_P(KM), .DUAL_CLOCK(g == 1)) dut (
      .wclk(clk), .wrst_n(rst_n), .wr_en, .wr_data, .wr_full,
      .rclk, .rrst_n(rst_n), .cfg_k, .cfg_cols,
      .rd_valid, .rd_ready, .rd_data, .rd_last
    );

    // Producer: loader order, random gaps.
    always_comb begin
      int n, k, b, j, kk;
      n = PH_N[(wph < NPH) ? wph : 0];
      k = PH_K[(wph < NPH) ? wph : 0];
      b = widx / (n * k);
      j = (widx % (n * k)) / k;
      kk = widx % k;
      wr_data = pix(wph, b + kk, j);
    end

    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        wph <= 0; widx <= 0; wr_en <= 1'b0; writes <= 0;
      end else begin
        if (wr_en && !wr_full) begin
          writes <= writes + 1;
          if (widx + 1 == (PH_N[wph] - PH_K[wph] + 1) * PH_N[wph] * PH_K[wph]) begin
            widx <= 0;
            wph  <= wph + 1;
          end else begin
            widx <= widx + 1;
          end
        end
        if (wr_full) full_seen[g] <= full_seen[g] + 1;
        wr_en <= (wph < NPH) && ($urandom_range(0, 3) != 0)
                 && !(wr_en && !wr_full && wph == NPH - 1 &&
                      widx + 1 == (PH_N[wph] - PH_K[wph] + 1) * PH_N[wph] * PH_K[wph]);
      end
    end

    // Consumer: MAC order, random stalls, checks each word.
    always_comb begin
      int ph;
      ph = (rph < NPH) ? rph : NPH - 1;
      cfg_k    = dim_t'(PH_K[ph]);
      cfg_cols = dim_t'(PH_N[ph] - PH_K[ph] + 1);
    end

    always @(posedge rclk or negedge rst_n) begin
      if (!rst_n) begin
        rph <= 0; ridx <= 0; rd_ready <= 1'b0;
      end else begin
        rd_ready <= ($urandom_range(0, 4) != 0);
        if (rd_valid && rd_ready && rph < NPH) begin
          automatic int n  = PH_N[rph];
          automatic int k  = PH_K[rph];
          automatic int m  = n - k + 1;
          automatic int b  = ridx / (m * k * k);
          automatic int y  = (ridx % (m * k * k)) / (k * k);
          automatic int e  = ridx % (k * k);
          automatic word_t exp_d = pix(rph, b + e % k, y + e / k);
          checks++;
          if (rd_data !== exp_d || rd_last !== (e == k * k - 1)) begin
            failures++;
            $display("inst %0d ph %0d word %0d: got %0d last %0b, expected %0d",
                     g, rph, ridx, rd_data, rd_last, exp_d);
          end
          if (ridx + 1 == m * m * k * k) begin
            ridx <= 0;
            rph  <= rph + 1;
          end else begin
            ridx <= ridx + 1;
          end
        end
        if (rph == NPH) done_inst[g] <= 1;
      end
    end
  end

  initial begin
    done_inst = '{0, 0};
    full_seen = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_inst[0] == 1 && done_inst[1] == 1);
    repeat (20) @(posedge clk);
    for (int g = 0; g < 2; g++) begin
      int expw;
      expw = 0;
      for (int p = 0; p < NPH; p++) expw += (PH_N[p] - PH_K[p] + 1) * PH_N[p] * PH_K[p];
      checks++;
      if ((g == 0 ? g_inst[0].writes : g_inst[1].writes) != expw) begin
        failures++;
        $display("inst %0d: %0d words written, expected %0d", g,
                 g == 0 ? g_inst[0].writes : g_inst[1].writes, expw);
      end
      checks++;
      if (full_seen[g] == 0) begin
        failures++;
        $display("inst %0d: buffer never reported full", g);
      end
    end
    $display("full cycles: single-clock %0d, dual-clock %0d", full_seen[0], full_seen[1]);
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
