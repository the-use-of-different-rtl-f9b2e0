// tb_prebin - self-checking test of prebin.
// An 18 x 14 random frame, neither side a multiple of 4, is held in a model
// SRAM with one clock of read latency, so the zero padding of the last block
// column and row is exercised.  Every binned pixel is compared with the
// average of its 4 x 4 block computed here, pixels outside the frame counting
// as zero; the output order must be raster order; every frame pixel must be
// read exactly once, in order; and the pass must take the padded size
// (20 x 16) in clocks plus the pipeline.
module tb_prebin;
  import dm_pkg::*;
  localparam int W = 18, H = 14, BIN = 4, N = W * H;
  localparam int WB = (W + BIN - 1) / BIN, HB = (H + BIN - 1) / BIN;
  localparam int AW = $clog2(N);

  logic clk = 0, rst_n = 0, start = 0;
  logic mem_re, out_valid, busy, done;
  logic [AW-1:0] mem_raddr;
  pix_t mem_rdata, out_pix;
  coord_t out_row, out_col;
  int checks = 0, failures = 0;

  prebin #(.W(W), .H(H), .BIN(BIN)) dut (.*);

  always #5 clk = ~clk;

  pix_t img [N];
  int nread = 0, nout = 0, cycles = 0;
  always @(posedge clk)
    if (mem_re) begin
      checks++;
      if (int'(mem_raddr) != nread) begin
        failures++;
        $display("FAIL read %0d at address %0d", nread, mem_raddr);
      end
      mem_rdata <= img[int'(mem_raddr) % N];
      nread++;
    end

  bit counting = 0;
  always @(posedge clk) begin
    if (counting) cycles++;
    if (out_valid) begin
      automatic int s = 0;
      for (int y = 0; y < BIN; y++)
        for (int x = 0; x < BIN; x++)
          if (int'(out_row) * BIN + y < H && int'(out_col) * BIN + x < W)
            s += int'(img[(int'(out_row) * BIN + y) * W + int'(out_col) * BIN + x]);
      checks++;
      if (out_pix != pix_t'(s / (BIN * BIN)) || int'(out_row) != nout / WB ||
          int'(out_col) != nout % WB) begin
        failures++;
        $display("FAIL out %0d (%0d,%0d) got %0d exp %0d", nout, out_row, out_col, out_pix, s / 16);
      end
      nout++;
    end
  end

  initial begin
    for (int i = 0; i < N; i++) img[i] = pix_t'($urandom);
    img[0] = 16'hFFFF; img[1] = 16'hFFFF; img[W] = 16'hFFFF; img[W + 1] = 16'hFFFF;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1; counting = 1;
    @(negedge clk) start = 0;
    wait (done);
    @(posedge clk);
    @(negedge clk);
    counting = 0;
    checks++;
    if (nout != WB * HB) begin failures++; $display("FAIL %0d outputs", nout); end
    checks++;
    if (nread != N) begin failures++; $display("FAIL %0d reads", nread); end
    checks++;
    if (cycles < WB * BIN * HB * BIN || cycles > WB * BIN * HB * BIN + 5) begin
      failures++;
      $display("FAIL %0d clocks", cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
