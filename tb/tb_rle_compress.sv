// tb_rle_compress - self-checking test of rle_compress.
// A random 40 x 32 raw frame (binning 4, so a 2 x 2 ROI mask of tiles that are
// 12 raw pixels square) sits in a model SRAM; the mask RAM and three star
// windows are random.  The word stream is decoded here and must give back
// the frame with every pixel outside the ROIs and star windows set to zero,
// W*H pixels in all.  The run must take W*H + H clocks plus the pipeline.
module tb_rle_compress;
  import dm_pkg::*;
  localparam int W = 40, H = 32, BIN = 4, N = W * H;
  localparam int HT = ((H + BIN - 1) / BIN - 2) / 3, WT = ((W + BIN - 1) / BIN - 2) / 3;
  localparam int TAW = (HT > 1) ? $clog2(HT) : 1, AW = $clog2(N);

  logic clk = 0, rst_n = 0, start = 0;
  star_win_t win [N_STARS];
  logic mask_re, mem_re, out_valid, busy, done;
  logic [TAW-1:0] mask_raddr;
  logic [WT-1:0] mask_rdata;
  logic [AW-1:0] mem_raddr;
  pix_t mem_rdata;
  rle_word_t out_word;
  logic [31:0] n_words;
  int checks = 0, failures = 0;

  rle_compress #(.W(W), .H(H), .BIN(BIN)) dut (.*);

  always #5 clk = ~clk;

  pix_t img [N];
  logic [WT-1:0] mask [HT];
  always_ff @(posedge clk) begin
    if (mem_re) mem_rdata <= img[mem_raddr];
    if (mask_re) mask_rdata <= mask[mask_raddr];
  end

  pix_t dec [$];
  int nw;
  always @(posedge clk) if (out_valid) begin
    for (int k = 0; k < int'(out_word.run); k++) dec.push_back('0);
    dec.push_back(out_word.val);
    nw++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      automatic int cyc = 0, nkeep = 0;
      for (int i = 0; i < N; i++) img[i] = ($urandom % 5 == 0) ? '0 : pix_t'(1 + $urandom % 65535);
      for (int t = 0; t < HT; t++) mask[t] = WT'($urandom);
      for (int k = 0; k < int'(N_STARS); k++) begin
        automatic int r = $urandom % H, c = $urandom % W;
        win[k] = '0;
        if (k < 3) win[k] = '{1'b1, coord_t'(r), coord_t'(r + 2 < H ? r + 2 : H - 1),
                              coord_t'(c), coord_t'(c + 3 < W ? c + 3 : W - 1)};
      end
      dec.delete();
      nw = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      while (!done) begin @(negedge clk); cyc++; end
      @(negedge clk);
      checks++;
      if (dec.size() != N) begin failures++; $display("FAIL decoded %0d pixels", dec.size()); end
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          automatic int tr = (y / BIN) / 3, tc = (x / BIN) / 3;
          automatic bit keep = (tr < HT && tc < WT && mask[tr][tc]);
          automatic pix_t e;
          for (int k = 0; k < 3; k++)
            if (y >= int'(win[k].r_lo) && y <= int'(win[k].r_hi) &&
                x >= int'(win[k].c_lo) && x <= int'(win[k].c_hi)) keep = 1;
          e = keep ? img[y * W + x] : '0;
          if (keep) nkeep++;
          checks++;
          if (y * W + x >= dec.size() || dec[y * W + x] != e) begin
            failures++;
            if (failures < 10) $display("FAIL pixel (%0d,%0d) exp %0d", y, x, e);
          end
        end
      checks++;
      if (cyc < N + H || cyc > N + H + 4) begin failures++; $display("FAIL %0d clocks", cyc); end
      checks++;
      if (int'(n_words) != nw) begin failures++; $display("FAIL n_words"); end
      $display("round %0d: %0d pixels kept, %0d words", round, nkeep, nw);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
