// tb_star_add - self-checking test of star_add.
// Random star tables for a 64 x 48 raw frame (binning 4) include stars at the
// frame corners, so that windows must be clipped, and empty sub-frames.
// Every window, the number of valid windows and the N_STARS-clock run time
// are checked.
module tb_star_add;
  import dm_pkg::*;
  localparam int W = 64, H = 48, BIN = 4, HALF = 5;

  logic clk = 0, rst_n = 0, start = 0;
  star_t stars [N_STARS];
  star_win_t win [N_STARS];
  logic [$clog2(N_STARS+1)-1:0] n_win;
  logic busy, done;
  int checks = 0, failures = 0;

  star_add #(.W(W), .H(H), .BIN(BIN), .STAR_HALF(HALF)) dut (.*);

  always #5 clk = ~clk;

  function automatic int clip(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      automatic int nexp = 0, cyc = 0;
      for (int i = 0; i < int'(N_STARS); i++) begin
        stars[i] = '{($urandom % 4) != 0, coord_t'($urandom % (H / BIN)),
                     coord_t'($urandom % (W / BIN)), 16'd3000};
        if (i == 0) begin stars[i].row = 0; stars[i].col = 0; end
        if (i == 24) begin stars[i].row = coord_t'(H / BIN - 1); stars[i].col = coord_t'(W / BIN - 1); end
        if (stars[i].valid) nexp++;
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != int'(N_STARS)) begin failures++; $display("FAIL %0d clocks", cyc); end
      checks++;
      if (int'(n_win) != nexp) begin failures++; $display("FAIL n_win %0d exp %0d", n_win, nexp); end
      for (int i = 0; i < int'(N_STARS); i++) begin
        automatic int cy = int'(stars[i].row) * BIN + BIN / 2;
        automatic int cx = int'(stars[i].col) * BIN + BIN / 2;
        checks++;
        if (win[i].valid != stars[i].valid ||
            int'(win[i].r_lo) != clip(cy - HALF, 0, H - 1) || int'(win[i].r_hi) != clip(cy + HALF, 0, H - 1) ||
            int'(win[i].c_lo) != clip(cx - HALF, 0, W - 1) || int'(win[i].c_hi) != clip(cx + HALF, 0, W - 1)) begin
          failures++; $display("FAIL window %0d %p", i, win[i]);
        end
      end
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
