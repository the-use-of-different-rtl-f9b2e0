// tb_frame_diff - self-checking test of frame_diff.
// Two random second-binned frames (18 x 21, from 20 x 23 binned frames) sit in
// model RAMs with one clock of read latency; frame B is frame A moved by a
// random vector per sub-frame, plus noise and a few bright and dark spikes.
// The tile hit map written by the block is compared with the map computed
// here from the same rule (B(r+dy, c+dx) - A(r, c) beyond +/-DIFF_THR,
// border of MAX_DISP, sub-frame of the window centre), together with the
// number of flagged pixels and the scan time.
module tb_frame_diff;
  import dm_pkg::*;
  localparam int HB = 20, WB = 23, H2 = HB - 2, W2 = WB - 2;
  localparam int HT = H2 / 3, WT = W2 / 3, MD = 1, THR = 3000;
  localparam int SH = (HB + 4) / 5, SWD = (WB + 4) / 5;
  localparam int AW = $clog2(H2 * W2), TAW = $clog2(HT), SW = PIX_W + 4;

  logic clk = 0, rst_n = 0, start = 0;
  disp_t disp [N_STARS];
  logic a_re, b_re, tile_we, busy, done;
  logic [AW-1:0] a_addr, b_addr;
  logic [SW-1:0] a_data, b_data;
  logic [TAW-1:0] tile_waddr;
  logic [WT-1:0] tile_wdata;
  logic [31:0] hit_count;
  int checks = 0, failures = 0;

  frame_diff #(.HB(HB), .WB(WB), .MAX_DISP(MD), .DIFF_THR(THR)) dut (.*);

  always #5 clk = ~clk;

  logic [SW-1:0] ma [H2 * W2], mb [H2 * W2];
  always_ff @(posedge clk) begin
    if (a_re) a_data <= ma[a_addr];
    if (b_re) b_data <= mb[b_addr];
  end
  logic [WT-1:0] tiles [HT];
  int twrites;
  always @(posedge clk) if (tile_we) begin tiles[tile_waddr] <= tile_wdata; twrites <= twrites + 1; end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      automatic logic [WT-1:0] exp [HT];
      automatic int nhit = 0, cyc = 0;
      for (int i = 0; i < int'(N_STARS); i++)
        disp[i] = '{DISP_W'(int'($urandom % 3) - 1), DISP_W'(int'($urandom % 3) - 1)};
      for (int i = 0; i < H2 * W2; i++) ma[i] = SW'(20000 + $urandom % 20000);
      for (int r = 0; r < H2; r++)
        for (int c = 0; c < W2; c++) begin
          automatic int s = ((r + 1) / SH) * 5 + (c + 1) / SWD;
          automatic int rr = r + int'(disp[s].dy), cc = c + int'(disp[s].dx);
          if (rr >= 0 && rr < H2 && cc >= 0 && cc < W2)
            mb[rr * W2 + cc] = ma[r * W2 + c] + SW'($urandom % 1000) - SW'(500);
        end
      for (int k = 0; k < 6; k++) begin
        automatic int p = $urandom % (H2 * W2);
        mb[p] = (k % 2 == 0) ? mb[p] + SW'(4000 + $urandom % 4000) : mb[p] - SW'(4000 + $urandom % 4000);
      end
      for (int t = 0; t < HT; t++) exp[t] = '0;
      for (int r = MD; r < H2 - MD; r++)
        for (int c = MD; c < W2 - MD; c++) begin
          automatic int s = ((r + 1) / SH) * 5 + (c + 1) / SWD;
          automatic int d = int'(mb[(r + int'(disp[s].dy)) * W2 + c + int'(disp[s].dx)]) - int'(ma[r * W2 + c]);
          if ((d > THR || d < -THR) && r / 3 < HT && c / 3 < WT) begin
            exp[r / 3][c / 3] = 1'b1;
            nhit++;
          end
        end
      twrites = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      while (!done) begin @(negedge clk); cyc++; end
      @(negedge clk);
      checks++;
      if (cyc < (H2 - 2 * MD) * (W2 - 2 * MD) || cyc > (H2 - 2 * MD) * (W2 - 2 * MD) + 4) begin
        failures++; $display("FAIL %0d clocks", cyc);
      end
      checks++;
      if (twrites != HT) begin failures++; $display("FAIL %0d tile rows written", twrites); end
      for (int t = 0; t < HT; t++) begin
        checks++;
        if (tiles[t] != exp[t]) begin
          failures++; $display("FAIL tile row %0d got %b exp %b", t, tiles[t], exp[t]);
        end
      end
      checks++;
      if (int'(hit_count) != nhit) begin failures++; $display("FAIL hits %0d exp %0d", hit_count, nhit); end
      if (round == 0) $display("round 0: %0d flagged pixels", nhit);
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
