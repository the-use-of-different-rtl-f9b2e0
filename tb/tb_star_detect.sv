// tb_star_detect - self-checking test of star_detect.
// Two random 20 x 15 binned frames are streamed in raster order with random
// gaps; each has saturated pixels brighter than every star, background
// pixels below STAR_MIN and one sub-frame with no star at all.  The table is
// compared with the brightest non-saturated pixel per 4 x 3 sub-frame found
// here (earliest pixel wins a tie).  'clear' between the frames must empty
// the table.
module tb_star_detect;
  import dm_pkg::*;
  localparam int HB = 20, WB = 15;
  localparam int SH = (HB + 4) / 5, SW = (WB + 4) / 5;
  localparam pix_t SAT = 16'd60000, SMIN = 16'd1000;

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  coord_t in_row = '0, in_col = '0;
  pix_t in_pix = '0;
  star_t stars [N_STARS];
  int checks = 0, failures = 0;

  star_detect #(.HB(HB), .WB(WB), .SAT_LEVEL(SAT), .STAR_MIN(SMIN)) dut (.*);

  always #5 clk = ~clk;

  pix_t img [HB][WB];

  task automatic one_frame(input int empty_sub);
    star_t exp [N_STARS];
    for (int i = 0; i < int'(N_STARS); i++) exp[i] = '0;
    for (int r = 0; r < HB; r++)
      for (int c = 0; c < WB; c++) begin
        automatic int u = $urandom % 10;
        automatic int idx = (r / SH) * 5 + c / SW;
        img[r][c] = (u == 0) ? pix_t'(int'(SAT) + int'($urandom % 5000)) :
                    (u < 4)  ? pix_t'(int'($urandom % int'(SMIN))) :
                               pix_t'(int'(SMIN) + int'($urandom % int'(SAT - SMIN)));
        if (idx == empty_sub) img[r][c] = pix_t'(int'($urandom % int'(SMIN)));
      end
    for (int r = 0; r < HB; r++)
      for (int c = 0; c < WB; c++) begin
        automatic int idx = (r / SH) * 5 + c / SW;
        if (img[r][c] < SAT && img[r][c] >= SMIN &&
            (!exp[idx].valid || img[r][c] > exp[idx].val))
          exp[idx] = '{1'b1, coord_t'(r), coord_t'(c), img[r][c]};
      end
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    checks++;
    for (int i = 0; i < int'(N_STARS); i++)
      if (stars[i].valid) begin failures++; $display("FAIL clear"); break; end
    for (int r = 0; r < HB; r++)
      for (int c = 0; c < WB; c++) begin
        while ($urandom % 4 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_row = coord_t'(r); in_col = coord_t'(c); in_pix = img[r][c];
        @(negedge clk);
      end
    in_valid = 0;
    @(negedge clk);
    for (int i = 0; i < int'(N_STARS); i++) begin
      checks++;
      if (stars[i] != exp[i]) begin
        failures++;
        $display("FAIL sub %0d got %p exp %p", i, stars[i], exp[i]);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    one_frame(7);
    one_frame(24);
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
