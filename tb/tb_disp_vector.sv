// tb_disp_vector - self-checking test of disp_vector.
// Star tables for frames A and B are built with every case: a star moved by
// up to +/-MAX_DISP in each axis (vector kept), a jump beyond MAX_DISP
// (zero vector), and a star missing in A, in B or in both (zero vector).
// The vectors, the number of trusted vectors and the N_STARS-clock run time
// are checked over several random rounds.
module tb_disp_vector;
  import dm_pkg::*;
  localparam int MD = 1;

  logic clk = 0, rst_n = 0, start = 0;
  star_t stars_a [N_STARS], stars_b [N_STARS];
  disp_t disp [N_STARS];
  logic [$clog2(N_STARS+1)-1:0] matched;
  logic busy, done;
  int checks = 0, failures = 0;

  disp_vector #(.MAX_DISP(MD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 8; round++) begin
      disp_t exp [N_STARS];
      automatic int nexp = 0, cyc = 0;
      for (int i = 0; i < int'(N_STARS); i++) begin
        automatic int kind = $urandom % 6;
        automatic int ry = 10 + $urandom % 100, rx = 10 + $urandom % 100;
        automatic int dy = int'($urandom % 5) - 2, dx = int'($urandom % 5) - 2;
        stars_a[i] = '{1'b1, coord_t'(ry), coord_t'(rx), 16'd5000};
        stars_b[i] = '{1'b1, coord_t'(ry + dy), coord_t'(rx + dx), 16'd5000};
        if (kind == 0) stars_a[i].valid = 0;
        if (kind == 1) stars_b[i].valid = 0;
        if (kind == 2) begin stars_a[i].valid = 0; stars_b[i].valid = 0; end
        if (kind >= 3 && dy >= -MD && dy <= MD && dx >= -MD && dx <= MD) begin
          exp[i] = '{DISP_W'(dy), DISP_W'(dx)};
          nexp++;
        end else exp[i] = '0;
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != int'(N_STARS)) begin failures++; $display("FAIL %0d clocks", cyc); end
      for (int i = 0; i < int'(N_STARS); i++) begin
        checks++;
        if (disp[i] != exp[i]) begin
          failures++;
          $display("FAIL sub %0d got %p exp %p", i, disp[i], exp[i]);
        end
      end
      checks++;
      if (int'(matched) != nexp) begin failures++; $display("FAIL matched %0d exp %0d", matched, nexp); end
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
