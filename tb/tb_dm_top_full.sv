// tb_dm_top_full - dm_top at its default size, 2048 x 2048 frames, with the
// default thresholds and ROI limit: one complete one-shot run over two
// frames, then one continuous-mode run that adds a third frame.
// dm_tb_harness supplies the scene, the external SRAMs and the reference
// model.
module tb_dm_top_full;
  import dm_pkg::*;
  localparam int W = 2048, H = 2048, MAXR = 1024;
  localparam int AW = $clog2(W * H), CW = $clog2(MAXR + 1);

  logic clk, rst_n, start, continuous, pix_valid, pix_ready;
  pix_t pix_data;
  logic sram_we [2], sram_re [2];
  logic [AW-1:0] sram_waddr [2], sram_raddr [2];
  pix_t sram_wdata [2], sram_rdata [2];
  logic roi_valid, out_valid, busy, done;
  coord_t roi_tr, roi_tc;
  rle_word_t out_word;
  logic [3:0] phase;
  logic [CW-1:0] roi_count;
  logic [31:0] hit_count, n_words;
  logic [$clog2(N_STARS+1)-1:0] matched;

  dm_top dut (.*);
  dm_tb_harness #(.N_FIELD(400), .MAX_CYCLES(120000000)) harness (.*);
endmodule
