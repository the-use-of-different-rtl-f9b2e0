// tb_dm_top - end-to-end test of dm_top on reduced 256 x 256 frames: a
// one-shot run over two frames, then a continuous-mode run with a third.
// dm_tb_harness supplies the scene, the external SRAMs and the reference
// model.  MAX_ROI is lowered to 8 so that the debris streaks flag more tiles
// than the limit allows and the limit is exercised.
module tb_dm_top;
  import dm_pkg::*;
  localparam int W = 256, H = 256, MAXR = 8;
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

  dm_top #(.W(W), .H(H), .MAX_ROI(MAXR)) dut (.*);
  dm_tb_harness #(.W(W), .H(H), .MAX_ROI(MAXR), .N_FIELD(40), .NEED_ROI_LIMIT(1'b1),
                  .MAX_CYCLES(3000000)) harness (.*);
endmodule
