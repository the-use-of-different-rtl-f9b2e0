// dm_size_run - one dm_top of a given frame size driven by its own
// dm_tb_harness, for testbenches that check several frame sizes side by
// side.  The harness does not report; the instantiating testbench reads
// harness.fin, harness.checks and harness.failures.
module dm_size_run #(
  parameter int unsigned W = 1002,
  parameter int unsigned H = 668,
  parameter int unsigned N_FIELD = 60,
  parameter bit CONT_RUN = 1'b1,
  parameter longint MAX_CYCLES = 20000000
);
  import dm_pkg::*;
  localparam int AW = $clog2(W * H), CW = $clog2(1024 + 1);

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

  dm_top #(.W(W), .H(H)) dut (.*);
  dm_tb_harness #(.W(W), .H(H), .N_FIELD(N_FIELD), .CONT_RUN(CONT_RUN),
                  .MAX_CYCLES(MAX_CYCLES), .REPORT(1'b0)) harness (.*);
endmodule
