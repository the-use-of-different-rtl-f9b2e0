// dm_tb_harness - stimulus, external SRAM model and reference model for the
// end-to-end tests of dm_top (tb_dm_top and tb_dm_top_full).
//
// The harness builds three frames of a synthetic star field: a noisy
// background, point-like stars and a few large saturated stars, the whole
// field moving by (SHIFT_Y, SHIFT_X) raw pixels from one frame to the next.
// Each frame also holds a bright straight debris streak of its own, at a
// different place, so every difference has both signs.  Run 1 is one-shot:
// frames 0 and 1 are streamed in (with random gaps) and compared.  Run 2 is
// continuous: only frame 2 is streamed and compared with frame 1, whose
// results the design kept.  The two external SRAMs are modelled here (one
// write and one read port each, read data one clock later).  After each run
// the outputs are compared with a model of the whole chain computed here
// from the same frames: number of trusted displacement vectors, number of
// flagged pixels, the ROI list, and the decoded result image pixel by
// pixel.  The harness also counts how often each mechanism of the chain was
// exercised and counts a failure for one that never was (the ROI limit only
// when NEED_ROI_LIMIT is set).  Ends with the TB_RESULT line, or, with
// REPORT = 0, only sets 'fin' and leaves the report to the instantiating
// testbench.  CONT_RUN = 0 leaves out run 2.
module dm_tb_harness #(
  parameter int unsigned W         = 2048,
  parameter int unsigned H         = 2048,
  parameter int unsigned BIN       = 4,
  parameter int unsigned MAX_DISP  = 1,
  parameter dm_pkg::pix_t SAT_LEVEL = 16'hFF00,
  parameter dm_pkg::pix_t STAR_MIN  = 16'd2000,
  parameter int unsigned DIFF_THR  = 3000,
  parameter int unsigned MAX_ROI   = 1024,
  parameter int unsigned STAR_HALF = 8,
  parameter int unsigned N_FIELD   = 60,
  parameter int          SHIFT_Y   = 0,
  parameter int          SHIFT_X   = 4,
  parameter bit          NEED_ROI_LIMIT = 1'b0,
  parameter longint      MAX_CYCLES = 1000000,
  parameter bit          CONT_RUN   = 1'b1,   // also run the continuous mode
  parameter bit          REPORT     = 1'b1,   // print TB_RESULT and finish
  localparam int unsigned N   = W * H,
  localparam int unsigned AW  = $clog2(N),
  localparam int unsigned HB  = (H + BIN - 1) / BIN,
  localparam int unsigned WB  = (W + BIN - 1) / BIN,
  localparam int unsigned H2  = HB - 2,
  localparam int unsigned W2  = WB - 2,
  localparam int unsigned HT  = H2 / 3,
  localparam int unsigned WT  = W2 / 3,
  localparam int unsigned CW  = $clog2(MAX_ROI + 1)
) (
  output logic              clk,
  output logic              rst_n,
  output logic              start,
  output logic              continuous,
  output logic              pix_valid,
  output dm_pkg::pix_t      pix_data,
  input  logic              pix_ready,
  input  logic              sram_we    [2],
  input  logic [AW-1:0]     sram_waddr [2],
  input  dm_pkg::pix_t      sram_wdata [2],
  input  logic              sram_re    [2],
  input  logic [AW-1:0]     sram_raddr [2],
  output dm_pkg::pix_t      sram_rdata [2],
  input  logic              roi_valid,
  input  dm_pkg::coord_t    roi_tr,
  input  dm_pkg::coord_t    roi_tc,
  input  logic              out_valid,
  input  dm_pkg::rle_word_t out_word,
  input  logic [3:0]        phase,
  input  logic [CW-1:0]     roi_count,
  input  logic [31:0]       hit_count,
  input  logic [$clog2(dm_pkg::N_STARS+1)-1:0] matched,
  input  logic [31:0]       n_words,
  input  logic              busy,
  input  logic              done
);
  import dm_pkg::*;

  localparam int SUB_H = (HB + 4) / 5, SUB_W = (WB + 4) / 5;
  int checks = 0, failures = 0;
  bit fin = 1'b0;

  initial clk = 0;
  always #5 clk = ~clk;

  // ---------------- external SRAMs ----------------
  pix_t sram0 [N], sram1 [N];
  always_ff @(posedge clk) begin
    if (sram_we[0]) sram0[sram_waddr[0]] <= sram_wdata[0];
    if (sram_we[1]) sram1[sram_waddr[1]] <= sram_wdata[1];
    if (sram_re[0]) sram_rdata[0] <= sram0[sram_raddr[0]];
    if (sram_re[1]) sram_rdata[1] <= sram1[sram_raddr[1]];
  end

  // ---------------- scene ----------------
  pix_t fr [3][N];
  pix_t fa [N], fb [N];      // old and new frame of the run being modelled

  function automatic void put(input int f, input int y, input int x, input int v);
    if (y >= 0 && y < int'(H) && x >= 0 && x < int'(W)) begin
      automatic int s = int'(fr[f][y * W + x]) + v;
      fr[f][y * W + x] = pix_t'((s > 65535) ? 65535 : s);
    end
  endfunction

  task automatic make_scene();
    for (int f = 0; f < 3; f++)
      for (int i = 0; i < int'(N); i++) fr[f][i] = pix_t'(100 + $urandom % 200);
    // field stars: 3 x 3 blobs, moving with the field
    for (int s = 0; s < int'(N_FIELD); s++) begin
      automatic int y = 8 + $urandom % (H - 16), x = 8 + $urandom % (W - 16);
      automatic int v = 15000 + $urandom % 20000;
      for (int f = 0; f < 3; f++)
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            put(f, y + dy + f * SHIFT_Y, x + dx + f * SHIFT_X, (dy == 0 && dx == 0) ? v : v / 2);
    end
    // saturated stars: 8 x 8 blocks at full scale
    for (int s = 0; s < 3; s++) begin
      automatic int y = 8 + $urandom % (H - 24), x = 8 + $urandom % (W - 24);
      for (int f = 0; f < 3; f++)
        for (int dy = 0; dy < 8; dy++)
          for (int dx = 0; dx < 8; dx++)
            put(f, y + dy + f * SHIFT_Y, x + dx + f * SHIFT_X, 65535);
    end
    // debris streaks, one per frame at different places
    for (int k = 0; k < int'(W) / 2; k++) begin
      put(0, (3 * int'(H)) / 4 - k / 4, int'(W) / 4 + k, 30000);
      put(1, int'(H) / 4 + k / 3, int'(W) / 8 + k, 30000);
      put(2, int'(H) / 2 + k / 5, int'(W) / 3 + k / 2, 30000);
    end
  endtask

  task automatic select_pair(input int fo, input int fn);
    for (int i = 0; i < int'(N); i++) begin fa[i] = fr[fo][i]; fb[i] = fr[fn][i]; end
  endtask

  // ---------------- reference model ----------------
  int    ba [HB][WB], bb [HB][WB];
  int    sa [H2][W2], sb [H2][W2];
  star_t ta [N_STARS], tb [N_STARS];
  int    ddy [N_STARS], ddx [N_STARS];
  bit    hitmap [HT][WT], mask [HT][WT];
  int    m_matched, m_hits, m_pos, m_neg, m_flagged, m_sat, m_shifted, m_rois, m_win;
  int    t_matched, t_pos, t_neg, t_drop, t_sat, t_shifted, t_rois, t_win;
  int    roi_r [$], roi_c [$];
  pix_t  result [N];

  task automatic model();
    for (int i = 0; i < int'(N_STARS); i++) begin ta[i] = '0; tb[i] = '0; end
    m_sat = 0;
    for (int r = 0; r < int'(HB); r++)
      for (int c = 0; c < int'(WB); c++) begin
        automatic int s0 = 0, s1 = 0, idx = (r / SUB_H) * 5 + c / SUB_W;
        for (int y = 0; y < int'(BIN); y++)
          for (int x = 0; x < int'(BIN); x++)
            if (r * BIN + y < int'(H) && c * BIN + x < int'(W)) begin  // zero padding
              s0 += int'(fa[(r * BIN + y) * W + c * BIN + x]);
              s1 += int'(fb[(r * BIN + y) * W + c * BIN + x]);
            end
        ba[r][c] = s0 / (BIN * BIN);
        bb[r][c] = s1 / (BIN * BIN);
        if (ba[r][c] >= SAT_LEVEL) m_sat++;
        if (ba[r][c] < SAT_LEVEL && ba[r][c] >= STAR_MIN && (!ta[idx].valid || ba[r][c] > ta[idx].val))
          ta[idx] = '{1'b1, coord_t'(r), coord_t'(c), pix_t'(ba[r][c])};
        if (bb[r][c] < SAT_LEVEL && bb[r][c] >= STAR_MIN && (!tb[idx].valid || bb[r][c] > tb[idx].val))
          tb[idx] = '{1'b1, coord_t'(r), coord_t'(c), pix_t'(bb[r][c])};
      end
    m_matched = 0; m_shifted = 0;
    for (int i = 0; i < int'(N_STARS); i++) begin
      automatic int dy = int'(tb[i].row) - int'(ta[i].row), dx = int'(tb[i].col) - int'(ta[i].col);
      ddy[i] = 0; ddx[i] = 0;
      if (ta[i].valid && tb[i].valid && dy <= int'(MAX_DISP) && dy >= -int'(MAX_DISP) &&
          dx <= int'(MAX_DISP) && dx >= -int'(MAX_DISP)) begin
        ddy[i] = dy; ddx[i] = dx; m_matched++;
        if (dy != 0 || dx != 0) m_shifted++;
      end
    end
    for (int r = 0; r < int'(H2); r++)
      for (int c = 0; c < int'(W2); c++) begin
        sa[r][c] = 0; sb[r][c] = 0;
        for (int y = 0; y < 3; y++)
          for (int x = 0; x < 3; x++) begin
            sa[r][c] += ba[r + y][c + x];
            sb[r][c] += bb[r + y][c + x];
          end
      end
    for (int t = 0; t < int'(HT); t++)
      for (int u = 0; u < int'(WT); u++) begin hitmap[t][u] = 0; mask[t][u] = 0; end
    m_hits = 0; m_pos = 0; m_neg = 0;
    for (int r = int'(MAX_DISP); r < int'(H2 - MAX_DISP); r++)
      for (int c = int'(MAX_DISP); c < int'(W2 - MAX_DISP); c++) begin
        automatic int s = ((r + 1) / SUB_H) * 5 + (c + 1) / SUB_W;
        automatic int d = sb[r + ddy[s]][c + ddx[s]] - sa[r][c];
        if ((d > int'(DIFF_THR) || d < -int'(DIFF_THR)) && r / 3 < int'(HT) && c / 3 < int'(WT)) begin
          hitmap[r / 3][c / 3] = 1;
          m_hits++;
          if (d > 0) m_pos++; else m_neg++;
        end
      end
    m_flagged = 0; m_rois = 0;
    roi_r.delete(); roi_c.delete();
    for (int t = 0; t < int'(HT); t++)
      for (int u = 0; u < int'(WT); u++)
        if (hitmap[t][u]) begin
          m_flagged++;
          if (m_rois < int'(MAX_ROI)) begin
            mask[t][u] = 1; m_rois++; roi_r.push_back(t); roi_c.push_back(u);
          end
        end
    m_win = 0;
    for (int i = 0; i < int'(N_STARS); i++) if (tb[i].valid) m_win++;
    for (int y = 0; y < int'(H); y++)
      for (int x = 0; x < int'(W); x++) begin
        automatic int tr = (y / BIN) / 3, tc = (x / BIN) / 3;
        automatic bit keep = (tr < int'(HT) && tc < int'(WT)) ? mask[tr][tc] : 1'b0;
        for (int i = 0; i < int'(N_STARS); i++)
          if (tb[i].valid) begin
            automatic int cy = int'(tb[i].row) * BIN + BIN / 2, cx = int'(tb[i].col) * BIN + BIN / 2;
            if (y >= cy - int'(STAR_HALF) && y <= cy + int'(STAR_HALF) &&
                x >= cx - int'(STAR_HALF) && x <= cx + int'(STAR_HALF)) keep = 1;
          end
        result[y * W + x] = keep ? fb[y * W + x] : '0;
      end
  endtask

  // ---------------- output monitors ----------------
  int n_roi_seen, n_dec, n_dec_bad, n_long_runs;
  always @(posedge clk) begin
    if (roi_valid) begin
      checks++;
      if (n_roi_seen >= roi_r.size() || int'(roi_tr) != roi_r[n_roi_seen] ||
          int'(roi_tc) != roi_c[n_roi_seen]) begin
        failures++;
        $display("FAIL ROI %0d at (%0d,%0d)", n_roi_seen, roi_tr, roi_tc);
      end
      n_roi_seen++;
    end
    if (out_valid) begin
      if (out_word.run == 16'hFFFF) n_long_runs++;
      for (int k = 0; k <= int'(out_word.run); k++) begin
        automatic pix_t v = (k == int'(out_word.run)) ? out_word.val : '0;
        if (n_dec >= int'(N) || v != result[n_dec]) n_dec_bad++;
        n_dec++;
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_stall;
  bit storing;
  always @(posedge clk) if (storing && pix_valid && !pix_ready) n_stall++;

  longint cycles;
  always @(posedge clk) cycles++;

  // runs in which the design skipped storing frame A (continuous mode)
  int  n_cont;
  bit  saw_store_a;
  always @(posedge clk) begin
    if (start) saw_store_a <= 1'b0;
    else if (phase == 4'd1) saw_store_a <= 1'b1;
    if (done && !saw_store_a) n_cont++;
  end

  task automatic count(input string what, input int n);
    $display("  %-40s %0d", what, n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
  endtask

  task automatic stream(input int f);
    storing = 1;
    for (int i = 0; i < int'(N); i++) begin
      pix_valid = ($urandom % 16 != 0);
      pix_data  = fr[f][i];
      @(posedge clk);
      while (!(pix_valid && pix_ready)) begin
        #1 pix_valid = 1'b1;
        @(posedge clk);
      end
      #1;
    end
    pix_valid = 0;
    storing = 0;
  endtask

  task automatic run(input bit cont, input int fo, input int fn);
    longint t0, t_store, t_end;
    select_pair(fo, fn);
    model();
    n_roi_seen = 0; n_dec = 0; n_dec_bad = 0;
    @(negedge clk) start = 1; continuous = cont;
    t0 = cycles;
    @(negedge clk) start = 0;
    if (!cont) stream(fo);
    stream(fn);
    t_store = cycles;
    wait (done);
    t_end = cycles;
    repeat (3) @(negedge clk);
    $display("dm_top %0d x %0d %s (frames %0d, %0d): storing %0d clocks, processing %0d clocks",
             W, H, cont ? "continuous" : "one-shot", fo, fn, t_store - t0, t_end - t_store);
    checks++;
    if (int'(matched) != m_matched) begin failures++; $display("FAIL matched %0d exp %0d", matched, m_matched); end
    checks++;
    if (int'(hit_count) != m_hits) begin failures++; $display("FAIL hits %0d exp %0d", hit_count, m_hits); end
    checks++;
    if (int'(roi_count) != m_rois || n_roi_seen != m_rois) begin
      failures++; $display("FAIL ROIs %0d/%0d exp %0d", roi_count, n_roi_seen, m_rois);
    end
    checks++;
    if (n_dec != int'(N) || n_dec_bad != 0) begin
      failures++; $display("FAIL result image: %0d pixels, %0d wrong", n_dec, n_dec_bad);
    end
    checks++;
    if (cont && (t_store - t0) > longint'(N) * 5) begin
      failures++; $display("FAIL continuous run stored more than one frame");
    end
    t_matched += m_matched; t_pos += m_pos; t_neg += m_neg; t_drop += m_flagged - m_rois;
    t_sat += m_sat; t_shifted += m_shifted; t_rois += m_rois; t_win += m_win;
  endtask

  initial begin
    rst_n = 0; start = 0; continuous = 0; pix_valid = 0; pix_data = '0;
    n_long_runs = 0; n_stall = 0; storing = 0; n_cont = 0;
    t_matched = 0; t_pos = 0; t_neg = 0; t_drop = 0; t_sat = 0; t_shifted = 0; t_rois = 0; t_win = 0;
    make_scene();
    repeat (4) @(negedge clk);
    rst_n = 1;
    run(1'b0, 0, 1);
    if (CONT_RUN) run(1'b1, 1, 2);
    $display("mechanisms exercised:");
    count("store back-pressure (clocks)", n_stall);
    count("saturated binned pixels rejected", t_sat);
    count("trusted displacement vectors", t_matched);
    count("non-zero displacement vectors applied", t_shifted);
    count("rejected / missing vectors", 2 * int'(N_STARS) - t_matched);
    count("pixels over +threshold", t_pos);
    count("pixels under -threshold", t_neg);
    count("regions of interest", t_rois);
    count("reference star windows", t_win);
    if (CONT_RUN) count("continuous-mode runs (frame A not stored)", n_cont);
    if (NEED_ROI_LIMIT) count("tiles dropped at the ROI limit", t_drop);
    $display("  compressed words %0d in the last run, maximal runs %0d", n_words, n_long_runs);
    fin = 1'b1;
    if (REPORT) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // watchdog; it stands down once the test has finished, so that a harness
  // running beside a slower one does not fail afterwards
  initial begin
    wait (cycles > MAX_CYCLES || fin);
    if (!fin) begin
      failures++;
      $display("watchdog expired in phase %0d", phase);
      fin = 1'b1;
      if (REPORT) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  // unused status inputs are only displayed
  wire unused_ok = busy;
endmodule
