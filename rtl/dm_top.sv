// dm_top - on-board streak detection for space-debris images with the
// Differences Method, in one-shot and continuous mode.
//
// Two consecutive camera frames A and B are compared after registering them
// on the star background, so that fixed stars cancel and moving objects
// (debris streaks) remain.  A controller runs the steps one after another:
//
//   STORE_A/B  frame_store   both raw frames into two external SRAMs
//   BIN        prebin x2     4 x 4 average binning of both frames at once,
//              star_detect x2  brightest non-saturated star per sub-frame
//                            (5 x 5 grid), taken from the binning output
//   DISP       disp_vector   one displacement vector per sub-frame
//   BIN2       box_bin3 x2   3 x 3 sliding-window sums of both binned frames
//   DIFF       frame_diff    displacement-compensated B - A, threshold,
//                            3 x 3 tile hit map
//   ROI        roi_select    tile hit map -> ROI list and ROI mask
//   STARS      star_add      raw windows around the reference stars of B
//   COMPRESS   rle_compress  raw frame B kept inside ROIs and star windows,
//                            zero elsewhere, run-length coded
//
// As in the published FPGA design every execution unit that handles a frame
// is duplicated, so both frames go through binning and second binning in the
// same pass, and the binned images stay in on-chip RAM from the binning
// onward.
//
// Two modes, chosen by 'continuous' when 'start' is given:
//   one-shot    two new frames are stored (A into slot 0, B into slot 1) and
//               both are processed;
//   continuous  one new frame is stored into the slot of the older frame of
//               the previous run and compared with the newest frame of that
//               run, whose binned and second-binned images and star table
//               are still on chip; only the new frame is binned.  Without a
//               previous run a continuous start behaves as one-shot.
// 'nslot' names the slot of the newer frame (B); the other slot holds A.
//
// The external SRAMs are outside this module: each slot has a write port
// (we/waddr/wdata) and a read port (re/raddr, data one clock later).  Camera
// pixels enter on a valid/ready stream in raster order, frame A first in
// one-shot mode.  The ROI list leaves on roi_*, the compressed image on out_*.
// 'start' begins a run; 'done' pulses when the last compressed word is out.
module dm_top #(
  parameter int unsigned W         = 2048,
  parameter int unsigned H         = 2048,
  parameter int unsigned BIN       = 4,
  parameter int unsigned WR_CYCLES = 4,
  parameter int unsigned MAX_DISP  = 1,
  parameter dm_pkg::pix_t SAT_LEVEL = 16'hFF00,
  parameter dm_pkg::pix_t STAR_MIN  = 16'd2000,
  parameter int unsigned DIFF_THR  = 3000,
  parameter int unsigned MAX_ROI   = 1024,
  parameter int unsigned STAR_HALF = 8,
  localparam int unsigned N   = W * H,
  localparam int unsigned AW  = $clog2(N),
  localparam int unsigned HB  = (H + BIN - 1) / BIN,
  localparam int unsigned WB  = (W + BIN - 1) / BIN,
  localparam int unsigned H2  = HB - 2,
  localparam int unsigned W2  = WB - 2,
  localparam int unsigned HT  = H2 / 3,
  localparam int unsigned WT  = W2 / 3,
  localparam int unsigned TAW = (HT > 1) ? $clog2(HT) : 1,
  localparam int unsigned CW  = $clog2(MAX_ROI + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              continuous,
  // camera stream
  input  logic              pix_valid,
  input  dm_pkg::pix_t      pix_data,
  output logic              pix_ready,
  // external SRAMs, slot 0 = frame A, slot 1 = frame B
  output logic              sram_we    [2],
  output logic [AW-1:0]     sram_waddr [2],
  output dm_pkg::pix_t      sram_wdata [2],
  output logic              sram_re    [2],
  output logic [AW-1:0]     sram_raddr [2],
  input  dm_pkg::pix_t      sram_rdata [2],
  // results
  output logic              roi_valid,
  output dm_pkg::coord_t    roi_tr,
  output dm_pkg::coord_t    roi_tc,
  output logic              out_valid,
  output dm_pkg::rle_word_t out_word,
  // status
  output logic [3:0]        phase,
  output logic [CW-1:0]     roi_count,
  output logic [31:0]       hit_count,
  output logic [$clog2(dm_pkg::N_STARS+1)-1:0] matched,
  output logic [31:0]       n_words,
  output logic              busy,
  output logic              done
);
  import dm_pkg::*;

  typedef enum logic [3:0] {
    P_IDLE, P_STORE_A, P_STORE_B, P_BIN, P_DISP, P_BIN2, P_DIFF, P_ROI,
    P_STARS, P_COMP
  } phase_t;
  phase_t ph;
  logic   kick;                // one-clock start pulse for the new phase
  logic   nslot;               // slot of the newer frame (B)
  logic   pair;                // this run processes both slots
  logic   have_prev;           // a previous run left usable on-chip results
  logic   act [2];             // slot is processed in this run

  assign act[0] = pair || (nslot == 1'b0);
  assign act[1] = pair || (nslot == 1'b1);

  assign phase = ph;
  assign busy  = (ph != P_IDLE);

  // ---------------- storing ----------------
  logic          st_we, st_done;
  logic [AW-1:0] st_waddr;
  pix_t          st_wdata;
  logic          st_slot;

  frame_store #(.W(W), .H(H), .WR_CYCLES(WR_CYCLES)) u_store (
    .clk, .rst_n,
    .start     (kick && (ph == P_STORE_A || ph == P_STORE_B)),
    .pix_valid, .pix_data, .pix_ready,
    .mem_we    (st_we), .mem_waddr (st_waddr), .mem_wdata (st_wdata),
    .busy      (), .done (st_done)
  );
  assign st_slot = (ph == P_STORE_B) ? nslot : !nslot;

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      sram_we[s]    = st_we && (st_slot == 1'(s));
      sram_waddr[s] = st_waddr;
      sram_wdata[s] = st_wdata;
    end
  end

  // ---------------- binning + star detection (x2) ----------------
  logic          pb_re    [2];
  logic [AW-1:0] pb_raddr [2];
  logic          pb_valid [2];
  coord_t        pb_row   [2], pb_col [2];
  pix_t          pb_pix   [2];
  logic          pb_done  [2];
  star_t         stars    [2][N_STARS];

  localparam int unsigned BAW = $clog2(HB * WB);
  logic [BAW-1:0] bin_waddr [2];
  logic           b2_rre    [2];
  logic [BAW-1:0] b2_raddr  [2];
  pix_t           bin_rdata [2];

  localparam int unsigned SAW = $clog2(H2 * W2);
  logic           s_we    [2];
  logic [SAW-1:0] s_waddr [2];
  logic [PIX_W+3:0] s_wdata [2];
  logic           b2_done [2];
  logic           df_re   [2];
  logic [SAW-1:0] df_raddr [2];
  logic [PIX_W+3:0] s_rdata [2];

  for (genvar g = 0; g < 2; g++) begin : g_frame
    prebin #(.W(W), .H(H), .BIN(BIN)) u_prebin (
      .clk, .rst_n,
      .start     (kick && ph == P_BIN && act[g]),
      .mem_re    (pb_re[g]), .mem_raddr (pb_raddr[g]), .mem_rdata (sram_rdata[g]),
      .out_valid (pb_valid[g]), .out_row (pb_row[g]), .out_col (pb_col[g]),
      .out_pix   (pb_pix[g]),
      .busy      (), .done (pb_done[g])
    );

    star_detect #(.HB(HB), .WB(WB), .SAT_LEVEL(SAT_LEVEL), .STAR_MIN(STAR_MIN)) u_stars (
      .clk, .rst_n,
      .clear    (kick && ph == P_BIN && act[g]),
      .in_valid (pb_valid[g]), .in_row (pb_row[g]), .in_col (pb_col[g]),
      .in_pix   (pb_pix[g]),
      .stars    (stars[g])
    );

    // binned pixels arrive in raster order: the write address is a counter
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                    bin_waddr[g] <= '0;
      else if (kick && ph == P_BIN && act[g]) bin_waddr[g] <= '0;
      else if (pb_valid[g])          bin_waddr[g] <= bin_waddr[g] + 1'b1;
    end

    dp_ram #(.DW(PIX_W), .DEPTH(HB * WB)) u_binned (
      .clk,
      .we    (pb_valid[g]), .waddr (bin_waddr[g]), .wdata (pb_pix[g]),
      .re    (b2_rre[g]),   .raddr (b2_raddr[g]),  .rdata (bin_rdata[g])
    );

    box_bin3 #(.HB(HB), .WB(WB)) u_bin2 (
      .clk, .rst_n,
      .start   (kick && ph == P_BIN2 && act[g]),
      .rd_re   (b2_rre[g]), .rd_addr (b2_raddr[g]), .rd_data (bin_rdata[g]),
      .wr_we   (s_we[g]),   .wr_addr (s_waddr[g]),  .wr_data (s_wdata[g]),
      .busy    (), .done (b2_done[g])
    );

    dp_ram #(.DW(PIX_W + 4), .DEPTH(H2 * W2)) u_binned2 (
      .clk,
      .we    (s_we[g]),  .waddr (s_waddr[g]),  .wdata (s_wdata[g]),
      .re    (df_re[g]), .raddr (df_raddr[g]), .rdata (s_rdata[g])
    );
  end

  // ---------------- displacement vectors ----------------
  disp_t disp [N_STARS];
  logic  dv_done;

  disp_vector #(.MAX_DISP(MAX_DISP)) u_disp (
    .clk, .rst_n,
    .start   (kick && ph == P_DISP),
    .stars_a (stars[!nslot]), .stars_b (stars[nslot]),
    .disp, .matched, .busy (), .done (dv_done)
  );

  // ---------------- difference ----------------
  logic           t_we;
  logic [TAW-1:0] t_waddr;
  logic [WT-1:0]  t_wdata;
  logic           df_done;

  logic           da_re, db_re;
  logic [SAW-1:0] da_addr, db_addr;

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      df_re[s]    = (nslot == 1'(s)) ? db_re   : da_re;
      df_raddr[s] = (nslot == 1'(s)) ? db_addr : da_addr;
    end
  end

  frame_diff #(.HB(HB), .WB(WB), .MAX_DISP(MAX_DISP), .DIFF_THR(DIFF_THR)) u_diff (
    .clk, .rst_n,
    .start  (kick && ph == P_DIFF),
    .disp,
    .a_re   (da_re), .a_addr (da_addr), .a_data (s_rdata[!nslot]),
    .b_re   (db_re), .b_addr (db_addr), .b_data (s_rdata[nslot]),
    .tile_we (t_we), .tile_waddr (t_waddr), .tile_wdata (t_wdata),
    .hit_count, .busy (), .done (df_done)
  );

  logic           t_re;
  logic [TAW-1:0] t_raddr;
  logic [WT-1:0]  t_rdata;

  dp_ram #(.DW(WT), .DEPTH(HT)) u_tiles (
    .clk,
    .we (t_we), .waddr (t_waddr), .wdata (t_wdata),
    .re (t_re), .raddr (t_raddr), .rdata (t_rdata)
  );

  // ---------------- ROI selection ----------------
  logic           m_we, m_re;
  logic [TAW-1:0] m_waddr, m_raddr;
  logic [WT-1:0]  m_wdata, m_rdata;
  logic           roi_done;

  roi_select #(.HT(HT), .WT(WT), .MAX_ROI(MAX_ROI)) u_roi (
    .clk, .rst_n,
    .start      (kick && ph == P_ROI),
    .tile_re    (t_re), .tile_raddr (t_raddr), .tile_rdata (t_rdata),
    .mask_we    (m_we), .mask_waddr (m_waddr), .mask_wdata (m_wdata),
    .roi_valid, .roi_tr, .roi_tc, .roi_count,
    .busy       (), .done (roi_done)
  );

  dp_ram #(.DW(WT), .DEPTH(HT)) u_mask (
    .clk,
    .we (m_we), .waddr (m_waddr), .wdata (m_wdata),
    .re (m_re), .raddr (m_raddr), .rdata (m_rdata)
  );

  // ---------------- adding stars ----------------
  star_win_t win [N_STARS];
  logic      sa_done;

  star_add #(.W(W), .H(H), .BIN(BIN), .STAR_HALF(STAR_HALF)) u_star_add (
    .clk, .rst_n,
    .start (kick && ph == P_STARS),
    .stars (stars[nslot]),
    .win, .n_win (), .busy (), .done (sa_done)
  );

  // ---------------- compression ----------------
  logic          cp_re, cp_done;
  logic [AW-1:0] cp_raddr;

  rle_compress #(.W(W), .H(H), .BIN(BIN)) u_comp (
    .clk, .rst_n,
    .start      (kick && ph == P_COMP),
    .win,
    .mask_re    (m_re), .mask_raddr (m_raddr), .mask_rdata (m_rdata),
    .mem_re     (cp_re), .mem_raddr (cp_raddr), .mem_rdata (sram_rdata[nslot]),
    .out_valid, .out_word, .n_words,
    .busy       (), .done (cp_done)
  );

  // ---------------- external read ports ----------------
  always_comb begin
    for (int s = 0; s < 2; s++) begin
      sram_re[s]    = (ph == P_COMP && nslot == 1'(s)) ? cp_re    : pb_re[s];
      sram_raddr[s] = (ph == P_COMP && nslot == 1'(s)) ? cp_raddr : pb_raddr[s];
    end
  end

  // ---------------- sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph        <= P_IDLE;
      kick      <= 1'b0;
      done      <= 1'b0;
      nslot     <= 1'b1;
      pair      <= 1'b1;
      have_prev <= 1'b0;
    end else begin
      kick <= 1'b0;
      done <= 1'b0;
      unique case (ph)
        P_IDLE: if (start) begin
          kick <= 1'b1;
          if (continuous && have_prev) begin
            pair  <= 1'b0;
            nslot <= !nslot;       // overwrite the older frame
            ph    <= P_STORE_B;
          end else begin
            pair  <= 1'b1;
            nslot <= 1'b1;
            ph    <= P_STORE_A;
          end
        end
        P_STORE_A: if (st_done) begin ph <= P_STORE_B; kick <= 1'b1; end
        P_STORE_B: if (st_done) begin ph <= P_BIN;     kick <= 1'b1; end
        P_BIN:     if (pb_done[nslot]) begin ph <= P_DISP; kick <= 1'b1; end
        P_DISP:    if (dv_done) begin ph <= P_BIN2;    kick <= 1'b1; end
        P_BIN2:    if (b2_done[nslot]) begin ph <= P_DIFF; kick <= 1'b1; end
        P_DIFF:    if (df_done) begin ph <= P_ROI;     kick <= 1'b1; end
        P_ROI:     if (roi_done) begin ph <= P_STARS;  kick <= 1'b1; end
        P_STARS:   if (sa_done) begin ph <= P_COMP;    kick <= 1'b1; end
        P_COMP:    if (cp_done) begin ph <= P_IDLE; done <= 1'b1; have_prev <= 1'b1; end
        default:   ph <= P_IDLE;
      endcase
    end
  end

  // When both frames are processed, their duplicated units run in lock step.
  assert property (@(posedge clk) disable iff (!rst_n) pair |-> pb_done[0] == pb_done[1]);
  assert property (@(posedge clk) disable iff (!rst_n) pair |-> b2_done[0] == b2_done[1]);
endmodule
