// frame_diff - "Difference" step: subtracts the registered second-binned
// frame A from frame B and marks the 3 x 3 tiles that hold a potential
// streak.
//
// Both second-binned frames (H2 x W2 window sums) sit in on-chip RAMs with
// one read port each.  The block scans A in raster order, keeping a border
// of MAX_DISP pixels, and for each position (r, c) reads A(r, c) and
// B(r+dy, c+dx), where (dy, dx) is the displacement vector of the sub-frame
// that holds the window centre (r+1, c+1) in binned coordinates.  Applying
// the alignment here, on the already binned sums, is this design's way of
// binning "taking the displacement vectors into account".  The signed
// difference B - A flags the pixel when it is above +DIFF_THR or below
// -DIFF_THR (a bright object in B or in A).  Flags are OR-ed into a row of
// W2/3 tile bits; when the scan leaves a row of tiles, that row is written
// as one word to the tile hit map (address = tile row).  Partial tiles at
// the right and bottom edges are dropped.  One pixel per clock: the scan
// takes (H2-2*MAX_DISP)*(W2-2*MAX_DISP) clocks plus two, as in the
// reference design with MAX_DISP = 1.  'hit_count' counts flagged pixels.
module frame_diff #(
  parameter int unsigned HB       = 512,
  parameter int unsigned WB       = 512,
  parameter int unsigned MAX_DISP = 1,
  parameter int unsigned DIFF_THR = 3000,
  localparam int unsigned H2  = HB - 2,
  localparam int unsigned W2  = WB - 2,
  localparam int unsigned HT  = H2 / 3,
  localparam int unsigned WT  = W2 / 3,
  localparam int unsigned AW  = $clog2(H2 * W2),
  localparam int unsigned TAW = (HT > 1) ? $clog2(HT) : 1,
  localparam int unsigned SW  = dm_pkg::PIX_W + 4,
  localparam int unsigned SUB_H = (HB + dm_pkg::N_SUB - 1) / dm_pkg::N_SUB,
  localparam int unsigned SUB_W = (WB + dm_pkg::N_SUB - 1) / dm_pkg::N_SUB
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  dm_pkg::disp_t   disp [dm_pkg::N_STARS],
  output logic            a_re,
  output logic [AW-1:0]   a_addr,
  input  logic [SW-1:0]   a_data,
  output logic            b_re,
  output logic [AW-1:0]   b_addr,
  input  logic [SW-1:0]   b_data,
  output logic            tile_we,
  output logic [TAW-1:0]  tile_waddr,
  output logic [WT-1:0]   tile_wdata,
  output logic [31:0]     hit_count,
  output logic            busy,
  output logic            done
);
  import dm_pkg::*;

  localparam coord_t R_FIRST = coord_t'(MAX_DISP);
  localparam coord_t R_LAST  = coord_t'(H2 - MAX_DISP - 1);
  localparam coord_t C_FIRST = coord_t'(MAX_DISP);
  localparam coord_t C_LAST  = coord_t'(W2 - MAX_DISP - 1);

  // ---- scan and address generation ----
  logic   running;
  coord_t r, c, tr, tc;
  logic [1:0] rm3, cm3;
  logic [AW:0] row_base;               // r * W2
  disp_t  v;
  int     b_lin;
  logic [$clog2(N_STARS)-1:0] sidx;

  assign sidx  = ($clog2(N_STARS))'(int'(sub_of(r + 16'd1, SUB_H)) * int'(N_SUB) +
                                    int'(sub_of(c + 16'd1, SUB_W)));
  assign v     = disp[sidx];
  assign b_lin = int'(row_base) + int'(c) + int'(v.dy) * int'(W2) + int'(v.dx);

  // pipeline stage: data of the issued position is on a_data / b_data
  logic       d_valid, d_ok, d_flush;
  coord_t     d_tc, d_tr;

  logic e_valid;
  assign a_re = d_valid;
  assign b_re = d_valid;
  assign busy = running || d_valid || e_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      r        <= '0;
      c        <= '0;
      tr       <= '0;
      tc       <= '0;
      rm3      <= '0;
      cm3      <= '0;
      row_base <= '0;
      a_addr   <= '0;
      b_addr   <= '0;
      d_valid  <= 1'b0;
      d_ok     <= 1'b0;
      d_flush  <= 1'b0;
      d_tc     <= '0;
      d_tr     <= '0;
    end else begin
      d_valid <= running;
      d_ok    <= running && (tr < coord_t'(HT)) && (tc < coord_t'(WT));
      d_flush <= running && (c == C_LAST) && ((rm3 == 2'd2) || (r == R_LAST)) &&
                 (tr < coord_t'(HT));
      d_tc    <= tc;
      d_tr    <= tr;
      if (!running) begin
        if (start) begin
          running  <= 1'b1;
          r        <= R_FIRST;
          c        <= C_FIRST;
          rm3      <= 2'(MAX_DISP % 3);
          cm3      <= 2'(MAX_DISP % 3);
          tr       <= coord_t'(MAX_DISP / 3);
          tc       <= coord_t'(MAX_DISP / 3);
          row_base <= (AW+1)'(MAX_DISP * W2);
        end
      end else begin
        a_addr <= AW'(row_base + (AW+1)'(c));
        b_addr <= AW'(b_lin);
        if (c == C_LAST) begin
          c        <= C_FIRST;
          cm3      <= 2'(MAX_DISP % 3);
          tc       <= coord_t'(MAX_DISP / 3);
          r        <= r + 1'b1;
          row_base <= row_base + (AW+1)'(W2);
          if (rm3 == 2'd2) begin rm3 <= '0; tr <= tr + 1'b1; end
          else rm3 <= rm3 + 1'b1;
          if (r == R_LAST) running <= 1'b0;
        end else begin
          c <= c + 1'b1;
          if (cm3 == 2'd2) begin cm3 <= '0; tc <= tc + 1'b1; end
          else cm3 <= cm3 + 1'b1;
        end
      end
    end
  end

  // The address registers above are loaded in the issue cycle, so the RAM
  // sees them one clock later; the data stage below is two clocks behind
  // the scan counters.
  logic e_ok, e_flush;
  coord_t e_tc, e_tr;
  logic signed [SW:0] diff;
  logic hit;
  logic [WT-1:0] flags, flags_now;

  assign diff = $signed({1'b0, b_data}) - $signed({1'b0, a_data});
  assign hit  = e_ok && ((diff > $signed((SW+1)'(DIFF_THR))) ||
                         (diff < -$signed((SW+1)'(DIFF_THR))));
  always_comb begin
    flags_now = flags;
    if (hit) flags_now[e_tc[$clog2(WT)-1:0]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_valid    <= 1'b0;
      e_ok       <= 1'b0;
      e_flush    <= 1'b0;
      e_tc       <= '0;
      e_tr       <= '0;
      flags      <= '0;
      tile_we    <= 1'b0;
      tile_waddr <= '0;
      tile_wdata <= '0;
      hit_count  <= '0;
      done       <= 1'b0;
    end else begin
      e_valid <= d_valid;
      e_ok    <= d_ok;
      e_flush <= d_flush;
      e_tc    <= d_tc;
      e_tr    <= d_tr;
      tile_we <= 1'b0;
      done    <= e_valid && !d_valid;
      if (start && !running) begin
        flags     <= '0;
        hit_count <= '0;
      end else if (e_valid) begin
        if (hit) hit_count <= hit_count + 1'b1;
        if (e_flush) begin
          tile_we    <= 1'b1;
          tile_waddr <= TAW'(e_tr);
          tile_wdata <= flags_now;
          flags      <= '0;
        end else begin
          flags <= flags_now;
        end
      end
    end
  end

  initial assert (MAX_DISP <= 2)
    else $error("frame_diff: MAX_DISP above 2 leaves the first tile row unscanned");
endmodule
