// prebin - "Binning" step: 4 x 4 pre-binning of a raw frame held in external
// SRAM.
//
// The block reads the raw frame in raster order, one pixel per clock, from an
// SRAM read port with one clock of latency.  Each group of BIN consecutive
// pixels of a row is summed in a register; the row sums are accumulated over
// BIN rows in a line accumulator of WB = ceil(W/BIN) words.  When the last
// pixel of a BIN x BIN block arrives, the block average (sum / BIN^2, a
// shift) is output as one binned pixel on out_valid/out_row/out_col/out_pix.
// Binned pixels therefore leave in raster order of the binned image, one row
// of WB pixels every BIN raw rows.  Averaging follows the reference design,
// which uses an average where the software version used a median.
// A frame whose width or height is not a multiple of BIN is padded with zero
// pixels up to the next multiple, so the last, partial block is kept (its
// average includes the zeros).  The padding costs one clock per padded
// pixel with no SRAM read: this reproduces the published clock count for
// 668 x 1002 frames (668 x 1004 clocks).
// Timing: HB*BIN * WB*BIN clocks of reading plus two clocks of pipeline;
// 'done' pulses with the last binned pixel.
module prebin #(
  parameter int unsigned W   = 2048,
  parameter int unsigned H   = 2048,
  parameter int unsigned BIN = 4,
  localparam int unsigned N  = W * H,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned WB = (W + BIN - 1) / BIN,
  localparam int unsigned HB = (H + BIN - 1) / BIN,
  localparam int unsigned WP = WB * BIN,     // padded width
  localparam int unsigned HP = HB * BIN,     // padded height
  localparam int unsigned SW = dm_pkg::PIX_W + 2 * $clog2(BIN)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            mem_re,
  output logic [AW-1:0]   mem_raddr,
  input  dm_pkg::pix_t    mem_rdata,
  output logic            out_valid,
  output dm_pkg::coord_t  out_row,
  output dm_pkg::coord_t  out_col,
  output dm_pkg::pix_t    out_pix,
  output logic            busy,
  output logic            done
);
  import dm_pkg::*;

  // ---- address generator ----
  logic   running;
  coord_t ry, rx;                 // position being addressed
  logic   d_valid;                // data for (dy, dx) is on mem_rdata
  logic   d_real;                 // ... and (dy, dx) is inside the frame
  logic   real_px;                // (ry, rx) is inside the frame
  coord_t dy, dx;
  pix_t   d_pix;                  // pixel value, zero in the padding

  assign real_px   = (ry < coord_t'(H)) && (rx < coord_t'(W));
  assign mem_re    = running && real_px;
  assign d_pix     = d_real ? mem_rdata : '0;
  assign busy      = running || d_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      ry        <= '0;
      rx        <= '0;
      mem_raddr <= '0;
      d_valid   <= 1'b0;
      d_real    <= 1'b0;
      dy        <= '0;
      dx        <= '0;
    end else begin
      d_valid <= running;
      d_real  <= running && real_px;
      dy      <= ry;
      dx      <= rx;
      if (!running) begin
        if (start) begin
          running   <= 1'b1;
          ry        <= '0;
          rx        <= '0;
          mem_raddr <= '0;
        end
      end else begin
        if (real_px) mem_raddr <= mem_raddr + 1'b1;
        if (rx == coord_t'(WP - 1)) begin
          rx <= '0;
          ry <= ry + 1'b1;
          if (ry == coord_t'(HP - 1)) running <= 1'b0;
        end else begin
          rx <= rx + 1'b1;
        end
      end
    end
  end

  // ---- accumulation ----
  logic [SW-1:0] hsum;            // running sum of the current row segment
  logic [SW-1:0] acc [WB];        // per binned column, sum over rows so far
  logic [SW-1:0] seg;             // complete row segment including this pixel
  logic [$clog2(BIN)-1:0] xm, ym;
  coord_t xb, yb;

  assign xm       = dx[$clog2(BIN)-1:0];
  assign ym       = dy[$clog2(BIN)-1:0];
  assign xb       = dx >> $clog2(BIN);
  assign yb       = dy >> $clog2(BIN);
  assign seg      = ((xm == '0) ? '0 : hsum) + SW'(d_pix);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hsum      <= '0;
      out_valid <= 1'b0;
      out_row   <= '0;
      out_col   <= '0;
      out_pix   <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      if (d_valid) begin
        if (xm == '1) begin
          hsum <= '0;
          if (ym == '1) begin
            out_valid <= 1'b1;
            out_row   <= yb;
            out_col   <= xb;
            out_pix   <= pix_t'((acc[xb[$clog2(WB)-1:0]] + seg) >> (2 * $clog2(BIN)));
            done      <= (yb == coord_t'(HB - 1)) && (xb == coord_t'(WB - 1));
          end
        end else begin
          hsum <= seg;
        end
      end
    end
  end

  // Line accumulator (no reset: every word is written at the first row of a
  // block before it is read).
  always_ff @(posedge clk) begin
    if (d_valid && xm == '1 && ym != '1)
      acc[xb[$clog2(WB)-1:0]] <= (ym == '0) ? seg : acc[xb[$clog2(WB)-1:0]] + seg;
  end

  initial assert (BIN >= 2 && (1 << $clog2(BIN)) == BIN)
    else $error("prebin: BIN must be a power of two");
endmodule
