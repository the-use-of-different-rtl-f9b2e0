// box_bin3 - "Second Binning": 3 x 3 sliding-window sum over a binned frame.
//
// The block reads the binned frame (HB x WB) from an on-chip RAM in raster
// order, one pixel per clock (read latency one clock), and writes the
// (HB-2) x (WB-2) window sums, in raster order, to a second RAM.  Two line
// buffers hold the two previous rows; the vertical sum of three pixels of a
// column is added into a three-deep horizontal shift register, so every
// output costs one clock and no pixel is read twice.  A window sum at output
// position (r, c) covers binned rows r..r+2 and columns c..c+2.  The output
// size (HB-2) x (WB-2) equals the cycle count the reference design gives
// for this step; the sliding-window form of the second binning is this
// design's reading of that size.  Timing: HB*WB clocks plus two; 'done'
// pulses with the last write.  Sums are kept at full width (PIX_W+4 bits).
module box_bin3 #(
  parameter int unsigned HB = 512,
  parameter int unsigned WB = 512,
  localparam int unsigned H2 = HB - 2,
  localparam int unsigned W2 = WB - 2,
  localparam int unsigned RAW = $clog2(HB * WB),
  localparam int unsigned WAW = $clog2(H2 * W2),
  localparam int unsigned SW  = dm_pkg::PIX_W + 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            rd_re,
  output logic [RAW-1:0]  rd_addr,
  input  dm_pkg::pix_t    rd_data,
  output logic            wr_we,
  output logic [WAW-1:0]  wr_addr,
  output logic [SW-1:0]   wr_data,
  output logic            busy,
  output logic            done
);
  import dm_pkg::*;

  logic   running, d_valid;
  coord_t ry, rx, dy, dx;

  assign rd_re = running;
  assign busy  = running || d_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      ry      <= '0;
      rx      <= '0;
      rd_addr <= '0;
      d_valid <= 1'b0;
      dy      <= '0;
      dx      <= '0;
    end else begin
      d_valid <= running;
      dy      <= ry;
      dx      <= rx;
      if (!running) begin
        if (start) begin
          running <= 1'b1;
          ry      <= '0;
          rx      <= '0;
          rd_addr <= '0;
        end
      end else begin
        rd_addr <= rd_addr + 1'b1;
        if (rx == coord_t'(WB - 1)) begin
          rx <= '0;
          ry <= ry + 1'b1;
          if (ry == coord_t'(HB - 1)) running <= 1'b0;
        end else begin
          rx <= rx + 1'b1;
        end
      end
    end
  end

  pix_t lb1 [WB];                 // row r-1
  pix_t lb2 [WB];                 // row r-2
  logic [SW-1:0] vsum, h1, h2;    // h1/h2: vertical sums of columns c-1, c-2
  logic [$clog2(WB)-1:0] ci;

  assign ci   = dx[$clog2(WB)-1:0];
  assign vsum = SW'(rd_data) + SW'(lb1[ci]) + SW'(lb2[ci]);

  always_ff @(posedge clk) begin
    if (d_valid) begin
      lb2[ci] <= lb1[ci];
      lb1[ci] <= rd_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h1      <= '0;
      h2      <= '0;
      wr_we   <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
      done    <= 1'b0;
    end else begin
      wr_we <= 1'b0;
      done  <= 1'b0;
      if (start && !running) wr_addr <= '0;
      else if (wr_we) wr_addr <= wr_addr + 1'b1;
      if (d_valid) begin
        h1 <= vsum;
        h2 <= h1;
        if (dy >= 16'd2 && dx >= 16'd2) begin
          wr_we   <= 1'b1;
          wr_data <= vsum + h1 + h2;
          done    <= (dy == coord_t'(HB - 1)) && (dx == coord_t'(WB - 1));
        end
      end
    end
  end
endmodule
