// rle_compress - "Image Compression": composes the result image of the newer
// raw frame and compresses it.
//
// The result image keeps the raw pixels that lie in a selected region of
// interest or in a reference-star window and sets every other pixel to
// zero.  Rather than copying the kept pixels into a separate image buffer,
// the block decides for each raw pixel, while reading the frame once in
// raster order, whether it is kept: a pixel at (y, x) belongs to tile
// (y/BIN/3, x/BIN/3) of the ROI mask, and the mask word of a tile row is
// fetched at the start of every raw row (one extra clock per row).  The
// mostly-zero result is coded as a zero run-length stream: each output word
// {run, val} stands for 'run' zero pixels followed by one pixel of value
// 'val'.  A word is emitted for every non-zero pixel, when the run reaches
// 65535 and for the last pixel, so decoding gives back exactly W*H pixels.
// There is no back-pressure: the consumer takes one word per clock.  The
// coding scheme is this design's choice.  Timing: W*H + H clocks plus two;
// 'done' pulses with the last word.
module rle_compress #(
  parameter int unsigned W   = 2048,
  parameter int unsigned H   = 2048,
  parameter int unsigned BIN = 4,
  localparam int unsigned HT  = ((H + BIN - 1) / BIN - 2) / 3,
  localparam int unsigned WT  = ((W + BIN - 1) / BIN - 2) / 3,
  localparam int unsigned TAW = (HT > 1) ? $clog2(HT) : 1,
  localparam int unsigned N   = W * H,
  localparam int unsigned AW  = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  dm_pkg::star_win_t win [dm_pkg::N_STARS],
  output logic              mask_re,
  output logic [TAW-1:0]    mask_raddr,
  input  logic [WT-1:0]     mask_rdata,
  output logic              mem_re,
  output logic [AW-1:0]     mem_raddr,
  input  dm_pkg::pix_t      mem_rdata,
  output logic              out_valid,
  output dm_pkg::rle_word_t out_word,
  output logic [31:0]       n_words,
  output logic              busy,
  output logic              done
);
  import dm_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_MREQ, S_PIX} state_t;
  state_t state;
  coord_t y, x, tr, tc;
  logic [$clog2(BIN)-1:0] ym, xm;
  logic [1:0] yb3, xb3;
  logic in_roi, in_star, keep;

  always_comb begin
    in_star = 1'b0;
    for (int k = 0; k < int'(N_STARS); k++)
      if (win[k].valid && y >= win[k].r_lo && y <= win[k].r_hi &&
          x >= win[k].c_lo && x <= win[k].c_hi)
        in_star = 1'b1;
  end
  assign in_roi     = (tr < coord_t'(HT)) && (tc < coord_t'(WT)) &&
                      mask_rdata[tc[$clog2(WT)-1:0]];
  assign keep       = in_roi || in_star;
  assign mask_re    = (state == S_MREQ);
  assign mask_raddr = (tr < coord_t'(HT)) ? TAW'(tr) : '0;
  assign mem_re     = (state == S_PIX);

  // ---- scan ----
  logic d_valid, d_keep, d_last;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      y <= '0; x <= '0; tr <= '0; tc <= '0;
      ym <= '0; xm <= '0; yb3 <= '0; xb3 <= '0;
      mem_raddr <= '0;
      d_valid   <= 1'b0;
      d_keep    <= 1'b0;
      d_last    <= 1'b0;
    end else begin
      d_valid <= (state == S_PIX);
      d_keep  <= keep;
      d_last  <= (state == S_PIX) && (y == coord_t'(H - 1)) && (x == coord_t'(W - 1));
      case (state)
        S_IDLE: if (start) begin
          state <= S_MREQ;
          y <= '0; x <= '0; tr <= '0; tc <= '0;
          ym <= '0; xm <= '0; yb3 <= '0; xb3 <= '0;
          mem_raddr <= '0;
        end
        S_MREQ: state <= S_PIX;
        default: begin  // S_PIX
          mem_raddr <= mem_raddr + 1'b1;
          if (x == coord_t'(W - 1)) begin
            x <= '0; xm <= '0; xb3 <= '0; tc <= '0;
            y <= y + 1'b1;
            ym <= ym + 1'b1;
            if (ym == '1) begin
              if (yb3 == 2'd2) begin yb3 <= '0; tr <= tr + 1'b1; end
              else yb3 <= yb3 + 1'b1;
            end
            state <= (y == coord_t'(H - 1)) ? S_IDLE : S_MREQ;
          end else begin
            x  <= x + 1'b1;
            xm <= xm + 1'b1;
            if (xm == '1) begin
              if (xb3 == 2'd2) begin xb3 <= '0; tc <= tc + 1'b1; end
              else xb3 <= xb3 + 1'b1;
            end
          end
        end
      endcase
    end
  end

  // ---- run-length coder ----
  logic [15:0] run;
  pix_t v;
  assign v    = d_keep ? mem_rdata : '0;
  assign busy = (state != S_IDLE) || d_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run       <= '0;
      out_valid <= 1'b0;
      out_word  <= '0;
      n_words   <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      if (start && state == S_IDLE) begin
        run     <= '0;
        n_words <= '0;
      end else if (d_valid) begin
        if (v != '0 || run == 16'hFFFF || d_last) begin
          out_valid <= 1'b1;
          out_word  <= '{run: run, val: v};
          n_words   <= n_words + 1'b1;
          run       <= '0;
        end else begin
          run <= run + 1'b1;
        end
        done <= d_last;
      end
    end
  end

  initial assert (BIN >= 2 && (1 << $clog2(BIN)) == BIN)
    else $error("rle_compress: BIN must be a power of two");
endmodule
