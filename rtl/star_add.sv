// star_add - "Adding stars": converts the reference stars of the newer frame
// into windows of raw pixels that are copied into the result image next to
// the regions of interest, so that the ground can still calibrate the frame
// against the star background.
//
// After 'start' the block takes one sub-frame per clock: a valid star at
// binned position (row, col) gives the raw window centred on the middle of
// its BIN x BIN block, STAR_HALF pixels to each side, clipped to the frame.
// Windows are registered outputs; 'done' pulses after N_STARS clocks and
// 'n_win' counts valid windows.  Window size and shape are this design's
// choice.
module star_add #(
  parameter int unsigned W         = 2048,
  parameter int unsigned H         = 2048,
  parameter int unsigned BIN       = 4,
  parameter int unsigned STAR_HALF = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  dm_pkg::star_t     stars [dm_pkg::N_STARS],
  output dm_pkg::star_win_t win   [dm_pkg::N_STARS],
  output logic [$clog2(dm_pkg::N_STARS+1)-1:0] n_win,
  output logic              busy,
  output logic              done
);
  import dm_pkg::*;

  logic [$clog2(N_STARS)-1:0] i;
  logic [COORD_W+1:0] cy, cx;         // window centre, raw pixels
  star_win_t w;

  assign cy = (COORD_W+2)'(stars[i].row) * (COORD_W+2)'(BIN) + (COORD_W+2)'(BIN / 2);
  assign cx = (COORD_W+2)'(stars[i].col) * (COORD_W+2)'(BIN) + (COORD_W+2)'(BIN / 2);

  always_comb begin
    w.valid = stars[i].valid;
    w.r_lo  = (cy > (COORD_W+2)'(STAR_HALF)) ? coord_t'(cy - (COORD_W+2)'(STAR_HALF)) : '0;
    w.c_lo  = (cx > (COORD_W+2)'(STAR_HALF)) ? coord_t'(cx - (COORD_W+2)'(STAR_HALF)) : '0;
    w.r_hi  = (cy + (COORD_W+2)'(STAR_HALF) < (COORD_W+2)'(H)) ?
              coord_t'(cy + (COORD_W+2)'(STAR_HALF)) : coord_t'(H - 1);
    w.c_hi  = (cx + (COORD_W+2)'(STAR_HALF) < (COORD_W+2)'(W)) ?
              coord_t'(cx + (COORD_W+2)'(STAR_HALF)) : coord_t'(W - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      i     <= '0;
      n_win <= '0;
      for (int k = 0; k < int'(N_STARS); k++) win[k] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          i     <= '0;
          n_win <= '0;
        end
      end else begin
        win[i] <= w;
        if (w.valid) n_win <= n_win + 1'b1;
        if (i == ($clog2(N_STARS))'(N_STARS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          i <= i + 1'b1;
        end
      end
    end
  end
endmodule
