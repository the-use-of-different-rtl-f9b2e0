// star_detect - "Star Detection" step: finds, in each of the 5 x 5 sub-frames
// of a binned frame, the brightest star that is not saturated.
//
// The binned frame arrives as a pixel stream (in_valid, in_row, in_col,
// in_pix) in any order; in the chain it is taken straight from the binning
// output, so star detection costs no extra pass over the frame.  A pixel at
// or above SAT_LEVEL belongs to a saturated star and is ignored; a pixel
// below STAR_MIN is background.  For every other pixel the sub-frame is
// looked up by comparing row and column against the strip boundaries
// (strips are ceil(HB/5) rows and ceil(WB/5) columns wide) and the table
// entry of that sub-frame is replaced when the pixel is brighter.  'clear'
// empties the table.  The table is a registered output, valid one clock
// after the last pixel.  Taking the single brightest pixel per sub-frame as
// its reference star, and both thresholds, are this design's choices.
module star_detect #(
  parameter int unsigned HB        = 512,
  parameter int unsigned WB        = 512,
  parameter dm_pkg::pix_t SAT_LEVEL = 16'hFF00,
  parameter dm_pkg::pix_t STAR_MIN  = 16'd2000,
  localparam int unsigned SUB_H    = (HB + dm_pkg::N_SUB - 1) / dm_pkg::N_SUB,
  localparam int unsigned SUB_W    = (WB + dm_pkg::N_SUB - 1) / dm_pkg::N_SUB
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            in_valid,
  input  dm_pkg::coord_t  in_row,
  input  dm_pkg::coord_t  in_col,
  input  dm_pkg::pix_t    in_pix,
  output dm_pkg::star_t   stars [dm_pkg::N_STARS]
);
  import dm_pkg::*;

  logic [2:0] sr, sc;
  logic [$clog2(N_STARS)-1:0] idx;
  logic candidate, better;

  assign sr        = sub_of(in_row, SUB_H);
  assign sc        = sub_of(in_col, SUB_W);
  assign idx       = ($clog2(N_STARS))'(sr * N_SUB + sc);
  assign candidate = in_valid && (in_pix < SAT_LEVEL) && (in_pix >= STAR_MIN);
  assign better    = !stars[idx].valid || (in_pix > stars[idx].val);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_STARS); i++) stars[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < int'(N_STARS); i++) stars[i] <= '0;
    end else if (candidate && better) begin
      stars[idx] <= '{valid: 1'b1, row: in_row, col: in_col, val: in_pix};
    end
  end
endmodule
