// disp_vector - "Displacement Vector Calibration": one integer displacement
// vector per sub-frame, from the reference stars of frame A and frame B.
//
// After 'start' the block walks through the N_STARS sub-frames, one per
// clock.  Where both frames have a reference star in the sub-frame, the
// vector is the star position in B minus the position in A (binned pixels).
// A vector is only trusted when both components lie within +/-MAX_DISP:
// a larger jump means that the two brightest pixels are not the same star
// (for instance a debris streak outshining the star in one frame), and the
// sub-frame then gets the zero vector, as does a sub-frame without a star in
// either frame.  MAX_DISP is also the border that the difference step keeps
// free; its default of 1 matches the two-pixel shrink between the second
// binning and the difference in the reference design's cycle counts.  The
// rejection rule is this design's choice.  Timing: N_STARS clocks from
// 'start' to the one-clock 'done' pulse; 'matched' counts trusted vectors.
module disp_vector #(
  parameter int unsigned MAX_DISP = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  dm_pkg::star_t  stars_a [dm_pkg::N_STARS],
  input  dm_pkg::star_t  stars_b [dm_pkg::N_STARS],
  output dm_pkg::disp_t  disp    [dm_pkg::N_STARS],
  output logic [$clog2(dm_pkg::N_STARS+1)-1:0] matched,
  output logic           busy,
  output logic           done
);
  import dm_pkg::*;

  logic [$clog2(N_STARS)-1:0] i;
  logic signed [COORD_W:0] ddy, ddx;
  logic ok;

  assign ddy = $signed({1'b0, stars_b[i].row}) - $signed({1'b0, stars_a[i].row});
  assign ddx = $signed({1'b0, stars_b[i].col}) - $signed({1'b0, stars_a[i].col});
  assign ok  = stars_a[i].valid && stars_b[i].valid &&
               (ddy <= $signed((COORD_W+1)'(MAX_DISP))) && (ddy >= -$signed((COORD_W+1)'(MAX_DISP))) &&
               (ddx <= $signed((COORD_W+1)'(MAX_DISP))) && (ddx >= -$signed((COORD_W+1)'(MAX_DISP)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      i       <= '0;
      matched <= '0;
      for (int k = 0; k < int'(N_STARS); k++) disp[k] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          i       <= '0;
          matched <= '0;
        end
      end else begin
        disp[i] <= ok ? '{dy: DISP_W'(ddy), dx: DISP_W'(ddx)} : '0;
        if (ok) matched <= matched + 1'b1;
        if (i == ($clog2(N_STARS))'(N_STARS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          i <= i + 1'b1;
        end
      end
    end
  end

  initial assert (MAX_DISP < (1 << (DISP_W - 1)))
    else $error("disp_vector: MAX_DISP does not fit the vector width");
endmodule
