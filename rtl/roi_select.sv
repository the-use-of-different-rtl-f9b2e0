// roi_select - "Region of Interest Selection": turns the tile hit map of the
// difference step into the list and the mask of regions of interest (ROIs).
//
// The hit map holds one word of WT bits per row of 3 x 3 tiles (tiles of the
// second-binned frame).  The block reads it row by row and then examines one
// tile per clock.  Every flagged tile becomes an ROI: it is reported on
// roi_valid/roi_tr/roi_tc and its bit is set in the ROI mask, which is
// written back one word per tile row for the compression step.  At most
// MAX_ROI tiles are accepted, which bounds the volume of the result image;
// the limit and its default are this design's choice.  Timing: HT*(WT+2)
// clocks, one per tile plus two per row for the map read; 'done' pulses
// after the last mask word is written.
module roi_select #(
  parameter int unsigned HT      = 170,
  parameter int unsigned WT      = 170,
  parameter int unsigned MAX_ROI = 1024,
  localparam int unsigned TAW = (HT > 1) ? $clog2(HT) : 1,
  localparam int unsigned CW  = $clog2(MAX_ROI + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            tile_re,
  output logic [TAW-1:0]  tile_raddr,
  input  logic [WT-1:0]   tile_rdata,
  output logic            mask_we,
  output logic [TAW-1:0]  mask_waddr,
  output logic [WT-1:0]   mask_wdata,
  output logic            roi_valid,
  output dm_pkg::coord_t  roi_tr,
  output dm_pkg::coord_t  roi_tc,
  output logic [CW-1:0]   roi_count,
  output logic            busy,
  output logic            done
);
  import dm_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WAIT, S_SCAN} state_t;
  state_t state;
  logic [TAW-1:0] tr;
  logic [$clog2(WT)-1:0] tc;
  logic [WT-1:0] word, mask;
  logic take;

  assign busy       = (state != S_IDLE);
  assign tile_re    = (state == S_READ);
  assign tile_raddr = tr;
  assign take       = word[tc] && (roi_count < CW'(MAX_ROI));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      tr         <= '0;
      tc         <= '0;
      word       <= '0;
      mask       <= '0;
      mask_we    <= 1'b0;
      mask_waddr <= '0;
      mask_wdata <= '0;
      roi_valid  <= 1'b0;
      roi_tr     <= '0;
      roi_tc     <= '0;
      roi_count  <= '0;
      done       <= 1'b0;
    end else begin
      mask_we   <= 1'b0;
      roi_valid <= 1'b0;
      done      <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state     <= S_READ;
          tr        <= '0;
          roi_count <= '0;
        end
        S_READ: state <= S_WAIT;
        S_WAIT: begin
          word  <= tile_rdata;
          mask  <= '0;
          tc    <= '0;
          state <= S_SCAN;
        end
        default: begin  // S_SCAN
          if (take) begin
            mask[tc]  <= 1'b1;
            roi_valid <= 1'b1;
            roi_tr    <= coord_t'(tr);
            roi_tc    <= coord_t'(tc);
            roi_count <= roi_count + 1'b1;
          end
          if (tc == ($clog2(WT))'(WT - 1)) begin
            mask_we    <= 1'b1;
            mask_waddr <= tr;
            mask_wdata <= take ? (mask | (WT'(1) << tc)) : mask;
            if (tr == TAW'(HT - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              tr    <= tr + 1'b1;
              state <= S_READ;
            end
          end else begin
            tc <= tc + 1'b1;
          end
        end
      endcase
    end
  end
endmodule
