// frame_store - "Storing" step: writes one incoming camera frame, pixel by
// pixel in raster order, into an external SRAM.
//
// After 'start' the block accepts W*H pixels on a valid/ready stream and
// writes pixel k to SRAM address k.  Each SRAM write occupies the external
// bus for WR_CYCLES clocks, so 'pix_ready' is raised at most once every
// WR_CYCLES clocks.  The default of 4 clocks per pixel reproduces the storing
// cost of the reference design (about four cycles per pixel); the write
// protocol behind that cost is this design's assumption.  'mem_we' is a
// one-clock strobe registered one clock after the handshake.  'done' pulses
// for one clock once the last pixel has been written.
module frame_store #(
  parameter int unsigned W         = 2048,
  parameter int unsigned H         = 2048,
  parameter int unsigned WR_CYCLES = 4,
  localparam int unsigned N  = W * H,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              pix_valid,
  input  dm_pkg::pix_t      pix_data,
  output logic              pix_ready,
  output logic              mem_we,
  output logic [AW-1:0]     mem_waddr,
  output dm_pkg::pix_t      mem_wdata,
  output logic              busy,
  output logic              done
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_LAST} state_t;
  state_t state;
  logic [AW-1:0] cnt;
  logic [$clog2(WR_CYCLES+1)-1:0] wait_cnt;

  assign pix_ready = (state == S_RUN) && (wait_cnt == '0);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      wait_cnt  <= '0;
      mem_we    <= 1'b0;
      mem_waddr <= '0;
      mem_wdata <= '0;
      done      <= 1'b0;
    end else begin
      mem_we <= 1'b0;
      done   <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state    <= S_RUN;
          cnt      <= '0;
          wait_cnt <= '0;
        end
        S_RUN: begin
          if (pix_valid && pix_ready) begin
            mem_we    <= 1'b1;
            mem_waddr <= cnt;
            mem_wdata <= pix_data;
            cnt       <= cnt + 1'b1;
            wait_cnt  <= ($bits(wait_cnt))'(WR_CYCLES - 1);
            if (cnt == AW'(N - 1)) state <= S_LAST;
          end else if (wait_cnt != '0) begin
            wait_cnt <= wait_cnt - 1'b1;
          end
        end
        default: begin  // S_LAST: last write strobe is on the bus now
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

  // A write strobe only follows an accepted pixel.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (pix_valid && pix_ready) |=> mem_we);
endmodule
