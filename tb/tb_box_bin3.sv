// tb_box_bin3 - self-checking test of box_bin3.
// A random 9 x 11 binned frame sits in a model RAM with one clock of read
// latency.  Every write of the block is checked against the 3 x 3 window sum
// computed here (address, value and raster order), the number of writes must
// be (HB-2)*(WB-2), and the pass must take HB*WB clocks plus the pipeline.
// The test runs twice to check that a second start begins at address 0.
module tb_box_bin3;
  import dm_pkg::*;
  localparam int HB = 9, WB = 11, H2 = HB - 2, W2 = WB - 2;
  localparam int RAW = $clog2(HB * WB), WAW = $clog2(H2 * W2);

  logic clk = 0, rst_n = 0, start = 0;
  logic rd_re, wr_we, busy, done;
  logic [RAW-1:0] rd_addr;
  pix_t rd_data;
  logic [WAW-1:0] wr_addr;
  logic [PIX_W+3:0] wr_data;
  int checks = 0, failures = 0;

  box_bin3 #(.HB(HB), .WB(WB)) dut (.*);

  always #5 clk = ~clk;

  pix_t img [HB * WB];
  always_ff @(posedge clk) if (rd_re) rd_data <= img[rd_addr];

  int nw, cycles;
  bit counting = 0;
  always @(posedge clk) begin
    if (counting) cycles++;
    if (wr_we) begin
      automatic int r = nw / W2, c = nw % W2, s = 0;
      for (int y = 0; y < 3; y++)
        for (int x = 0; x < 3; x++) s += int'(img[(r + y) * WB + c + x]);
      checks++;
      if (int'(wr_addr) != nw || int'(wr_data) != s) begin
        failures++;
        $display("FAIL write %0d addr %0d data %0d exp %0d", nw, wr_addr, wr_data, s);
      end
      nw++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      for (int i = 0; i < HB * WB; i++) img[i] = pix_t'($urandom);
      nw = 0; cycles = 0;
      @(negedge clk) start = 1; counting = 1;
      @(negedge clk) start = 0;
      wait (done);
      @(posedge clk);
      @(negedge clk);
      counting = 0;
      checks++;
      if (nw != H2 * W2) begin failures++; $display("FAIL %0d writes", nw); end
      checks++;
      if (cycles < HB * WB || cycles > HB * WB + 5) begin failures++; $display("FAIL %0d clocks", cycles); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
