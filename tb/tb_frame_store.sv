// tb_frame_store - self-checking test of frame_store.
// A 8 x 4 frame of random pixels is sent twice: once with the source always
// valid (the store must then take exactly WR_CYCLES clocks per pixel) and
// once with random gaps.  A model SRAM records the writes, which are
// compared with the pixels sent.
module tb_frame_store;
  import dm_pkg::*;
  localparam int W = 8, H = 4, N = W * H, WRC = 4;
  localparam int AW = $clog2(N);

  logic clk = 0, rst_n = 0, start = 0;
  logic pix_valid = 0, pix_ready;
  pix_t pix_data = '0;
  logic mem_we, busy, done;
  logic [AW-1:0] mem_waddr;
  pix_t mem_wdata;
  int checks = 0, failures = 0;

  frame_store #(.W(W), .H(H), .WR_CYCLES(WRC)) dut (.*);

  always #5 clk = ~clk;

  pix_t frame [N];
  pix_t sram  [N];
  int   nwrites;
  always @(posedge clk) if (mem_we) begin sram[mem_waddr] <= mem_wdata; nwrites <= nwrites + 1; end

  task automatic run(input bit gaps, output int cycles);
    int k = 0;
    cycles = 0;
    nwrites = 0;
    for (int i = 0; i < N; i++) frame[i] = pix_t'($urandom);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin
      pix_valid = (k < N) && (!gaps || ($urandom % 3 != 0));
      pix_data  = (k < N) ? frame[k] : '0;
      @(posedge clk);
      if (pix_valid && pix_ready) k++;
      cycles++;
      #1;
    end
    pix_valid = 0;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (sram[i] !== frame[i]) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", i, sram[i], frame[i]);
      end
    end
    checks++;
    if (nwrites != N) begin failures++; $display("FAIL %0d writes", nwrites); end
  endtask

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0, cyc);
    checks++;
    // one pixel every WRC clocks, plus the final strobe cycle
    if (cyc < WRC * (N - 1) + 1 || cyc > WRC * N + 2) begin
      failures++; $display("FAIL store took %0d clocks", cyc);
    end
    run(1, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
