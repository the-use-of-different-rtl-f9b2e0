// tb_roi_select - self-checking test of roi_select.
// A random 5 x 9 tile hit map sits in a model RAM.  The ROI stream must list
// the flagged tiles in raster order, the mask written back must equal the
// map, and the run must take HT*(WT+2) clocks.  A second run with a map
// holding more flagged tiles than MAX_ROI checks that only the first MAX_ROI
// are kept.
module tb_roi_select;
  import dm_pkg::*;
  localparam int HT = 5, WT = 9, MAXR = 12;
  localparam int TAW = $clog2(HT), CW = $clog2(MAXR + 1);

  logic clk = 0, rst_n = 0, start = 0;
  logic tile_re, mask_we, roi_valid, busy, done;
  logic [TAW-1:0] tile_raddr, mask_waddr;
  logic [WT-1:0] tile_rdata, mask_wdata;
  coord_t roi_tr, roi_tc;
  logic [CW-1:0] roi_count;
  int checks = 0, failures = 0;

  roi_select #(.HT(HT), .WT(WT), .MAX_ROI(MAXR)) dut (.*);

  always #5 clk = ~clk;

  logic [WT-1:0] map [HT], mask [HT];
  always_ff @(posedge clk) begin
    if (tile_re) tile_rdata <= map[tile_raddr];
    if (mask_we) mask[mask_waddr] <= mask_wdata;
  end

  int exp_tr [$], exp_tc [$];
  always @(posedge clk) if (roi_valid) begin
    checks++;
    if (exp_tr.size() == 0 || int'(roi_tr) != exp_tr[0] || int'(roi_tc) != exp_tc[0]) begin
      failures++; $display("FAIL roi (%0d,%0d)", roi_tr, roi_tc);
    end
    if (exp_tr.size() != 0) begin void'(exp_tr.pop_front()); void'(exp_tc.pop_front()); end
  end

  task automatic run(input int density);
    automatic logic [WT-1:0] expm [HT];
    automatic int n = 0, cyc = 0;
    for (int t = 0; t < HT; t++) begin
      expm[t] = '0;
      for (int c = 0; c < WT; c++) begin
        map[t][c] = ($urandom % 100) < density;
        if (map[t][c] && n < MAXR) begin
          expm[t][c] = 1'b1; n++; exp_tr.push_back(t); exp_tc.push_back(c);
        end
      end
    end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);
    checks++;
    if (cyc < HT * (WT + 2) - 1 || cyc > HT * (WT + 2) + 1) begin failures++; $display("FAIL %0d clocks", cyc); end
    checks++;
    if (int'(roi_count) != n || exp_tr.size() != 0) begin failures++; $display("FAIL count %0d exp %0d", roi_count, n); end
    for (int t = 0; t < HT; t++) begin
      checks++;
      if (mask[t] != expm[t]) begin failures++; $display("FAIL mask row %0d %b exp %b", t, mask[t], expm[t]); end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(15);
    run(60);
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
