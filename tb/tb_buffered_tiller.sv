// tb_buffered_tiller: exercises one buffered tiller at a reduced size
// (8-row x 16-column half-tile memory, so 16 x 16 tiles).
//   1. A frame of two 16 x 16 tiles is written with random gaps while the
//      reader takes samples with random ready: the order of the samples,
//      the tile start/end flags and the half-tile start rule are checked,
//      and the reader must wait for the writer at least once.
//   2. Half a tile is written with the core idle, then the core reads: the
//      samples must come at one per clock.
//   3. The core stalls while half a tile and 4 more samples are written: the
//      overflow flag must rise. The core then resumes and the rest of the tile
//      is written: the whole tile must still be delivered with its sot/eot,
//      with correct data everywhere except at the 4 dropped positions, and a
//      new frame_start must clear the flag.
//
// The expected values are worked out in the testbench itself, from the
// rules described for the block, independently of the RTL.
module tb_buffered_tiller;
  localparam int HR = 8, TC = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       frame_start;
  logic [8:0] tile_w, tile_h;
  logic       wr_en;
  logic [7:0] wr_data;
  logic [7:0] out_data;
  logic       out_valid, out_sot, out_eot, out_ready;
  logic       overflow, idle, starved;

  buffered_tiller #(.HALF_ROWS(HR), .TILE_COLS(TC)) dut (.*);

  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_starved = 0, gap_max = 0, last_rd_cyc = 0, cyc = 0;
  bit rand_ready = 1, measure = 0;
  int drop_lo = -1, drop_hi = -1;   // sample positions dropped on overflow

  always @(posedge clk) begin
    cyc++;
    if (rst_n && starved) n_starved++;
    if (rst_n && wr_en) n_wr++;
    if (rst_n && out_valid && out_ready) begin
      int pos;
      pos = n_rd % (16 * 16);
      checks++;
      if ((out_data !== 8'(n_rd * 7 + 3) && !(n_rd >= drop_lo && n_rd < drop_hi)) || out_sot !== (pos == 0) || out_eot !== (pos == 255)) begin
        failures++;
        $display("sample %0d: got %h sot %b eot %b", n_rd, out_data, out_sot, out_eot);
      end
      if (pos == 0) begin
        // the tile must be at least half written when its first sample leaves
        checks++;
        if (n_wr < n_rd + 128) begin failures++; $display("tile started early (%0d written)", n_wr); end
      end
      if (measure && n_rd > 0 && cyc - last_rd_cyc > gap_max) gap_max = cyc - last_rd_cyc;
      last_rd_cyc = cyc;
      n_rd++;
    end
  end

  always @(negedge clk) out_ready = rand_ready ? ($urandom_range(3) != 0) : out_ready;

  task automatic write_n(input int n, input bit gaps);
    for (int k = 0; k < n; k++) begin
      @(negedge clk); wr_en = 1; wr_data = 8'(n_wr * 7 + 3);
      @(negedge clk); wr_en = 0;
      if (gaps) repeat ($urandom_range(3)) @(negedge clk);
    end
  endtask

  task automatic new_frame();
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    n_wr = 0; n_rd = 0;
  endtask

  initial begin
    wr_en = 0; wr_data = 0; frame_start = 0; tile_w = 16; tile_h = 16; out_ready = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // 1. two tiles
    new_frame();
    write_n(512, 1'b1);
    while (n_rd < 512) @(posedge clk);
    repeat (3) @(posedge clk);
    checks++; if (!idle) begin failures++; $display("not idle after frame"); end
    checks++; if (n_starved == 0) begin failures++; $display("reader never waited for the writer"); end
    checks++; if (overflow) begin failures++; $display("unexpected overflow"); end
    // 2. throughput: half a tile buffered, then read at full rate
    rand_ready = 0; out_ready = 0;
    new_frame();
    write_n(128, 1'b0);
    @(negedge clk); out_ready = 1; measure = 1; gap_max = 0;
    while (n_rd < 128) @(posedge clk);
    measure = 0;
    checks++; if (gap_max != 1) begin failures++; $display("read rate: gap %0d cycles", gap_max); end
    // 3. overflow: core stalled, the writer fills past capacity
    @(negedge clk); out_ready = 0;
    new_frame();
    drop_lo = HR * TC; drop_hi = HR * TC + 4;
    write_n(HR * TC + 4, 1'b0);
    checks++; if (!overflow) begin failures++; $display("overflow not flagged"); end
    @(negedge clk); out_ready = 1;
    repeat (8) @(posedge clk);   // let the reader free some rows first
    write_n(HR * TC - 4, 1'b0);
    while (n_rd < 2 * HR * TC) @(posedge clk);
    repeat (3) @(posedge clk);
    checks++; if (n_rd != 2 * HR * TC || !idle || !overflow) begin
      failures++; $display("after overflow: %0d samples read, idle %b", n_rd, idle);
    end
    new_frame();
    @(posedge clk); #1;
    checks++; if (overflow || !idle) begin failures++; $display("frame_start did not clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
