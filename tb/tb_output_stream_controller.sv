// tb_output_stream_controller: six core models each offer code streams of
// random length (bytes tagged with core and tile number) with random gaps,
// into a 64-byte output memory so that it fills and the cores are held off.
// A WI model reads bytes at random times. The testbench checks that every
// tile's bytes arrive contiguously and in order, that every core is served,
// that the memory filling up really stalls the cores, and that frame_stored
// rises after the expected number of tiles.
//
// The expected values are worked out in the testbench itself, from the
// rules described for the block, independently of the RTL.
module tb_output_stream_controller;
  import pub_pkg::*;

  localparam int AW = 6;
  localparam int TILES_PER_CORE = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                   frame_start;
  logic [4:0]             tiles_expected;
  logic [NCORES-1:0][7:0] cs_data;
  logic [NCORES-1:0]      cs_valid, cs_last, cs_ready;
  logic                   mem_we, mem_re;
  logic [AW-1:0]          mem_waddr, mem_raddr;
  logic [7:0]             mem_wdata, mem_rdata;
  logic                   rd_req, rd_valid, frame_stored;
  logic [7:0]             rd_data;
  logic [AW:0]            bytes_avail;

  output_stream_controller #(.AW(AW)) dut (.*);
  ext_mem_model #(.AW(AW)) u_mem (.clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
                                  .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata));

  int checks = 0, failures = 0, full_stalls = 0;
  int len [NCORES][TILES_PER_CORE];
  int tile_idx [NCORES], byte_idx [NCORES];
  int served [NCORES];

  // core models: byte = {core[2:0], tile[1:0], index[2:0]} pattern
  function automatic logic [7:0] pat(int core, int tile, int idx);
    return {3'(core), 2'(tile), 3'(idx)};
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < NCORES; c++) begin
        if (cs_valid[c] && cs_ready[c]) begin
          if (byte_idx[c] == len[c][tile_idx[c]] - 1) begin
            byte_idx[c] = 0; tile_idx[c]++;
          end else byte_idx[c]++;
        end
        if (cs_valid[c] && !cs_ready[c] && bytes_avail[AW]) full_stalls++;
      end
    end
  end
  always @(negedge clk) begin
    for (int c = 0; c < NCORES; c++) begin
      if (tile_idx[c] < TILES_PER_CORE && (cs_valid[c] || $urandom_range(3) == 0)) begin
        cs_valid[c] = 1;
        cs_data[c]  = pat(c, tile_idx[c], byte_idx[c]);
        cs_last[c]  = (byte_idx[c] == len[c][tile_idx[c]] - 1);
      end else begin
        cs_valid[c] = 0; cs_last[c] = 0;
      end
    end
    rd_req = (bytes_avail != 0) && ($urandom_range(4) == 0);
  end

  // WI side: parse the read bytes back into tiles
  int cur_core = -1, cur_tile = 0, cur_idx = 0, tiles_read = 0;
  int next_tile [NCORES];
  always @(posedge clk) begin
    if (rst_n && rd_valid) begin
      int c, t, i;
      c = int'(rd_data[7:5]); t = int'(rd_data[4:3]); i = int'(rd_data[2:0]);
      checks++;
      if (cur_core < 0) begin
        // a tile stream must start at its first byte, tiles of a core in order
        if (i != 0 || t != next_tile[c]) begin
          failures++; $display("tile stream start wrong: core %0d tile %0d byte %0d", c, t, i);
        end
        cur_core = c; cur_tile = t; cur_idx = 0;
      end else if (c != cur_core || t != cur_tile || i != ((cur_idx + 1) % 8)) begin
        failures++; $display("interleaved or reordered byte %h", rd_data);
      end else cur_idx++;
      if (cur_core >= 0 && cur_idx == len[cur_core][cur_tile] - 1) begin
        served[cur_core]++; next_tile[cur_core]++; tiles_read++; cur_core = -1;
      end
    end
  end

  initial begin
    for (int c = 0; c < NCORES; c++) begin
      tile_idx[c] = 0; byte_idx[c] = 0; served[c] = 0; next_tile[c] = 0;
      for (int t = 0; t < TILES_PER_CORE; t++) len[c][t] = $urandom_range(1, 20);
    end
    cs_valid = '0; cs_last = '0; cs_data = '0; rd_req = 0; frame_start = 0;
    tiles_expected = 5'(NCORES * TILES_PER_CORE);
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk) frame_start = 1; @(negedge clk) frame_start = 0;
    while (tiles_read < NCORES * TILES_PER_CORE) @(posedge clk);
    repeat (5) @(posedge clk);
    checks++; if (!frame_stored) begin failures++; $display("frame_stored not set"); end
    checks++; if (bytes_avail != 0) begin failures++; $display("bytes left over"); end
    for (int c = 0; c < NCORES; c++) begin
      checks++;
      if (served[c] != TILES_PER_CORE) begin failures++; $display("core %0d served %0d", c, served[c]); end
    end
    checks++; if (full_stalls == 0) begin failures++; $display("memory never filled"); end
    @(negedge clk) frame_start = 1; @(negedge clk) frame_start = 0;
    checks++; if (frame_stored) begin failures++; $display("frame_stored not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
