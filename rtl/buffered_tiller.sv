// buffered_tiller: half-tile buffer between the input stream and one
// JPEG2000 core.
//
// A dual-port memory of HALF_ROWS rows by TILE_COLS columns of 8-bit samples
// (128 x 256 = 32 KB by default) is used as a ring of tile rows: the sample
// at row r, column c of the tile stream is stored at {r mod HALF_ROWS, c}.
// Rows arrive one tile-row segment at a time from the tiller controller; the
// tiles of one tile column follow each other, so row r of the stream is row
// r mod tile_h of tile r / tile_h.
//
// Reading a tile starts once half of it has been written (tile_h/2 rows,
// 128 for a 256 x 256 tile). From then on the core is fed one sample per
// clock while the second half is written in parallel through the other
// port; if the reader catches up with the writer it waits (a stall). A write
// goes to memory only into a row slot the reader has already emptied; a
// sample arriving while the buffer is full is dropped and sets 'overflow'
// until the next frame_start, since the camera stream cannot be held back.
// A dropped sample still takes its place in the stream (the write position
// advances), so every tile still reaches the core with its full sample count
// and the frame completes; the samples at dropped positions are whatever the
// row slot held.
//
// Output handshake (the core's own is not known here): out_valid/out_ready,
// one sample per clock, with out_sot/out_eot on the first and last sample of
// each tile. Memory read latency is one clock; the output register holds its
// sample while out_ready is low.
//
// frame_start clears the counters; it is only to be given while the
// tiller is idle.
//
// Follows the design: a dual-port 128 x 256 byte half-tile memory per
// tiller, feeding starts once half a tile is written, one pixel per clock
// to the core. Own choices: the ring of rows, the handshake and the
// overflow handling.
module buffered_tiller #(
  parameter int unsigned HALF_ROWS = 128,
  parameter int unsigned TILE_COLS = 256,
  parameter int unsigned CNT_W     = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_start,
  input  logic [8:0]  tile_w,      // columns of a tile, <= TILE_COLS
  input  logic [8:0]  tile_h,      // rows of a tile, <= 2*HALF_ROWS
  // write side, from the tiller controller
  input  logic        wr_en,
  input  logic [7:0]  wr_data,
  // read side, to the JPEG2000 core
  output logic [7:0]  out_data,
  output logic        out_valid,
  output logic        out_sot,
  output logic        out_eot,
  input  logic        out_ready,
  // status
  output logic        overflow,
  output logic        idle,
  output logic        starved      // inside a tile, waiting for the writer
);

  localparam int unsigned RW = $clog2(HALF_ROWS);
  localparam int unsigned CW = $clog2(TILE_COLS);

  logic [CNT_W-1:0] wr_cnt, rd_cnt;
  logic [RW-1:0]    wr_slot, rd_slot;
  logic [CW:0]      wr_col, rd_col;
  logic [17:0]      rd_in_tile;

  wire [17:0]      tile_pix = tile_w * tile_h;
  wire [CNT_W-1:0] capacity = CNT_W'(HALF_ROWS) * CNT_W'(tile_w);
  wire [CNT_W-1:0] occ      = wr_cnt - rd_cnt;

  wire full  = (occ >= capacity);
  wire at_tile_start = (rd_in_tile == '0);
  wire avail = at_tile_start ? (occ >= CNT_W'(tile_pix[17:1])) && (occ != '0)
                             : (occ != '0);
  wire do_wr = wr_en && !full;   // memory write; the position advances on wr_en
  wire do_rd = avail && (!out_valid || out_ready);

  dp_ram #(.DW(8), .AW(RW + CW)) u_mem (
    .clk,
    .we   (do_wr),
    .waddr({wr_slot, wr_col[CW-1:0]}),
    .wdata(wr_data),
    .re   (do_rd),
    .raddr({rd_slot, rd_col[CW-1:0]}),
    .rdata(out_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_cnt     <= '0;
      rd_cnt     <= '0;
      wr_slot    <= '0;
      rd_slot    <= '0;
      wr_col     <= '0;
      rd_col     <= '0;
      rd_in_tile <= '0;
      out_valid  <= 1'b0;
      out_sot    <= 1'b0;
      out_eot    <= 1'b0;
      overflow   <= 1'b0;
    end else if (frame_start) begin
      wr_cnt     <= '0;
      rd_cnt     <= '0;
      wr_slot    <= '0;
      rd_slot    <= '0;
      wr_col     <= '0;
      rd_col     <= '0;
      rd_in_tile <= '0;
      out_valid  <= 1'b0;
      overflow   <= 1'b0;
    end else begin
      if (wr_en && full) overflow <= 1'b1;
      if (wr_en) begin
        wr_cnt <= wr_cnt + 1'b1;
        if (wr_col == (CW+1)'(tile_w) - 1'b1) begin
          wr_col  <= '0;
          wr_slot <= wr_slot + 1'b1;
        end else begin
          wr_col <= wr_col + 1'b1;
        end
      end
      if (do_rd) begin
        rd_cnt  <= rd_cnt + 1'b1;
        out_sot <= at_tile_start;
        out_eot <= (rd_in_tile == tile_pix - 1'b1);
        rd_in_tile <= (rd_in_tile == tile_pix - 1'b1) ? '0 : rd_in_tile + 1'b1;
        if (rd_col == (CW+1)'(tile_w) - 1'b1) begin
          rd_col  <= '0;
          rd_slot <= rd_slot + 1'b1;
        end else begin
          rd_col <= rd_col + 1'b1;
        end
      end
      if (do_rd)          out_valid <= 1'b1;
      else if (out_ready) out_valid <= 1'b0;
    end
  end

  assign idle    = (occ == '0) && !out_valid && at_tile_start;
  assign starved = !at_tile_start && (occ == '0);

  // A sample is never emitted before it was written
  assert property (@(posedge clk) disable iff (!rst_n) do_rd |-> (occ != '0));
  assert property (@(posedge clk) disable iff (!rst_n)
                   (tile_w <= 9'(TILE_COLS)) && (tile_h <= 9'(2 * HALF_ROWS)));

endmodule
