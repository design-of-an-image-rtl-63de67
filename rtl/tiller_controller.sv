// tiller_controller: supervises the tiller unit.
//
// Frames up to 512 pixels wide are cut into tiles of at most 256 x 256:
//   128 x 128 -> one 128 x 128 tile
//   256 x 256 -> one 256 x 256 tile
//   512 x 512 -> 2 x 2 tiles of 256 x 256
//   512 x 768 -> 2 columns x 3 rows of 256 x 256
// Each component (Y, U, V) has two buffered tillers: the "odd" one takes the
// left tile column (tiles 1, 3, 5) and the "even" one the right tile column
// (tiles 2, 4, 6). Every line is split at tile_w: its first part goes to the
// odd tiller, the rest to the even tiller. A grey-scale frame uses only the
// Y tillers, fed from the lane that carries the grey byte.
// 1024-wide frames need a tiling strategy that is not part of this design:
// size_ok is low for them and no pixel is written.
//
// Tiller index t = 2*component + column (0: Y odd, 1: Y even, 2: U odd, ...).
// Writes are registered: one clock from CPB output to tiller write.
//
// Follows the design: tiles of 256 (128 for the smallest frame), the
// tiling per frame size, odd and even tiles going to two tillers per
// component, and one input for grey scale. Own choices: the routing of the
// grey byte, the refusal of 1024-wide frames and the registered write.
module tiller_controller
  import pub_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  frame_size_e             fsize,
  input  logic                    grey,
  input  logic                    frame_start,
  // from the CPB
  input  yuv_t                    in_pix,
  input  logic                    in_valid,
  input  pix_flags_t              in_flags,
  // to the buffered tillers
  output logic [8:0]              tile_w,
  output logic [8:0]              tile_h,
  output logic [NCORES-1:0]       wr_en,
  output logic [NCORES-1:0][7:0]  wr_data,
  output logic [NCORES-1:0]       tiller_used,
  output logic [4:0]              tiles_per_frame,
  output logic                    size_ok
);

  logic [1:0] tiles_across, tiles_down;
  logic [DIM_W-1:0] col;

  always_comb begin
    tiles_across = 2'd1;
    tiles_down   = 2'd1;
    tile_w       = 9'd256;
    tile_h       = 9'd256;
    unique case (fsize)
      FS_128X128: begin tile_w = 9'd128; tile_h = 9'd128; end
      FS_256X256: ;
      FS_512X512: begin tiles_across = 2'd2; tiles_down = 2'd2; end
      FS_512X768: begin tiles_across = 2'd2; tiles_down = 2'd3; end
      default:    ;
    endcase
  end

  assign size_ok = frame_size_tileable(fsize);

  always_comb begin
    for (int c = 0; c < NCOMP; c++)
      for (int k = 0; k < NCOLS; k++)
        tiller_used[NCOLS*c + k] = size_ok && (k < int'(tiles_across)) && (!grey || c == 0);
  end

  assign tiles_per_frame = 5'((grey ? 1 : NCOMP) * tiles_across * tiles_down);

  // Column of the incoming pixel within its line
  wire [DIM_W-1:0] pcol     = in_flags.sol ? '0 : col;
  wire             right    = (pcol >= DIM_W'(tile_w));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col     <= '0;
      wr_en   <= '0;
      wr_data <= '0;
    end else begin
      wr_en <= '0;
      if (frame_start) col <= '0;
      if (in_valid) begin
        col <= in_flags.eol ? '0 : pcol + 1'b1;
        for (int c = 0; c < NCOMP; c++) begin
          for (int k = 0; k < NCOLS; k++) begin
            wr_en[NCOLS*c + k] <= size_ok && tiller_used[NCOLS*c + k] &&
                                  (right == (k == 1));
          end
        end
        wr_data[0] <= grey ? in_pix.v : in_pix.y;
        wr_data[1] <= grey ? in_pix.v : in_pix.y;
        wr_data[2] <= in_pix.u;
        wr_data[3] <= in_pix.u;
        wr_data[4] <= in_pix.v;
        wr_data[5] <= in_pix.v;
      end
    end
  end

endmodule
