// bsipo: Byte Serial Input to Parallel Output converter.
//
// Rebuilds pixels from the byte stream sent by the image capture unit and
// always emits a 24-bit word, laid out as in the BSIPO operation table:
//   RGB 24 bit : {R, G, B}                      one pixel per 3 bytes
//   RGB 12 bit : {0000RRRR, 0000GGGG, 0000BBBB}  two pixels per 3 bytes
//   YUV 4:2:2  : {00000000, Y, U} or {00000000, Y, V}   one pixel per 2 bytes
//   YUV 4:4:4  : {Y, U, V}                      one pixel per 3 bytes
//   grey scale : {16'h0000, GS}                 one pixel per byte
// The first received component sits in the most significant byte.
// How 12-bit pixels are packed into bytes is this design's choice: two pixels
// share three bytes as R0G0, B0R1, G1B1 (high nibble first).
//
// A V-Synch pulse starts a frame and an H-Synch pulse starts a line; both
// realign the byte phase. Column and row counters, against the width and
// height supplied by the input stream controller, tag each pixel with
// start/end of line and frame flags. Bytes are taken only inside a line,
// from its H-Synch to its last pixel. An H-Synch in the middle of a line, or
// bytes outside a line, raise err_line for one cycle (the extra bytes are
// dropped). After the last pixel of the frame bytes are ignored until
// the next V-Synch. A line that ends early is counted as a line but its
// missing pixels are not made up, so the frame then lacks pixels and does
// not complete downstream; recovery from such a frame is not provided.
//
// Timing: a pixel leaves one clock after the byte that completes it.
//
// Follows the design: the five input formats and the 24-bit layouts of
// each. Own choices: the nibble packing, the sync pulse rules and the line
// length checks.
module bsipo
  import pub_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  bsipo_mode_e      mode,
  input  logic [DIM_W-1:0] width,
  input  logic [DIM_W-1:0] height,
  input  logic [7:0]       in_byte,
  input  logic             in_valid,
  input  logic             vsync,
  input  logic             hsync,
  output logic [23:0]      out_pix,
  output logic             out_valid,
  output pix_flags_t       out_flags,
  output logic             err_line
);

  logic             active;
  logic             line_open;   // an H-Synch opened the current line
  logic [1:0]       phase;
  logic [7:0]       b0, b1;
  logic [DIM_W-1:0] col, row;

  // Combinational: does this byte complete a pixel, and which one
  logic        emit;
  logic [23:0] pix;
  logic [1:0]  phase_nxt;

  always_comb begin
    emit      = 1'b0;
    pix       = '0;
    phase_nxt = phase;
    unique case (mode)
      BM_RGB24, BM_YUV444: begin
        emit      = (phase == 2'd2);
        pix       = {b0, b1, in_byte};
        phase_nxt = (phase == 2'd2) ? 2'd0 : phase + 2'd1;
      end
      BM_RGB12: begin
        emit      = (phase != 2'd0);
        pix       = (phase == 2'd1)
                  ? {4'h0, b0[7:4], 4'h0, b0[3:0], 4'h0, in_byte[7:4]}
                  : {4'h0, b1[3:0], 4'h0, in_byte[7:4], 4'h0, in_byte[3:0]};
        phase_nxt = (phase == 2'd2) ? 2'd0 : phase + 2'd1;
      end
      BM_YUV422: begin
        emit      = (phase == 2'd1);
        pix       = {8'h00, b0, in_byte};
        phase_nxt = (phase == 2'd1) ? 2'd0 : 2'd1;
      end
      default: begin // BM_GREY
        emit      = 1'b1;
        pix       = {16'h0000, in_byte};
        phase_nxt = 2'd0;
      end
    endcase
  end

  wire in_line = line_open && (col < width) && (row < height);
  wire is_eol  = (col == width - 1'b1);
  wire is_eof  = is_eol && (row == height - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      line_open <= 1'b0;
      phase     <= 2'd0;
      b0        <= '0;
      b1        <= '0;
      col       <= '0;
      row       <= '0;
      out_pix   <= '0;
      out_valid <= 1'b0;
      out_flags <= '0;
      err_line  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      err_line  <= 1'b0;
      if (vsync) begin
        active    <= 1'b1;
        line_open <= 1'b0;
        phase     <= 2'd0;
        col    <= '0;
        row    <= '0;
      end else if (hsync) begin
        phase     <= 2'd0;
        line_open <= active;
        if (col != '0) begin
          // line ended early: count it and start the next one
          err_line <= active;
          col      <= '0;
          row      <= row + 1'b1;
        end
      end else if (in_valid && active) begin
        if (!in_line) begin
          err_line <= 1'b1;
        end else begin
          phase <= phase_nxt;
          if (phase == 2'd0) b0 <= in_byte;
          if (phase == 2'd1) b1 <= in_byte;
          if (emit) begin
            out_pix       <= pix;
            out_valid     <= 1'b1;
            out_flags.sof <= (col == '0) && (row == '0);
            out_flags.sol <= (col == '0);
            out_flags.eol <= is_eol;
            out_flags.eof <= is_eof;
            if (is_eol) begin
              line_open <= 1'b0;
              col   <= '0;
              row   <= row + 1'b1;
              phase <= 2'd0;
              if (is_eof) active <= 1'b0;
            end else begin
              col <= col + 1'b1;
            end
          end
        end
      end
    end
  end

endmodule
