// jp2k_codec_controller: chooses the quantisation table of the JPEG2000
// cores for each frame.
//
// The IP core offers NQT = 5 quantisation tables, from 2x (lossless) to 60x.
// WI gives either a required frame speed or a required compression ratio;
// only one of the two is used at a time (use_ratio selects).
//   - Frame speed: a table k can deliver 'fps' frames per second over the
//     link if  QT_RATIO[k] * LINK_BYTES_PER_S >= raw_frame_bytes * fps,
//     raw_frame_bytes being width x height x components (1 for grey, 3
//     otherwise). The lowest-ratio table that meets it is chosen, for the
//     best image quality at that speed.
//   - Compression ratio: the lowest-ratio table with QT_RATIO[k] >= ratio.
// If no table is enough, the 60x table is used and err_qt is raised.
// The ratios of the three middle tables and the link rate are this design's
// assumptions; the selection rule (lowest ratio that keeps the frame speed)
// and the end points 2x and 60x follow the design. The core memory size
// (tile 256 x 256, precinct 128 x 128, code block 64 x 64) is fixed and so
// does not enter the choice.
//
// The frame speed that the chosen table allows over the link is also worked
// out, floor(QT_RATIO[k] * LINK_BYTES_PER_S / raw_frame_bytes) saturated at
// 255, so that in ratio mode WI learns the speed that follows from the ratio.
// A restoring divider does it, one quotient bit per clock.
//
// Timing: the choice is registered on 'apply' (frame start) and presented to
// the cores with a one-cycle qt_load strobe. fps_est is valid (fps_valid
// high) 40 clocks after the edge that samples apply, until the next apply.
module jp2k_codec_controller
  import pub_pkg::*;
#(
  parameter int unsigned LINK_BYTES_PER_S = 1_000_000,
  parameter int unsigned QT_RATIO [NQT]   = '{2, 5, 10, 20, 60}
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        apply,
  input  frame_size_e fsize,
  input  logic        grey,
  input  logic        use_ratio,
  input  logic [7:0]  frame_speed,  // frames per second
  input  logic [7:0]  comp_ratio,   // required ratio, n:1
  output logic [2:0]  qtable,
  output logic [7:0]  qt_ratio,
  output logic        qt_load,
  output logic        err_qt,
  output logic [7:0]  fps_est,      // frames per second the chosen table allows
  output logic        fps_valid
);

  localparam int unsigned NW = 40;   // dividend width

  logic [23:0] raw_bytes;
  logic [39:0] need;
  logic [2:0]  pick;
  logic        found;

  always_comb begin
    raw_bytes = 24'(frame_width(fsize)) * 24'(frame_height(fsize));
    if (!grey) raw_bytes = raw_bytes * 24'd3;
    need  = 40'(raw_bytes) * 40'(frame_speed);
    pick  = 3'(NQT - 1);
    found = 1'b0;
    for (int k = NQT - 1; k >= 0; k--) begin
      if (use_ratio ? (QT_RATIO[k] >= 32'(comp_ratio))
                    : (40'(QT_RATIO[k]) * 40'(LINK_BYTES_PER_S) >= need)) begin
        pick  = 3'(k);
        found = 1'b1;
      end
    end
  end

  // restoring divider: dividend QT_RATIO[pick] * LINK_BYTES_PER_S, divisor raw_bytes
  logic [NW-1:0] quo;
  logic [23:0]   rem;   // always below den
  logic [23:0]   den;
  logic [5:0]    steps;
  wire  [24:0]   rem_sh = {rem, quo[NW-1]};
  wire           sub_ok = (rem_sh >= {1'b0, den});
  wire  [NW-1:0] quo_nx = {quo[NW-2:0], sub_ok};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      quo       <= '0;
      rem       <= '0;
      den       <= '0;
      steps     <= '0;
      fps_est   <= '0;
      fps_valid <= 1'b0;
    end else if (apply) begin
      quo       <= NW'(QT_RATIO[pick]) * NW'(LINK_BYTES_PER_S);
      rem       <= '0;
      den       <= raw_bytes;
      steps     <= 6'(NW);
      fps_valid <= 1'b0;
    end else if (steps != '0) begin
      quo   <= quo_nx;
      rem   <= 24'(sub_ok ? rem_sh - {1'b0, den} : rem_sh);
      steps <= steps - 1'b1;
      if (steps == 6'd1) begin
        fps_est   <= (quo_nx[NW-1:8] != '0) ? 8'hFF : quo_nx[7:0];
        fps_valid <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qtable   <= '0;
      qt_ratio <= 8'(QT_RATIO[0]);
      qt_load  <= 1'b0;
      err_qt   <= 1'b0;
    end else begin
      qt_load <= apply;
      if (apply) begin
        qtable   <= pick;
        qt_ratio <= 8'(QT_RATIO[pick]);
        err_qt   <= !found;
      end
    end
  end

endmodule
