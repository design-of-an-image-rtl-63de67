// jpeg2000_core_model: behavioural stand-in for one JPEG2000 encoder IP
// core, used only by testbenches. It takes tile samples on a valid/ready
// handshake (ready is randomly withdrawn when STALL is set), sums each tile,
// and after the tile's last sample offers a four-byte "code stream":
// {ID, tile number, sum[15:8], sum[7:0]}, the last byte flagged. A real
// core's encoding is not modelled.
//
// Behavioural stand-in for the JPEG2000 encoder IP core, which is not part
// of this RTL. Its handshake and its 4-byte code stream are this design's
// own choices, made only to let the tests trace every tile.
module jpeg2000_core_model #(
  parameter int unsigned ID    = 0,
  parameter bit          STALL = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       frame_start,
  input  logic [7:0] pix,
  input  logic       pix_valid,
  input  logic       sot,
  input  logic       eot,
  output logic       pix_ready,
  output logic [7:0] cs_data,
  output logic       cs_valid,
  output logic       cs_last,
  input  logic       cs_ready
);
  logic [15:0] sum;
  logic [7:0]  tile_no;
  logic [7:0]  q[$];

  initial begin pix_ready = 0; cs_valid = 0; cs_data = 0; cs_last = 0; sum = 0; tile_no = 0; end

  always @(negedge clk) begin
    pix_ready = STALL ? ($urandom_range(7) != 0) : 1'b1;
    if (q.size() != 0) begin
      cs_valid = 1; cs_data = q[0]; cs_last = (q.size() % 4 == 1);
    end else begin
      cs_valid = 0; cs_last = 0;
    end
  end

  always @(posedge clk) begin
    if (!rst_n || frame_start) begin
      tile_no = 0;
    end else begin
      if (cs_valid && cs_ready) void'(q.pop_front());
      if (pix_valid && pix_ready) begin
        logic [15:0] s;
        s = sot ? 16'(pix) : sum + 16'(pix);
        sum = s;
        if (eot) begin
          q.push_back(8'(ID)); q.push_back(tile_no); q.push_back(s[15:8]); q.push_back(s[7:0]);
          tile_no++;
        end
      end
    end
  end
endmodule
