// output_stream_controller: stores the cores' code streams in the output
// memory module and serves them to WI one byte at a time.
//
// Each of the NCORES cores offers its tile code stream as a byte stream
// (cs_valid/cs_ready, cs_last on the final byte of a tile). A round-robin
// arbiter grants one core and keeps the grant until that tile's last byte,
// so every tile's code stream lies contiguously in memory. The external
// memory (2**AW bytes, written and read through a simple synchronous port
// with one clock of read latency) is used as a ring buffer: when it is full
// the granted core is held off through cs_ready.
//
// WI reads with rd_req while bytes_avail is non-zero; rd_valid and rd_data
// follow two clocks later. frame_stored goes high once tiles_expected tile
// streams of the current frame have been written and stays high until the
// next frame_start.
//
// Follows the design: code streams kept in an external memory that WI reads
// a byte at a time. Own choices: the core output handshake, the
// round-robin arbiter, the ring buffer and the memory size.
module output_stream_controller
  import pub_pkg::*;
#(
  parameter int unsigned AW = 20
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   frame_start,
  input  logic [4:0]             tiles_expected,
  // code streams from the cores
  input  logic [NCORES-1:0][7:0] cs_data,
  input  logic [NCORES-1:0]      cs_valid,
  input  logic [NCORES-1:0]      cs_last,
  output logic [NCORES-1:0]      cs_ready,
  // external output memory
  output logic                   mem_we,
  output logic [AW-1:0]          mem_waddr,
  output logic [7:0]             mem_wdata,
  output logic                   mem_re,
  output logic [AW-1:0]          mem_raddr,
  input  logic [7:0]             mem_rdata,
  // WI read port
  input  logic                   rd_req,
  output logic [7:0]             rd_data,
  output logic                   rd_valid,
  output logic [AW:0]            bytes_avail,
  output logic                   frame_stored
);

  localparam int unsigned IW = $clog2(NCORES);

  logic [AW:0]   wr_ptr, rd_ptr;
  logic          locked;
  logic [IW-1:0] gnt, last_gnt;
  logic [4:0]    tiles_done;
  logic          re_d;

  assign bytes_avail = wr_ptr - rd_ptr;
  wire full = bytes_avail[AW];

  // round-robin choice of the next requesting core after last_gnt
  logic [IW-1:0] next;
  logic          any;
  always_comb begin
    next = last_gnt;
    any  = 1'b0;
    for (int i = NCORES; i >= 1; i--) begin
      int unsigned j;
      j = (int'(last_gnt) + i) % NCORES;
      if (cs_valid[j]) begin
        next = IW'(j);
        any  = 1'b1;
      end
    end
  end

  always_comb begin
    cs_ready = '0;
    if (locked && !full) cs_ready[gnt] = 1'b1;
  end

  wire accept = locked && !full && cs_valid[gnt];

  assign mem_we    = accept;
  assign mem_waddr = wr_ptr[AW-1:0];
  assign mem_wdata = cs_data[gnt];
  assign mem_re    = rd_req && (bytes_avail != '0);
  assign mem_raddr = rd_ptr[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr       <= '0;
      rd_ptr       <= '0;
      locked       <= 1'b0;
      gnt          <= '0;
      last_gnt     <= IW'(NCORES - 1);
      tiles_done   <= '0;
      frame_stored <= 1'b0;
      re_d         <= 1'b0;
      rd_valid     <= 1'b0;
      rd_data      <= '0;
    end else begin
      if (!locked && any) begin
        locked <= 1'b1;
        gnt    <= next;
      end
      if (accept) begin
        wr_ptr <= wr_ptr + 1'b1;
        if (cs_last[gnt]) begin
          locked     <= 1'b0;
          last_gnt   <= gnt;
          tiles_done <= tiles_done + 1'b1;
          if (tiles_done + 1'b1 == tiles_expected) frame_stored <= 1'b1;
        end
      end
      if (frame_start) begin
        tiles_done   <= '0;
        frame_stored <= 1'b0;
      end
      if (mem_re) rd_ptr <= rd_ptr + 1'b1;
      re_d     <= mem_re;
      rd_valid <= re_d;
      if (re_d) rd_data <= mem_rdata;
    end
  end

endmodule
