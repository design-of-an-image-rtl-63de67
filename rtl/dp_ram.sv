// dp_ram: simple dual-port RAM, one write port and one read port, both
// synchronous to one clock. A read returns the word one clock after its
// enable and the output holds until the next read. A read of the address
// being written in the same cycle returns the old word.
//
// Helper memory for the buffered tiller. The dual-port organisation follows
// the design; the read-during-write behaviour is this design's own choice.
module dp_ram #(
  parameter int unsigned DW = 8,
  parameter int unsigned AW = 15
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
