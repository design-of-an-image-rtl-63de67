// ext_mem_model: behavioural model of the external output memory module.
// One synchronous write port and one synchronous read port; read data
// appears one clock after the read enable and holds until the next read.
// Contents start at zero.
//
// Behavioural stand-in for the external output memory, whose device the
// design does not specify; its port timing is this design's own choice.
module ext_mem_model #(
  parameter int unsigned AW = 20
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata
);
  logic [7:0] mem [2**AW];
  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    rdata = '0;
  end
  always @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
