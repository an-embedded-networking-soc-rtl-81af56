// dpram: dual-port RAM shared by the DMM and one packet processing unit.
//
// One of these sits between the Data Memory Manager and each processing unit:
// the DMM writes packet headers into it and reads modified headers back on
// port A, the processing unit works on the same words through port B, so
// header transfers never cross the shared command bus. Both ports are
// synchronous: a read returns the addressed word on the clock edge after the
// address is presented; a write on the same port returns the old word
// (read-first). Simultaneous writes to one address from both ports leave
// port B's value. The memory-per-processing-unit arrangement is the paper's;
// the width, depth and read-first behaviour are this design's choices.
module dpram #(
  parameter int unsigned WORDS = 512,
  parameter int unsigned DW    = 32,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  // port A
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  // port B
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);
  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
  end
endmodule
