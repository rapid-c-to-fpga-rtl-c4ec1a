// Data memory of the emulation engine: a byte-writable synchronous RAM.
//
// WORDS x 32 bits with a 4-bit byte enable. The address and write data come
// from the MEM stage; read data is registered and returned in WB, as an FPGA
// block RAM does. Shared by all four threads, which is where the software
// kernel keeps its task queues. WORDS is this design's choice; the
// description gives no memory size.
module mte_dmem #(
  parameter int unsigned WORDS = 16384
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [3:0]               be,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [31:0]              wdata,
  output logic [31:0]              rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      for (int b = 0; b < 4; b++)
        if (we && be[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
      rdata <= mem[addr];
    end
  end
endmodule
