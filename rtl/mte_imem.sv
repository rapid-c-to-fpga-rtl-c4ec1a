// Instruction memory of the emulation engine: a synchronous-read RAM.
//
// WORDS x 32 bits, read address presented in IF and instruction returned in
// ID (one-cycle registered read, as an FPGA block RAM). A second port lets
// the host download a program while the engine is held in reset. The
// description gives no memory sizes; WORDS and the separate instruction
// memory are this design's choices.
module mte_imem #(
  parameter int unsigned WORDS = 4096
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output logic [31:0]              rdata,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [31:0]              wdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
