// Load/store alignment of the multithreaded emulation engine.
//
// Store side (MEM stage): places a byte, half-word or word of rt on the right
// byte lanes of the 32-bit data bus and forms the 4-bit byte enable from the
// low address bits. Load side (WB stage): picks the addressed byte or half
// from the returned word and sign- or zero-extends it. Combinational.
// Byte order is little-endian and misaligned accesses are not trapped (the
// low address bits are ignored beyond the access size): both are this
// design's choices, the description does not state them.
module mte_lsu
  import mte_pkg::*;
(
  // store
  input  mem_size_e  st_size,
  input  logic [1:0] st_off,
  input  word_t      st_data,
  output word_t      st_wdata,
  output logic [3:0] st_be,
  // load
  input  mem_size_e  ld_size,
  input  logic       ld_unsigned,
  input  logic [1:0] ld_off,
  input  word_t      ld_rdata,
  output word_t      ld_value
);
  logic [7:0]  ld_byte;
  logic [15:0] ld_half;

  always_comb begin
    unique case (st_size)
      MEM_B:   begin st_wdata = {4{st_data[7:0]}};  st_be = 4'b0001 << st_off; end
      MEM_H:   begin st_wdata = {2{st_data[15:0]}}; st_be = st_off[1] ? 4'b1100 : 4'b0011; end
      default: begin st_wdata = st_data;            st_be = 4'b1111; end
    endcase

    ld_byte = ld_rdata[8*ld_off +: 8];
    ld_half = ld_off[1] ? ld_rdata[31:16] : ld_rdata[15:0];
    unique case (ld_size)
      MEM_B:   ld_value = ld_unsigned ? {24'h0, ld_byte} : {{24{ld_byte[7]}}, ld_byte};
      MEM_H:   ld_value = ld_unsigned ? {16'h0, ld_half} : {{16{ld_half[15]}}, ld_half};
      default: ld_value = ld_rdata;
    endcase
  end
endmodule
