// lsu_align: memory-stage address checking, store preparation and load
// alignment ("Unaligned address detection / Store preparation" in Memory 1,
// "Load align / sign" in Write Back).
//
// Store side (combinational): from the byte address, access size and the
// register value it produces the 32-bit word lane data and the byte-write
// mask for the word, and flags a misaligned address (trap 0x07). Load side:
// from the 32-bit word read from the cache, the byte offset, size and sign
// flag it extracts the byte/half/word and zero- or sign-extends it.
// SPARC is big-endian: byte offset 0 is bits 31:24 of the word.
//
// Interface: st_* / ld_* ports below; no clock. The split into a store path
// and a load path follows the model's stage diagram; the port format is this
// implementation's own.
module lsu_align
  import sparc_pkg::*;
(
  input  logic [1:0]  addr_lo,
  input  msize_e      size,
  output logic        misaligned,
  input  logic [31:0] st_data,
  output logic [31:0] st_word,
  output logic [3:0]  st_mask,
  input  logic [1:0]  ld_addr_lo,
  input  msize_e      ld_size,
  input  logic        ld_signed,
  input  logic [31:0] ld_word,
  output logic [31:0] ld_data
);
  logic [7:0]  ld_b;
  logic [15:0] ld_h;

  always_comb begin
    unique case (size)
      MSZ_B: begin
        misaligned = 1'b0;
        st_word    = {4{st_data[7:0]}};
        st_mask    = 4'b1000 >> addr_lo;
      end
      MSZ_H: begin
        misaligned = addr_lo[0];
        st_word    = {2{st_data[15:0]}};
        st_mask    = addr_lo[1] ? 4'b0011 : 4'b1100;
      end
      default: begin
        misaligned = (addr_lo != 2'b00);
        st_word    = st_data;
        st_mask    = 4'b1111;
      end
    endcase

    unique case (ld_addr_lo)
      2'd0: ld_b = ld_word[31:24];
      2'd1: ld_b = ld_word[23:16];
      2'd2: ld_b = ld_word[15:8];
      default: ld_b = ld_word[7:0];
    endcase
    ld_h = ld_addr_lo[1] ? ld_word[15:0] : ld_word[31:16];
    unique case (ld_size)
      MSZ_B:   ld_data = ld_signed ? {{24{ld_b[7]}}, ld_b} : {24'd0, ld_b};
      MSZ_H:   ld_data = ld_signed ? {{16{ld_h[15]}}, ld_h} : {16'd0, ld_h};
      default: ld_data = ld_word;
    endcase
  end
endmodule
