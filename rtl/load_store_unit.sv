// load_store_unit: byte, halfword and word formatting for loads and stores.
//
// Memory is organised in 32-bit words, little endian: the byte at the
// lowest address is bits 7:0 of the word. For a load the unit picks the
// byte (lane addr_lo), halfword (lane addr_lo[1]) or word out of mem_word
// and extends it to 32 bits: with zeros for LBU/LHU, by replicating its top
// bit for LB/LH. For a store it returns the word to write back: the
// addressed word with the low byte (SB) or halfword (SH) of store_data put
// into its lane, or store_data itself (SW). Storing needs no sign extension.
//
// Because the memory port has a single write strobe and no byte enables,
// the CPU stores a byte or halfword by writing back this merged word. Low
// address bits below the access size are ignored (no misalignment trap);
// both choices are this design's. Purely combinational.
module load_store_unit
  import rv32i_pkg::*;
(
  input  logic [1:0]  addr_lo,
  input  logic [2:0]  funct3,
  input  logic [31:0] mem_word,
  input  logic [31:0] store_data,
  output logic [31:0] load_data,
  output logic [31:0] store_word
);

  logic [7:0]  byte_sel;
  logic [15:0] half_sel;

  always_comb begin
    byte_sel = mem_word[8*addr_lo +: 8];
    half_sel = mem_word[16*addr_lo[1] +: 16];
    unique case (funct3)
      F3_B:    load_data = {{24{byte_sel[7]}}, byte_sel};
      F3_H:    load_data = {{16{half_sel[15]}}, half_sel};
      F3_BU:   load_data = {24'b0, byte_sel};
      F3_HU:   load_data = {16'b0, half_sel};
      default: load_data = mem_word;
    endcase
  end

  always_comb begin
    store_word = mem_word;
    unique case (funct3[1:0])
      2'b00:   store_word[8*addr_lo +: 8]      = store_data[7:0];
      2'b01:   store_word[16*addr_lo[1] +: 16] = store_data[15:0];
      default: store_word                      = store_data;
    endcase
  end

endmodule
