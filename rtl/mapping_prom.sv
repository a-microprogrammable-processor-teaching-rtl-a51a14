// mapping_prom: opcode to micro-address look-up table.
//
// Translates the five low bits of the opcode byte in the instruction
// register into the 8-bit micro-address of the first micro-instruction of
// that macro-instruction. The sequencer uses it on a JMAP instruction; the
// output is enabled onto the sequencer's D input by map_n (active low).
// Combinational. The table is a parameter; by default opcode 01h starts at
// 19h (LOAD R,imm), opcode 02h at 0Bh (ADD) and every other opcode at 00h.
module mapping_prom
  import mpp_pkg::*;
#(
  parameter logic [7:0] TABLE [32] = default_map()
) (
  input  logic [4:0] opcode,
  output logic [7:0] addr
);

  assign addr = TABLE[opcode];

endmodule
