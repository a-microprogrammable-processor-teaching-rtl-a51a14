// micro_memory: the micro-program memory, 256 words of 70 bits.
//
// Holds one micro-instruction per micro-address. It is read without a
// clock: the word at the sequencer's address Y appears on the output in the
// same micro-cycle and the pipeline register captures it at the next rising
// edge. The contents are a parameter (a table the user edits to define the
// instruction set); the default is the package's microprogram with the
// RESET, FETCHINSTR, ADD and LOAD R,imm routines. Read-only in hardware.
module micro_memory
  import mpp_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 70,
  parameter logic [WIDTH-1:0] PROG [DEPTH] = default_microprogram()
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [WIDTH-1:0]         data
);

  assign data = PROG[addr];

endmodule
