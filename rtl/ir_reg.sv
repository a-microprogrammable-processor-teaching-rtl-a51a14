// ir_reg: the 16-bit instruction register.
//
// Two byte-wide halves loaded separately from the bus at the rising clock
// edge: the most significant byte holds the opcode (five low bits used,
// sent to the mapping PROM) and the least significant byte the operand,
// whose nibbles address scratch pad registers A (bits 7:4) and B (bits 3:0).
// Synchronous active-high reset to zero.
module ir_reg (
  input  logic       clk,
  input  logic       rst,
  input  logic       msb_ld,
  input  logic       lsb_ld,
  input  logic [7:0] bus,
  output logic [7:0] opcode_byte,
  output logic [7:0] operand_byte
);

  always_ff @(posedge clk) begin
    if (rst) begin
      opcode_byte  <= '0;
      operand_byte <= '0;
    end else begin
      if (msb_ld) opcode_byte  <= bus;
      if (lsb_ld) operand_byte <= bus;
    end
  end

endmodule
