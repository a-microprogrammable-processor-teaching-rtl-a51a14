// data_bus: the shared 8-bit address/data bus.
//
// In the original the bus is a three-state line with one output enable per
// source; here it is a multiplexer with the same enables: the ALU output Y
// (alu_oe), the memory buffer register (mbr_oe) and the ALU constant field
// of the micro-instruction (const_oe). At most one enable may be set in a
// micro-cycle (checked by an assertion outside reset); with none set the
// bus reads zero.
// The ALU's direct data input is fed from ext, the bus as driven by the
// sources other than the ALU, so that the ALU never reads its own output
// (a micro-instruction that sets alu_oe and also uses D reads zero there).
// Combinational.
module data_bus (
  input  logic       clk,
  input  logic       rst,
  input  logic       alu_oe,
  input  logic [7:0] alu_y,
  input  logic       mbr_oe,
  input  logic [7:0] mbr,
  input  logic       const_oe,
  input  logic [7:0] alu_const,
  output logic [7:0] bus,
  output logic [7:0] ext
);

  always_comb begin
    ext = '0;
    if (mbr_oe)   ext = mbr;
    if (const_oe) ext = alu_const;
  end

  assign bus = alu_oe ? alu_y : ext;

  // Only one source may drive the bus.
  a_one_driver: assert property (@(posedge clk) disable iff (rst) $onehot0({alu_oe, mbr_oe, const_oe}))
    else $error("bus: more than one source enabled");

endmodule
