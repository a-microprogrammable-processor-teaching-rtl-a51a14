// mbr_reg: memory buffer register.
//
// Holds the byte read from or to be written to the macro-memory. A read
// requested by the micro-instruction (read = 1) is registered at the rising
// edge that also loads the address register; at the following falling edge
// the MBR captures the memory byte at the new address, so it can be put on
// the bus during the second half of the next micro-cycle and taken by a
// register at its end. Otherwise, when load is set (MBR_LD field), the MBR
// captures the bus at the falling edge of the current micro-cycle, once the
// bus has settled. Synchronous active-high reset to zero.
module mbr_reg (
  input  logic       clk,
  input  logic       rst,
  input  logic       read,      // READ bit of the current micro-instruction
  input  logic       load,      // MBR <- bus
  input  logic [7:0] bus,
  input  logic [7:0] mem_data,
  output logic [7:0] q
);

  logic rd_pending;

  always_ff @(posedge clk) begin
    if (rst) rd_pending <= 1'b0;
    else     rd_pending <= read;
  end

  always_ff @(negedge clk) begin
    if (rst)             q <= '0;
    else if (rd_pending) q <= mem_data;
    else if (load)       q <= bus;
  end

endmodule
