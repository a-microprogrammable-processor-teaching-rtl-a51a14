// macro_memory: the 32 x 8 macro-program memory.
//
// Holds macro-instructions and data. Only the five low bits of the 8-bit
// memory address register are used. Reads are asynchronous: rdata always
// shows the byte at the address. A write requested by the micro-instruction
// (write = 1) is registered at the rising edge that also loads the address
// register, and the byte from the memory buffer register is written at the
// following falling edge, once the new address is stable. A second read
// port serves the LED display. Initial contents come from a parameter (by
// default a three-instruction example program); they are loaded at
// simulation start and by the FPGA configuration, not by the reset.
module macro_memory
  import mpp_pkg::*;
#(
  parameter logic [7:0] INIT [32] = default_macro_program()
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [4:0] addr,
  input  logic       write,      // WRITE bit of the current micro-instruction
  input  logic [7:0] wdata,      // from the memory buffer register
  output logic [7:0] rdata,
  input  logic [4:0] dbg_addr,
  output logic [7:0] dbg_data
);

  logic [7:0] mem [32];
  logic       wr_pending;

  initial begin
    for (int i = 0; i < 32; i++) mem[i] = INIT[i];
  end

  always_ff @(posedge clk) begin
    if (rst) wr_pending <= 1'b0;
    else     wr_pending <= write;
  end

  always_ff @(negedge clk) begin
    if (wr_pending) mem[addr] <= wdata;
  end

  assign rdata    = mem[addr];
  assign dbg_data = mem[dbg_addr];

endmodule
