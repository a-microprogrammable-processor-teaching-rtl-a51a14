// mar_reg: memory address register.
//
// 8-bit register loaded from the bus at the rising clock edge when load is
// set (ADR_LD field); its five low bits address the macro-memory, the upper
// three are kept but unused. Synchronous active-high reset to zero.
module mar_reg (
  input  logic       clk,
  input  logic       rst,
  input  logic       load,
  input  logic [7:0] bus,
  output logic [7:0] q
);

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= bus;
  end

endmodule
