// pipeline_reg: the micro-instruction pipeline register.
//
// Captures the micro-memory output at each rising clock edge and holds it
// for one micro-cycle, so that the data path executes the current
// micro-instruction while the sequencer and micro-memory already fetch the
// next one. Its outputs drive every control field of the processor. On
// reset (synchronous, active high) it holds the reset word, a jump to
// micro-address 0 that changes nothing else, so the first fetch after reset
// reads the RESET microroutine.
module pipeline_reg
  import mpp_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  uinstr_t d,
  output uinstr_t q
);

  always_ff @(posedge clk) begin
    if (rst) q <= ui_reset();
    else     q <= d;
  end

endmodule
