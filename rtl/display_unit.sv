// display_unit: selects what the eight LEDs show.
//
// Six switch inputs choose the value: sel[5] = 1 shows macro-memory byte
// sel[4:0]; sel[5:4] = 00 shows scratch pad register sel[3:0]; sel[5:4] =
// 01 shows an internal value chosen by sel[3:0]: 0 the sequencer output
// (micro-address being fetched), 1 the opcode byte, 2 the operand byte, 3
// the MAR, 4 the MBR, 5 the bus, 6 the Q register, 7 the flags {macro
// Z N C V, micro Z N C V}, 8 the micro-PC, 9 the loop counter, others zero.
// The register and memory addresses go out on reg_addr and mem_addr and
// their data comes back through read ports of the ALU and the memory. The
// encoding is this design's own. Combinational.
module display_unit
  import mpp_pkg::*;
(
  input  logic [5:0] sel,
  output logic [3:0] reg_addr,
  input  logic [7:0] reg_data,
  output logic [4:0] mem_addr,
  input  logic [7:0] mem_data,
  input  logic [7:0] seq_y,
  input  logic [7:0] ir_msb,
  input  logic [7:0] ir_lsb,
  input  logic [7:0] mar,
  input  logic [7:0] mbr,
  input  logic [7:0] bus,
  input  logic [7:0] q,
  input  flags_t     mflags,
  input  flags_t     uflags,
  input  logic [7:0] upc,
  input  logic [7:0] count,
  output logic [7:0] leds
);

  assign reg_addr = sel[3:0];
  assign mem_addr = sel[4:0];

  always_comb begin
    if (sel[5]) leds = mem_data;
    else if (!sel[4]) leds = reg_data;
    else begin
      unique case (sel[3:0])
        4'd0: leds = seq_y;
        4'd1: leds = ir_msb;
        4'd2: leds = ir_lsb;
        4'd3: leds = mar;
        4'd4: leds = mbr;
        4'd5: leds = bus;
        4'd6: leds = q;
        4'd7: leds = {mflags, uflags};
        4'd8: leds = upc;
        4'd9: leds = count;
        default: leds = '0;
      endcase
    end
  end

endmodule
