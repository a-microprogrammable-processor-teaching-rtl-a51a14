// mpp_top: the microprogrammable processor, complete.
//
// An 8-bit Am2900-style machine built for teaching microprogramming. The
// sequencer (ccu_2910) addresses the micro-memory; the 70-bit word read
// there is captured by the pipeline register at each rising clock edge and
// controls everything for one micro-cycle, while the sequencer already
// computes the next micro-address. The data path is an 8-bit bus shared by
// the ALU output, the memory buffer register (MBR) and the micro-
// instruction's ALU constant; it feeds the memory address register (MAR),
// the MBR, both halves of the instruction register (IR) and the ALU's direct
// data input. Scratch pad register 0 of the ALU is the macro program
// counter. The opcode in the IR goes through the mapping PROM to the
// sequencer, which jumps there on JMAP. The status unit (status_2904)
// stores the ALU flags and produces the branch condition. A display unit
// shows one of many internal values on eight LEDs, chosen by six switches.
//
// Ports: clk and rst (synchronous, active high) are the two reserved
// inputs; sel[5:0] are the display switches; leds[7:0] the outputs. After
// rst is released, five micro-cycles run the RESET microroutine at
// micro-addresses 0-4 (PC, Q, flags and MAR cleared) and the sixth rising
// edge brings the first micro-instruction of FETCHINSTR (address 5) into
// the pipeline. A two-byte macro-instruction then takes four micro-cycles
// of fetch plus its own micro-cycles.
//
// Parameters: MICROPROGRAM, MAP and MACRO_PROGRAM are the three tables the
// user writes; their defaults (from mpp_pkg) run a three-instruction example
// that leaves 7 in register 8.
module mpp_top
  import mpp_pkg::*;
#(
  parameter logic [UWIDTH-1:0] MICROPROGRAM  [UDEPTH]   = default_microprogram(),
  parameter logic [UAW-1:0]    MAP           [NOPCODES] = default_map(),
  parameter logic [DW-1:0]     MACRO_PROGRAM [MDEPTH]   = default_macro_program()
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] sel,
  output logic [7:0] leds
);

  uinstr_t            pl;          // pipeline: current micro-instruction
  logic [UWIDTH-1:0]  uword;
  logic [UAW-1:0]     useq_y;
  logic [UAW-1:0]     useq_d;
  logic [UAW-1:0]     map_addr;
  logic               pl_n, map_n, vect_n, full_n;
  logic [UAW-1:0]     upc, count;
  logic               cc_n;
  flags_t             alu_flags, uflags, mflags;
  logic [7:0]         bus, bus_ext;
  logic [7:0]         alu_y, q;
  logic [7:0]         mar, mbr, mem_rdata;
  logic [7:0]         ir_msb, ir_lsb;
  logic [3:0]         dbg_reg_addr;
  logic [7:0]         dbg_reg_data;
  logic [4:0]         dbg_mem_addr;
  logic [7:0]         dbg_mem_data;

  // Sequencer D input: the branch address field (pl_n, and vect_n since
  // there is no separate vector source) or the mapping PROM (map_n), chosen
  // by the sequencer's output enables. full_n is left for observation.
  assign useq_d = (map_n ? '0 : map_addr) | (pl_n ? '0 : pl.ba) | (vect_n ? '0 : pl.ba);

  ccu_2910 #(.AW(UAW), .DEPTH(STACK_DEPTH)) u_ccu (
    .clk, .rst, .op(pl.nas), .d(useq_d), .cc_n, .y(useq_y),
    .pl_n, .map_n, .vect_n, .full_n, .upc, .count
  );

  micro_memory #(.DEPTH(UDEPTH), .WIDTH(UWIDTH), .PROG(MICROPROGRAM)) u_umem (
    .addr(useq_y), .data(uword)
  );

  pipeline_reg u_pipe (.clk, .rst, .d(uinstr_t'(uword)), .q(pl));

  mapping_prom #(.TABLE(MAP)) u_map (.opcode(ir_msb[4:0]), .addr(map_addr));

  status_2904 u_status (
    .clk, .rst, .alu_flags,
    .flag_src(pl.flag_src), .cond_sel(pl.cond_sel),
    .polarity(pl.polarity), .force_cond(pl.force_cond),
    .cc_n, .uflags, .mflags
  );

  alu_2901 u_alu (
    .clk, .aa(pl.aa), .ab(pl.ab), .useira(pl.useira), .useirb(pl.useirb),
    .ir_operand(ir_lsb), .nop(pl.nop), .src(pl.src), .fn(pl.fn),
    .dst(pl.dst), .cn(pl.carry), .ram_in(pl.ram_in), .q_in(pl.q_in),
    .carry_flag(uflags.c), .d(bus_ext), .y(alu_y), .flags(alu_flags), .q,
    .dbg_addr(dbg_reg_addr), .dbg_data(dbg_reg_data)
  );

  data_bus u_bus (
    .clk, .rst, .alu_oe(pl.bus.alu_oe), .alu_y, .mbr_oe(pl.bus.mbr_oe), .mbr,
    .const_oe(pl.bus.const_oe), .alu_const(pl.alu_const), .bus, .ext(bus_ext)
  );

  mar_reg u_mar (.clk, .rst, .load(pl.bus.adr_ld), .bus, .q(mar));

  macro_memory #(.INIT(MACRO_PROGRAM)) u_mem (
    .clk, .rst, .addr(mar[MAW-1:0]), .write(pl.mem_write), .wdata(mbr),
    .rdata(mem_rdata), .dbg_addr(dbg_mem_addr), .dbg_data(dbg_mem_data)
  );

  mbr_reg u_mbr (
    .clk, .rst, .read(pl.mem_read), .load(pl.bus.mbr_ld), .bus,
    .mem_data(mem_rdata), .q(mbr)
  );

  ir_reg u_ir (
    .clk, .rst, .msb_ld(pl.bus.ir_msb_ld), .lsb_ld(pl.bus.ir_lsb_ld), .bus,
    .opcode_byte(ir_msb), .operand_byte(ir_lsb)
  );

  display_unit u_disp (
    .sel, .reg_addr(dbg_reg_addr), .reg_data(dbg_reg_data),
    .mem_addr(dbg_mem_addr), .mem_data(dbg_mem_data),
    .seq_y(useq_y), .ir_msb, .ir_lsb, .mar, .mbr, .bus, .q,
    .mflags, .uflags, .upc, .count, .leds
  );

endmodule
