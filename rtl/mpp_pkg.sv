// mpp_pkg: shared types and constants of the microprogrammable processor.
//
// The processor is an 8-bit Am2900-style machine: an Am2910-like sequencer
// (CCU), an Am2901-like ALU slice, an Am2904-like status/condition unit, a
// 70-bit pipelined micro-instruction and a 32-byte macro-memory. This package
// holds the micro-instruction layout (fields A to H, 70 bits in total), the
// encodings of each field, and the default contents of the three
// user-programmable tables: micro-memory, mapping PROM and macro-memory.
//
// Field widths follow the processor's block diagram: 12 bits for the
// sequencer, 8 for the ALU constant, 2 for memory, 11 for the bus, 27 for the
// ALU (including the RAM and Q shift-in selectors) and 10 for the status
// unit. The sequencer, ALU source/function/destination and carry encodings
// are those of the AMD Am2910 and Am2901. The split of the bus, status-unit
// and shift fields into single bits, and their encodings, are this design's
// own choices.
package mpp_pkg;

  localparam int unsigned DW        = 8;    // data path and bus width
  localparam int unsigned UAW       = 8;    // micro-address width
  localparam int unsigned UDEPTH    = 256;  // micro-memory words
  localparam int unsigned UWIDTH    = 70;   // micro-instruction width
  localparam int unsigned MDEPTH    = 32;   // macro-memory bytes
  localparam int unsigned MAW       = 5;    // macro-memory address bits used
  localparam int unsigned NREGS     = 16;   // scratch pad registers
  localparam int unsigned NOPCODES  = 32;   // mapping PROM entries
  localparam int unsigned STACK_DEPTH = 5;  // sequencer return stack

  // Am2910 next-address instructions (field A, NAS).
  typedef enum logic [3:0] {
    NAS_JZ   = 4'h0, NAS_CJS  = 4'h1, NAS_JMAP = 4'h2, NAS_CJP  = 4'h3,
    NAS_PUSH = 4'h4, NAS_JSRP = 4'h5, NAS_CJV  = 4'h6, NAS_JRP  = 4'h7,
    NAS_RFCT = 4'h8, NAS_RPCT = 4'h9, NAS_CRTN = 4'hA, NAS_CJPP = 4'hB,
    NAS_LDCT = 4'hC, NAS_LOOP = 4'hD, NAS_CONT = 4'hE, NAS_TWB  = 4'hF
  } nas_e;

  // Am2901 ALU source operand pairs (R, S).
  typedef enum logic [2:0] {
    SRC_AQ = 3'd0, SRC_AB = 3'd1, SRC_ZQ = 3'd2, SRC_ZB = 3'd3,
    SRC_ZA = 3'd4, SRC_DA = 3'd5, SRC_DQ = 3'd6, SRC_DZ = 3'd7
  } alu_src_e;

  // Am2901 ALU functions: R+S, S-R, R-S, OR, AND, NOT(R) AND S, XOR, XNOR.
  typedef enum logic [2:0] {
    FN_ADD  = 3'd0, FN_SUBR = 3'd1, FN_SUBS = 3'd2, FN_OR   = 3'd3,
    FN_AND  = 3'd4, FN_NOTRS = 3'd5, FN_EXOR = 3'd6, FN_EXNOR = 3'd7
  } alu_fn_e;

  // Am2901 destinations.
  typedef enum logic [2:0] {
    DST_QREG = 3'd0, DST_NOP  = 3'd1, DST_RAMA = 3'd2, DST_RAMF = 3'd3,
    DST_RAMQD = 3'd4, DST_RAMD = 3'd5, DST_RAMQU = 3'd6, DST_RAMU = 3'd7
  } alu_dst_e;

  // Shift-in source for the RAM and Q shifters (fields G and H).
  typedef enum logic [2:0] {
    SHIN_ZERO = 3'd0, SHIN_ONE = 3'd1, SHIN_ROT = 3'd2, SHIN_LINK = 3'd3,
    SHIN_CARRY = 3'd4, SHIN_SIGN = 3'd5
  } shin_e;

  // Branch condition select of the status unit (field F).
  typedef enum logic [2:0] {
    CC_FALSE = 3'd0, CC_UZ = 3'd1, CC_UN = 3'd2, CC_UC = 3'd3,
    CC_UV = 3'd4, CC_MZ = 3'd5, CC_MN = 3'd6, CC_MC = 3'd7
  } cond_sel_e;

  // Flag_Source bits of field F.
  localparam int unsigned FS_ULD  = 0;  // micro flags <- ALU flags
  localparam int unsigned FS_MLD  = 1;  // macro flags <- ALU flags
  localparam int unsigned FS_MFU  = 2;  // macro flags take the micro flags instead
  localparam int unsigned FS_UCLR = 3;  // clear micro flags
  localparam int unsigned FS_MCLR = 4;  // clear macro flags

  typedef struct packed {
    logic z;  // result zero
    logic n;  // sign (bit 7)
    logic c;  // carry out
    logic v;  // two's complement overflow
  } flags_t;

  // Field D: bus sources (onto) and bus destinations (off of).
  typedef struct packed {
    logic       alu_oe;     // ALU Y output onto the bus
    logic       mbr_oe;     // MBR onto the bus
    logic       const_oe;   // ALU constant field onto the bus
    logic       adr_ld;     // MAR <- bus
    logic       mbr_ld;     // MBR <- bus
    logic       ir_msb_ld;  // IR opcode byte <- bus
    logic       ir_lsb_ld;  // IR operand byte <- bus
    logic [3:0] spare;      // reserved, no effect
  } bus_ctl_t;              // 11 bits

  typedef struct packed {
    // A. AM2910 (12)
    nas_e       nas;
    logic [7:0] ba;
    // B. ALUCONST (8)
    logic [7:0] alu_const;
    // C. MEMORY (2)
    logic       mem_read;
    logic       mem_write;
    // D. BUS (11)
    bus_ctl_t   bus;
    // E. AM2901 (21)
    logic [3:0] aa;
    logic [3:0] ab;
    logic       useira;     // A address from IR operand bits 7:4
    logic       useirb;     // B address from IR operand bits 3:0
    logic       nop;        // inhibit every ALU register write
    alu_src_e   src;
    alu_fn_e    fn;
    alu_dst_e   dst;
    logic       carry;
    // F. AM2904 (10)
    cond_sel_e  cond_sel;
    logic       polarity;
    logic       force_cond;
    logic [4:0] flag_src;
    // G. RAM shift (3), H. Q shift (3)
    shin_e      ram_in;
    shin_e      q_in;
  } uinstr_t;

  // A micro-instruction that changes nothing and continues.
  function automatic uinstr_t ui_idle();
    uinstr_t u;
    u = '0;
    u.nas = NAS_CONT;
    u.dst = DST_NOP;
    u.nop = 1'b1;
    return u;
  endfunction

  // Pipeline contents right after reset: jump to micro-address 0.
  function automatic uinstr_t ui_reset();
    uinstr_t u;
    u = ui_idle();
    u.nas = NAS_JZ;
    return u;
  endfunction

  // Conditional jump forced to pass: an unconditional jump to 'target'.
  function automatic uinstr_t ui_jump(input logic [7:0] target);
    uinstr_t u;
    u = ui_idle();
    u.nas = NAS_CJP;
    u.ba = target;
    u.force_cond = 1'b1;
    return u;
  endfunction

  // Micro-addresses of the default microprogram.
  localparam logic [7:0] UA_RESET = 8'h00;
  localparam logic [7:0] UA_FETCH = 8'h05;
  localparam logic [7:0] UA_ADD   = 8'h0B;
  localparam logic [7:0] UA_LOADI = 8'h19;

  // "PC on bus, PC+1 -> PC, bus -> MAR, read macro-memory": R0 is the PC.
  function automatic uinstr_t ui_pc_to_mar_inc();
    uinstr_t u;
    u = ui_idle();
    u.mem_read = 1'b1;
    u.bus.alu_oe = 1'b1;
    u.bus.adr_ld = 1'b1;
    u.nop = 1'b0;
    u.aa = 4'h0;
    u.ab = 4'h0;
    u.src = SRC_ZB;       // R = 0, S = B = PC
    u.fn = FN_ADD;        // F = PC + 1 with carry in set
    u.dst = DST_RAMA;     // PC <- F, Y = A = old PC
    u.carry = 1'b1;
    return u;
  endfunction

  // Default microprogram: RESET (0-4), FETCHINSTR (5-8),
  // ADD USEIRA,USEIRB (0Bh) and LOAD R,imm (19h-1Ah).
  function automatic logic [UWIDTH-1:0] default_microprogram_word(input int unsigned addr);
    uinstr_t u;
    u = ui_idle();
    case (addr)
      // RESET: R0 (PC) <- 0
      32'h00: begin
        u.nop = 1'b0; u.src = SRC_ZA; u.fn = FN_AND; u.dst = DST_RAMF; u.ab = 4'h0;
      end
      // Q <- 0
      32'h01: begin
        u.nop = 1'b0; u.src = SRC_ZA; u.fn = FN_AND; u.dst = DST_QREG;
      end
      // clear both flag registers
      32'h02: begin
        u.flag_src = 5'b1_1000;
      end
      // MAR <- 0 through the ALU constant
      32'h03: begin
        u.bus.const_oe = 1'b1; u.alu_const = 8'h00; u.bus.adr_ld = 1'b1;
      end
      32'h04: u = ui_jump(UA_FETCH);
      // FETCHINSTR
      32'h05: u = ui_pc_to_mar_inc();
      32'h06: begin
        u.bus.mbr_oe = 1'b1; u.bus.ir_msb_ld = 1'b1;
      end
      32'h07: u = ui_pc_to_mar_inc();
      32'h08: begin
        u.nas = NAS_JMAP; u.bus.mbr_oe = 1'b1; u.bus.ir_lsb_ld = 1'b1;
      end
      // ADD USEIRA, USEIRB: R[B] <- R[A] + R[B], flags loaded
      32'h0B: begin
        u = ui_jump(UA_FETCH);
        u.nop = 1'b0; u.useira = 1'b1; u.useirb = 1'b1;
        u.src = SRC_AB; u.fn = FN_ADD; u.dst = DST_RAMF; u.carry = 1'b0;
        u.flag_src = 5'b0_0011;
      end
      // LOAD R, imm: PC to MAR and read, then MBR -> R[B]
      32'h19: u = ui_pc_to_mar_inc();
      32'h1A: begin
        u = ui_jump(UA_FETCH);
        u.bus.mbr_oe = 1'b1;
        u.nop = 1'b0; u.useirb = 1'b1;
        u.src = SRC_DZ; u.fn = FN_ADD; u.dst = DST_RAMF; u.carry = 1'b0;
      end
      default: u = ui_idle();
    endcase
    return u;
  endfunction

  typedef logic [UWIDTH-1:0] uword_array_t [UDEPTH];
  typedef logic [UAW-1:0]    map_array_t   [NOPCODES];
  typedef logic [DW-1:0]     mem_array_t   [MDEPTH];

  function automatic uword_array_t default_microprogram();
    uword_array_t a;
    for (int unsigned i = 0; i < UDEPTH; i++) a[i] = default_microprogram_word(i);
    return a;
  endfunction

  // Mapping PROM: opcode 01h -> LOAD R,imm (19h), 02h -> ADD (0Bh),
  // every other opcode -> 00h (RESET).
  function automatic map_array_t default_map();
    map_array_t a;
    for (int unsigned i = 0; i < NOPCODES; i++) a[i] = UA_RESET;
    a[1] = UA_LOADI;
    a[2] = UA_ADD;
    return a;
  endfunction

  // Macro-program: LOAD R8,3 ; LOAD R9,4 ; ADD R9,R8 (R8 <- R9 + R8 = 7).
  function automatic mem_array_t default_macro_program();
    mem_array_t a;
    for (int unsigned i = 0; i < MDEPTH; i++) a[i] = 8'h00;
    a[0] = 8'h01; a[1] = 8'h08; a[2] = 8'h03;
    a[3] = 8'h01; a[4] = 8'h09; a[5] = 8'h04;
    a[6] = 8'h02; a[7] = 8'h98;
    return a;
  endfunction

endpackage
