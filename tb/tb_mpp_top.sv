// tb_mpp_top: end-to-end test of the processor with a larger instruction set.
//
// Adds macro-instructions to the default ones by giving the processor its
// own microprogram, mapping table and macro-program:
//   03 SHL4 Rb      Rb <- Rb * 16, sequencer loop counter (LDCT, RPCT)
//   04 STORE Rb,a   mem[a] <- Rb (macro-memory write)
//   05 LOADM Rb,a   Rb <- mem[a]
//   06 DEC Rb       Rb <- Rb - 1, micro and macro flags loaded
//   07 JNZ a        PC <- a if the macro Z flag is clear (polarity, macro flag)
//   08 INC2 Rb      Rb <- Rb + 2 by calling a microsubroutine twice (CJS, CRTN)
//   09 DSHL Rb      Q <- Rb, then 16-bit left shift of Rb:Q (RAM and Q
//                   shifters linked), then R15 <- Q
//   0A ABS Rb       Rb <- |Rb|, micro N flag tested by a conditional jump
//   0B HALT         micro-level endless jump
// The program sums 5+4+3+2+1 in a loop, shifts, stores, reloads, shifts
// double, takes the absolute value and increments. Final values and the
// cycle on which HALT is reached (149 rising edges after reset, counted by
// hand from the microprogram) are checked, and each mechanism is counted.
module tb_mpp_top;
  import mpp_pkg::*;

  function automatic uinstr_t alu_b(input alu_src_e src, input alu_fn_e fn,
                                    input alu_dst_e dst, input logic cn);
    uinstr_t u;
    u = ui_idle();
    u.nop = 1'b0; u.useirb = 1'b1;
    u.src = src; u.fn = fn; u.dst = dst; u.carry = cn;
    return u;
  endfunction

  function automatic uinstr_t with_jump(input uinstr_t u0, input logic [7:0] t);
    uinstr_t u;
    u = u0;
    u.nas = NAS_CJP; u.ba = t; u.force_cond = 1'b1;
    return u;
  endfunction

  function automatic uword_array_t build_prog();
    uword_array_t p;
    uinstr_t u;
    p = default_microprogram();
    // SHL4
    u = ui_idle(); u.nas = NAS_LDCT; u.ba = 8'd3; p[8'h20] = u;
    u = alu_b(SRC_ZB, FN_ADD, DST_RAMU, 1'b0); u.ram_in = SHIN_ZERO;
    u.nas = NAS_RPCT; u.ba = 8'h21; p[8'h21] = u;
    p[8'h22] = ui_jump(UA_FETCH);
    // STORE
    p[8'h24] = ui_pc_to_mar_inc();
    u = ui_idle(); u.bus.mbr_oe = 1'b1; u.bus.adr_ld = 1'b1; p[8'h25] = u;
    u = alu_b(SRC_ZB, FN_OR, DST_NOP, 1'b0); u.nop = 1'b1;
    u.bus.alu_oe = 1'b1; u.bus.mbr_ld = 1'b1; u.mem_write = 1'b1;
    p[8'h26] = with_jump(u, UA_FETCH);
    // LOADM
    p[8'h28] = ui_pc_to_mar_inc();
    u = ui_idle(); u.bus.mbr_oe = 1'b1; u.bus.adr_ld = 1'b1; u.mem_read = 1'b1; p[8'h29] = u;
    u = alu_b(SRC_DZ, FN_ADD, DST_RAMF, 1'b0); u.bus.mbr_oe = 1'b1;
    p[8'h2A] = with_jump(u, UA_FETCH);
    // DEC
    u = alu_b(SRC_ZB, FN_SUBR, DST_RAMF, 1'b0); u.flag_src = 5'b0_0011;
    p[8'h2C] = with_jump(u, UA_FETCH);
    // JNZ
    u = ui_pc_to_mar_inc(); u.nas = NAS_CJP; u.ba = 8'h32;
    u.cond_sel = CC_MZ; u.polarity = 1'b1; p[8'h30] = u;
    p[8'h31] = ui_jump(UA_FETCH);
    u = ui_idle(); u.nop = 1'b0; u.ab = 4'h0; u.src = SRC_DZ; u.fn = FN_ADD;
    u.dst = DST_RAMF; u.bus.mbr_oe = 1'b1; p[8'h32] = with_jump(u, UA_FETCH);
    // DSHL
    p[8'h34] = alu_b(SRC_ZB, FN_OR, DST_QREG, 1'b0);
    u = alu_b(SRC_ZB, FN_ADD, DST_RAMQU, 1'b0); u.ram_in = SHIN_LINK; u.q_in = SHIN_ZERO;
    p[8'h35] = u;
    u = ui_idle(); u.nop = 1'b0; u.ab = 4'hF; u.src = SRC_ZQ; u.fn = FN_OR; u.dst = DST_RAMF;
    p[8'h36] = with_jump(u, UA_FETCH);
    // ABS
    u = alu_b(SRC_ZB, FN_OR, DST_NOP, 1'b0); u.flag_src = 5'b0_0001; p[8'h38] = u;
    u = ui_idle(); u.nas = NAS_CJP; u.ba = 8'h3B; u.cond_sel = CC_UN; p[8'h39] = u;
    p[8'h3A] = ui_jump(UA_FETCH);
    u = alu_b(SRC_ZB, FN_SUBS, DST_RAMF, 1'b1); p[8'h3B] = with_jump(u, UA_FETCH);
    // INC2 and its subroutine
    u = ui_idle(); u.nas = NAS_CJS; u.ba = 8'h40; u.force_cond = 1'b1;
    p[8'h3C] = u; p[8'h3D] = u;
    p[8'h3E] = ui_jump(UA_FETCH);
    u = alu_b(SRC_ZB, FN_ADD, DST_RAMF, 1'b1); u.nas = NAS_CRTN; u.force_cond = 1'b1;
    p[8'h40] = u;
    // HALT
    p[8'h44] = ui_jump(8'h44);
    return p;
  endfunction

  function automatic map_array_t build_map();
    map_array_t m;
    m = default_map();
    m[3] = 8'h20; m[4] = 8'h24; m[5] = 8'h28; m[6] = 8'h2C; m[7] = 8'h30;
    m[8] = 8'h3C; m[9] = 8'h34; m[10] = 8'h38; m[11] = 8'h44;
    return m;
  endfunction

  function automatic mem_array_t build_macro();
    mem_array_t a;
    logic [7:0] prog [29] = '{
      8'h01, 8'h01, 8'h05,   //  0 LOADI R1,5
      8'h01, 8'h03, 8'h00,   //  3 LOADI R3,0
      8'h02, 8'h13,          //  6 ADD R3 <- R1 + R3
      8'h06, 8'h01,          //  8 DEC R1
      8'h07, 8'h00, 8'h06,   // 10 JNZ 6
      8'h03, 8'h03,          // 13 SHL4 R3
      8'h04, 8'h03, 8'h1F,   // 15 STORE R3,31
      8'h05, 8'h04, 8'h1F,   // 18 LOADM R4,31
      8'h09, 8'h04,          // 21 DSHL R4
      8'h0A, 8'h04,          // 23 ABS R4
      8'h08, 8'h04,          // 25 INC2 R4
      8'h0B, 8'h00           // 27 HALT
    };
    for (int i = 0; i < 32; i++) a[i] = (i < 29) ? prog[i] : 8'h00;
    return a;
  endfunction

  localparam uword_array_t PROG  = build_prog();
  localparam map_array_t   MAPT  = build_map();
  localparam mem_array_t   MACRO = build_macro();

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [5:0] sel = '0;
  logic [7:0] leds;
  int checks = 0, failures = 0;
  int edges = 0;
  int halt_edge = -1;
  // mechanism counters
  int n_jmap = 0, n_loop = 0, n_call = 0, n_ret = 0, n_mem_wr = 0, n_mem_rd = 0;
  int n_taken = 0, n_not_taken = 0, n_uflag_br = 0, n_link = 0, n_force = 0;

  mpp_top #(.MICROPROGRAM(PROG), .MAP(MAPT), .MACRO_PROGRAM(MACRO)) dut (.clk, .rst, .sel, .leds);

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    edges <= edges + 1;
    if (dut.pl.nas == NAS_JMAP) n_jmap++;
    if (dut.pl.nas == NAS_RPCT && dut.count != 0) n_loop++;
    if (dut.pl.nas == NAS_CJS && !dut.cc_n) n_call++;
    if (dut.pl.nas == NAS_CRTN && !dut.cc_n) n_ret++;
    if (dut.pl.mem_write) n_mem_wr++;
    if (dut.pl.mem_read) n_mem_rd++;
    if (dut.pl.nas == NAS_CJP && !dut.pl.force_cond) begin
      if (dut.pl.cond_sel == CC_MZ) begin
        if (!dut.cc_n) n_taken++; else n_not_taken++;
      end
      if (dut.pl.cond_sel == CC_UN && !dut.cc_n) n_uflag_br++;
    end
    if (dut.pl.dst == DST_RAMQU && dut.pl.ram_in == SHIN_LINK) n_link++;
    if (dut.pl.force_cond) n_force++;
    if (halt_edge < 0 && dut.pl.nas == NAS_CJP && dut.pl.ba == 8'h44 && dut.useq_y == 8'h44)
      halt_edge = edges;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic peek(input logic [5:0] s, output logic [7:0] v);
    sel = s;
    #1;
    v = leds;
  endtask

  task automatic mech(input string what, input int n);
    checks++;
    $display("mechanism %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (170) @(posedge clk);
    #2;
    // halt_edge is the number of the rising edge that loaded HALT
    check("rising edges to reach HALT", halt_edge, 149);
    peek(6'b00_0001, v); check("R1 loop counter", v, 8'h00);
    peek(6'b00_0011, v); check("R3 = 15*16", v, 8'hF0);
    peek(6'b10_0000 | 6'd31, v); check("mem[31] stored", v, 8'hF0);
    peek(6'b00_1111, v); check("R15 <- Q after DSHL", v, 8'hE0);
    peek(6'b01_0110, v); check("Q after DSHL", v, 8'hE0);
    peek(6'b00_0100, v); check("R4 = |E1h| + 2", v, 8'h21);
    peek(6'b00_0000, v); check("PC after HALT fetch", v, 8'd29);
    peek(6'b01_0111, v); check("macro flags after last DEC (Z=1,C=1)", v[7:4], 4'b1010);
    peek(6'b01_0000, v); check("sequencer parked on HALT", v, 8'h44);
    mech("JMAP dispatch", n_jmap);
    mech("counter loop repeat", n_loop);
    mech("microsubroutine call", n_call);
    mech("microsubroutine return", n_ret);
    mech("macro-memory write", n_mem_wr);
    mech("macro-memory read", n_mem_rd);
    mech("macro-flag branch taken", n_taken);
    mech("macro-flag branch not taken", n_not_taken);
    mech("micro-flag branch taken", n_uflag_br);
    mech("linked RAM/Q shift", n_link);
    mech("forced condition", n_force);
    check("JNZ taken 4 times", n_taken, 4);
    check("counter loop repeats", n_loop, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
