// tb_micro_memory: checks the micro-program memory read path and its
// default contents.
//
// Decodes words of the default microprogram and compares their fields with
// the routines they must hold (RESET jump, the FETCHINSTR steps, the JMAP at
// 08h, ADD at 0Bh, LOAD at 19h/1Ah, idle words elsewhere). A second
// instance with a counting pattern as its table checks that every address
// reads its own word.
module tb_micro_memory;
  import mpp_pkg::*;

  function automatic uword_array_t pattern();
    uword_array_t p;
    for (int i = 0; i < 256; i++) p[i] = {6'(i), 32'(i * 32'h9E3779B9), 32'(~i)};
    return p;
  endfunction

  localparam uword_array_t PAT = pattern();

  logic [7:0]  addr, addr2;
  logic [69:0] data, data2;
  uinstr_t     u;
  int checks = 0, failures = 0;

  micro_memory dut (.addr, .data);
  micro_memory #(.PROG(PAT)) dut2 (.addr(addr2), .data(data2));

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic rd(input logic [7:0] a);
    addr = a;
    #1;
    u = uinstr_t'(data);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd(8'h04); expect_eq("04 jumps", u.nas, NAS_CJP);
    expect_eq("04 target", u.ba, 8'h05); expect_eq("04 forced", u.force_cond, 1);
    rd(8'h05); expect_eq("05 read", u.mem_read, 1); expect_eq("05 alu_oe", u.bus.alu_oe, 1);
    expect_eq("05 adr_ld", u.bus.adr_ld, 1); expect_eq("05 src", u.src, SRC_ZB);
    expect_eq("05 dst", u.dst, DST_RAMA); expect_eq("05 carry", u.carry, 1);
    rd(8'h06); expect_eq("06 mbr_oe", u.bus.mbr_oe, 1); expect_eq("06 ir msb", u.bus.ir_msb_ld, 1);
    expect_eq("06 continue", u.nas, NAS_CONT);
    rd(8'h08); expect_eq("08 JMAP", u.nas, NAS_JMAP); expect_eq("08 ir lsb", u.bus.ir_lsb_ld, 1);
    rd(8'h0B); expect_eq("0B src", u.src, SRC_AB); expect_eq("0B useira", u.useira, 1);
    expect_eq("0B useirb", u.useirb, 1); expect_eq("0B dst", u.dst, DST_RAMF);
    rd(8'h1A); expect_eq("1A src", u.src, SRC_DZ); expect_eq("1A mbr_oe", u.bus.mbr_oe, 1);
    expect_eq("1A target", u.ba, 8'h05);
    rd(8'h77); expect_eq("idle word", data, ui_idle());
    for (int i = 0; i < 256; i++) begin
      addr2 = 8'(i);
      #1;
      checks++;
      if (data2 !== PAT[i]) begin
        failures++;
        $display("FAIL pattern word %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
