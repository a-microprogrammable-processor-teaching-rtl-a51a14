// tb_alu_2901: randomized test of the ALU slice against a reference model.
//
// The testbench keeps its own copy of the 16 registers and Q. It first
// loads every register and Q with known values through the D input, then
// applies 4000 random micro-operations (any source, function, destination,
// carry, register addresses from the micro-instruction or from the operand
// byte, shift-in selections, nop). For each it computes Y, the four flags
// and the register/Q updates with plain integer arithmetic (signed sums for
// overflow) and compares; the display read port is checked too.
module tb_alu_2901;
  import mpp_pkg::*;

  logic       clk = 1'b0;
  logic [3:0] aa, ab, dbg_addr;
  logic       useira, useirb, nop, cn, carry_flag;
  logic [7:0] ir_operand, d, y, q, dbg_data;
  alu_src_e   src;
  alu_fn_e    fn;
  alu_dst_e   dst;
  shin_e      ram_in, q_in;
  flags_t     flags;
  int checks = 0, failures = 0;

  logic [7:0] m_regs [16];
  logic [7:0] m_q;

  alu_2901 dut (.clk, .aa, .ab, .useira, .useirb, .ir_operand, .nop, .src,
                .fn, .dst, .cn, .ram_in, .q_in, .carry_flag, .d, .y, .flags,
                .q, .dbg_addr, .dbg_data);

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic logic sin_of(input shin_e c, input logic own, input logic other,
                                  input logic cf, input logic sign);
    case (c)
      SHIN_ZERO: return 0;
      SHIN_ONE: return 1;
      SHIN_ROT: return own;
      SHIN_LINK: return other;
      SHIN_CARRY: return cf;
      SHIN_SIGN: return sign;
      default: return 0;
    endcase
  endfunction

  task automatic one_op();
    int a_i, b_i, r, s, f, sr, ss, full, c;
    logic ec, ev;
    logic [7:0] ey, nf, nq;
    a_i = useira ? int'(ir_operand[7:4]) : int'(aa);
    b_i = useirb ? int'(ir_operand[3:0]) : int'(ab);
    case (src)
      SRC_AQ: begin r = m_regs[a_i]; s = m_q; end
      SRC_AB: begin r = m_regs[a_i]; s = m_regs[b_i]; end
      SRC_ZQ: begin r = 0; s = m_q; end
      SRC_ZB: begin r = 0; s = m_regs[b_i]; end
      SRC_ZA: begin r = 0; s = m_regs[a_i]; end
      SRC_DA: begin r = d; s = m_regs[a_i]; end
      SRC_DQ: begin r = d; s = m_q; end
      default: begin r = d; s = 0; end
    endcase
    c = int'(cn);
    sr = (r > 127) ? r - 256 : r;
    ss = (s > 127) ? s - 256 : s;
    ec = 0; ev = 0;
    case (fn)
      FN_ADD:  begin full = r + s + c;         f = full % 256; ec = full > 255;
                     ev = (sr + ss + c > 127) || (sr + ss + c < -128); end
      FN_SUBR: begin full = s + (255 - r) + c; f = full % 256; ec = full > 255;
                     ev = (ss - sr - 1 + c > 127) || (ss - sr - 1 + c < -128); end
      FN_SUBS: begin full = r + (255 - s) + c; f = full % 256; ec = full > 255;
                     ev = (sr - ss - 1 + c > 127) || (sr - ss - 1 + c < -128); end
      FN_OR:   f = r | s;
      FN_AND:  f = r & s;
      FN_NOTRS: f = (255 - r) & s;
      FN_EXOR: f = r ^ s;
      default: f = 255 - (r ^ s);
    endcase
    ey = (dst == DST_RAMA) ? m_regs[a_i] : 8'(f);
    #1;
    expect_eq("Y", y, ey);
    expect_eq("Z", flags.z, f == 0);
    expect_eq("N", flags.n, f > 127);
    expect_eq("C", flags.c, ec);
    expect_eq("V", flags.v, ev);
    // register file / Q updates
    nf = 8'(f);
    nq = m_q;
    if (!nop) begin
      case (dst)
        DST_QREG: nq = nf;
        DST_RAMA, DST_RAMF: m_regs[b_i] = nf;
        DST_RAMQD: begin
          m_regs[b_i] = {sin_of(ram_in, nf[0], m_q[0], carry_flag, nf[7]), nf[7:1]};
          nq = {sin_of(q_in, m_q[0], nf[0], carry_flag, nf[7]), m_q[7:1]};
        end
        DST_RAMD: m_regs[b_i] = {sin_of(ram_in, nf[0], m_q[0], carry_flag, nf[7]), nf[7:1]};
        DST_RAMQU: begin
          m_regs[b_i] = {nf[6:0], sin_of(ram_in, nf[7], m_q[7], carry_flag, nf[7])};
          nq = {m_q[6:0], sin_of(q_in, m_q[7], nf[7], carry_flag, nf[7])};
        end
        DST_RAMU: m_regs[b_i] = {nf[6:0], sin_of(ram_in, nf[7], m_q[7], carry_flag, nf[7])};
        default: ;
      endcase
      m_q = nq;
    end
    @(posedge clk);
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    useira = 0; useirb = 0; nop = 0; cn = 0; carry_flag = 0; ir_operand = 0;
    ram_in = SHIN_ZERO; q_in = SHIN_ZERO; aa = 0; ab = 0; dbg_addr = 0;
    // Load registers and Q through D (R = D, S = 0, F = D).
    for (int i = 0; i < 17; i++) begin
      @(negedge clk);
      d = 8'($urandom);
      src = SRC_DZ; fn = FN_ADD; ab = 4'(i);
      dst = (i == 16) ? DST_QREG : DST_RAMF;
      if (i < 16) m_regs[i] = d; else m_q = d;
      @(posedge clk);
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      aa = 4'($urandom); ab = 4'($urandom);
      useira = 1'($urandom); useirb = 1'($urandom);
      ir_operand = 8'($urandom); d = 8'($urandom);
      nop = ($urandom % 8) == 0;
      cn = 1'($urandom); carry_flag = 1'($urandom);
      src = alu_src_e'($urandom % 8);
      fn = alu_fn_e'($urandom % 8);
      dst = alu_dst_e'($urandom % 8);
      ram_in = shin_e'($urandom % 6);
      q_in = shin_e'($urandom % 6);
      dbg_addr = 4'($urandom);
      #1;
      expect_eq("display port", dbg_data, m_regs[dbg_addr]);
      expect_eq("Q", q, m_q);
      one_op();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
