// tb_status_2904: randomized test of the status and condition unit.
//
// A reference model keeps the micro and macro flag registers; random ALU
// flags, Flag_Source bits, condition selects, polarity and force are applied
// for 3000 cycles, and cc_n and both flag registers are compared every
// cycle. Reset clearing both registers is checked first.
module tb_status_2904;
  import mpp_pkg::*;

  logic      clk = 1'b0;
  logic      rst = 1'b1;
  flags_t    alu_flags = '0;
  logic [4:0] flag_src = '0;
  cond_sel_e cond_sel = CC_FALSE;
  logic      polarity = 1'b0;
  logic      force_cond = 1'b0;
  logic      cc_n;
  flags_t    uflags, mflags;
  flags_t    mu, mm;
  int checks = 0, failures = 0;

  status_2904 dut (.clk, .rst, .alu_flags, .flag_src, .cond_sel, .polarity,
                   .force_cond, .cc_n, .uflags, .mflags);

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic logic model_cond();
    case (cond_sel)
      CC_UZ: return mu.z;
      CC_UN: return mu.n;
      CC_UC: return mu.c;
      CC_UV: return mu.v;
      CC_MZ: return mm.z;
      CC_MN: return mm.n;
      CC_MC: return mm.c;
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flags_t nu, nm;
    repeat (2) @(posedge clk);
    #1;
    expect_eq("micro flags reset", uflags, 0);
    expect_eq("macro flags reset", mflags, 0);
    mu = '0; mm = '0;
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      alu_flags = 4'($urandom);
      flag_src = 5'($urandom);
      if ($urandom % 4 != 0) flag_src[4:3] = 2'b00;
      cond_sel = cond_sel_e'($urandom % 8);
      polarity = 1'($urandom);
      force_cond = ($urandom % 4) == 0;
      #1;
      expect_eq("cc_n", cc_n, !(force_cond || (model_cond() ^ polarity)));
      expect_eq("micro flags", uflags, mu);
      expect_eq("macro flags", mflags, mm);
      nu = flag_src[3] ? 4'h0 : (flag_src[0] ? alu_flags : mu);
      nm = flag_src[4] ? 4'h0 : (flag_src[1] ? (flag_src[2] ? mu : alu_flags) : mm);
      mu = nu; mm = nm;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
