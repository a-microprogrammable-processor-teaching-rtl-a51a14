// status_2904: Am2904-style status and branch-condition unit.
//
// Two flag registers keep the ALU status bits (zero, sign, carry,
// overflow): the micro flags, used for decisions inside a microroutine, and
// the macro flags, which survive across macro-instructions. A condition
// multiplexer picks one flag (or a constant false), the polarity bit can
// invert it, and the force bit makes the condition pass regardless. The
// result goes to the sequencer active low (cc_n = 0: condition passed).
//
// Flag_Source bits (this design's encoding): bit 0 loads the micro flags
// from the ALU, bit 1 loads the macro flags from the ALU, bit 2 makes the
// macro flags load from the micro flags instead, bit 3 clears the micro
// flags, bit 4 clears the macro flags (a clear wins over a load).
// Condition select: 0 false, 1-4 micro Z/N/C/V, 5-7 macro Z/N/C. With code 0,
// polarity 0 and no force, a conditional sequencer instruction fails.
//
// Timing: the flag registers load on the rising clock edge and reset to
// zero (synchronous, active high); cc_n is combinational from the
// registered flags and the control inputs.
module status_2904
  import mpp_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  flags_t    alu_flags,
  input  logic [4:0] flag_src,
  input  cond_sel_e cond_sel,
  input  logic      polarity,
  input  logic      force_cond,
  output logic      cc_n,
  output flags_t    uflags,
  output flags_t    mflags
);

  flags_t u_q, m_q;
  logic   cond;

  always_ff @(posedge clk) begin
    if (rst) begin
      u_q <= '0;
      m_q <= '0;
    end else begin
      if (flag_src[FS_UCLR])     u_q <= '0;
      else if (flag_src[FS_ULD]) u_q <= alu_flags;
      if (flag_src[FS_MCLR])     m_q <= '0;
      else if (flag_src[FS_MLD]) m_q <= flag_src[FS_MFU] ? u_q : alu_flags;
    end
  end

  // Conditional MUX and polarity.
  always_comb begin
    unique case (cond_sel)
      CC_FALSE: cond = 1'b0;
      CC_UZ:    cond = u_q.z;
      CC_UN:    cond = u_q.n;
      CC_UC:    cond = u_q.c;
      CC_UV:    cond = u_q.v;
      CC_MZ:    cond = m_q.z;
      CC_MN:    cond = m_q.n;
      CC_MC:    cond = m_q.c;
      default:  cond = 1'b0;
    endcase
  end

  assign cc_n   = ~(force_cond | (cond ^ polarity));
  assign uflags = u_q;
  assign mflags = m_q;

endmodule
