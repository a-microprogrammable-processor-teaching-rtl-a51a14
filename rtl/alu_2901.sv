// alu_2901: 8-bit Am2901-style ALU with scratch pad registers.
//
// Sixteen 8-bit scratch pad registers (two read ports A and B, written at
// address B), a Q register, an ALU data source selector choosing the operand
// pair (R, S) among A, B, Q, zero and the direct data input D (the bus), an
// eight-function ALU (R+S, S-R, R-S, OR, AND, NOT(R) AND S, XOR, XNOR), a
// RAM shifter and a Q shifter in front of the register file and the Q
// register, and an output data selector that puts either the ALU result F
// or register A on the output Y. Source, function and destination codes and
// the carry input follow the AMD Am2901; register 0 is the macro program
// counter by convention of the microprogram.
//
// Register addresses come either from the micro-instruction (aa, ab) or
// from the operand byte of the instruction register (useira: bits 7:4,
// useirb: bits 3:0). The bits shifted into the RAM and Q shifters come from
// the Ram_In and Q_In fields: zero, one, rotate (own outgoing bit), link
// (outgoing bit of the other shifter, for 16-bit shifts of R:Q), the carry
// flag of the status unit, or the sign F[7].
//
// Flags (z, n, c, v) describe F. Design choices: carry and overflow are 0
// for the logic functions; the nop input inhibits every register write;
// registers are written on the rising clock edge that ends the micro-cycle
// (one edge per micro-cycle instead of a separate falling-edge write); the
// scratch pad registers and Q have no reset, the reset microroutine clears
// what it needs. Y, F and the flags are combinational.
module alu_2901
  import mpp_pkg::*;
(
  input  logic          clk,
  input  logic [3:0]    aa,
  input  logic [3:0]    ab,
  input  logic          useira,
  input  logic          useirb,
  input  logic [7:0]    ir_operand,
  input  logic          nop,
  input  alu_src_e      src,
  input  alu_fn_e       fn,
  input  alu_dst_e      dst,
  input  logic          cn,
  input  shin_e         ram_in,
  input  shin_e         q_in,
  input  logic          carry_flag,  // micro carry flag, for SHIN_CARRY
  input  logic [7:0]    d,           // direct data from the bus
  output logic [7:0]    y,
  output flags_t        flags,
  output logic [7:0]    q,           // Q register (observation)
  input  logic [3:0]    dbg_addr,    // extra read port for the display
  output logic [7:0]    dbg_data
);

  logic [7:0] regs [NREGS];
  logic [7:0] q_q;
  logic [3:0] a_addr, b_addr;
  logic [7:0] a_val, b_val;
  logic [7:0] r, s, f;
  logic [8:0] sum;
  logic [7:0] r_op, s_op;
  logic       arith;
  logic [7:0] ram_shift, q_shift;
  logic       ram_sin, q_sin;       // bit entering each shifter
  logic       ram_write, q_write;
  logic       up;                   // shift toward bit 7

  assign a_addr = useira ? ir_operand[7:4] : aa;
  assign b_addr = useirb ? ir_operand[3:0] : ab;
  assign a_val  = regs[a_addr];
  assign b_val  = regs[b_addr];
  assign q      = q_q;
  assign dbg_data = regs[dbg_addr];

  // ALU data source selector.
  always_comb begin
    unique case (src)
      SRC_AQ: begin r = a_val; s = q_q;   end
      SRC_AB: begin r = a_val; s = b_val; end
      SRC_ZQ: begin r = '0;    s = q_q;   end
      SRC_ZB: begin r = '0;    s = b_val; end
      SRC_ZA: begin r = '0;    s = a_val; end
      SRC_DA: begin r = d;     s = a_val; end
      SRC_DQ: begin r = d;     s = q_q;   end
      SRC_DZ: begin r = d;     s = '0;    end
      default: begin r = '0;   s = '0;    end
    endcase
  end

  // Eight-function ALU. Subtractions are additions of a complemented operand.
  always_comb begin
    r_op  = r;
    s_op  = s;
    arith = 1'b1;
    unique case (fn)
      FN_ADD:  ;
      FN_SUBR: r_op = ~r;
      FN_SUBS: s_op = ~s;
      default: arith = 1'b0;
    endcase
    sum = {1'b0, r_op} + {1'b0, s_op} + {8'b0, cn};
    unique case (fn)
      FN_ADD, FN_SUBR, FN_SUBS: f = sum[7:0];
      FN_OR:    f = r | s;
      FN_AND:   f = r & s;
      FN_NOTRS: f = ~r & s;
      FN_EXOR:  f = r ^ s;
      FN_EXNOR: f = ~(r ^ s);
      default:  f = '0;
    endcase
    flags.z = (f == '0);
    flags.n = f[7];
    flags.c = arith & sum[8];
    flags.v = arith & (r_op[7] == s_op[7]) & (f[7] != r_op[7]);
  end

  // RAM and Q shifters.
  assign up = (dst == DST_RAMQU) || (dst == DST_RAMU);

  function automatic logic shift_in(input shin_e code, input logic own_out,
                                    input logic other_out, input logic cf,
                                    input logic sign);
    unique case (code)
      SHIN_ZERO:  return 1'b0;
      SHIN_ONE:   return 1'b1;
      SHIN_ROT:   return own_out;
      SHIN_LINK:  return other_out;
      SHIN_CARRY: return cf;
      SHIN_SIGN:  return sign;
      default:    return 1'b0;
    endcase
  endfunction

  always_comb begin
    if (up) begin
      ram_sin = shift_in(ram_in, f[7], q_q[7], carry_flag, f[7]);
      q_sin   = shift_in(q_in, q_q[7], f[7], carry_flag, f[7]);
      ram_shift = {f[6:0], ram_sin};
      q_shift   = {q_q[6:0], q_sin};
    end else begin
      ram_sin = shift_in(ram_in, f[0], q_q[0], carry_flag, f[7]);
      q_sin   = shift_in(q_in, q_q[0], f[0], carry_flag, f[7]);
      ram_shift = {ram_sin, f[7:1]};
      q_shift   = {q_sin, q_q[7:1]};
    end
  end

  // Destination control and output data selector.
  assign ram_write = ~nop & (dst != DST_QREG) & (dst != DST_NOP);
  assign q_write   = ~nop & ((dst == DST_QREG) || (dst == DST_RAMQD) || (dst == DST_RAMQU));
  assign y = (dst == DST_RAMA) ? a_val : f;

  always_ff @(posedge clk) begin
    if (ram_write) begin
      unique case (dst)
        DST_RAMA, DST_RAMF:   regs[b_addr] <= f;
        default:              regs[b_addr] <= ram_shift;
      endcase
    end
    if (q_write) q_q <= (dst == DST_QREG) ? f : q_shift;
  end

endmodule
