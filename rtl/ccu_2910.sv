// ccu_2910: computer control unit, an 8-bit Am2910-style microsequencer.
//
// Each micro-cycle it produces the address Y of the next micro-instruction
// from one of four sources: the direct input D (branch address from the
// pipeline, or the mapping PROM for JMAP), the register R, the top of the
// return stack F, or the micro-PC. The choice depends on the 4-bit
// instruction (NAS field) of the micro-instruction now in the pipeline, the
// condition input cc_n (active low: 0 = condition passed) and the loop
// counter's zero test. The incrementer adds one to Y and the micro-PC takes
// it at the rising clock edge; stack, counter and register also change on
// that edge. The sixteen instructions and their behaviour are those of the
// AMD Am2910 (JZ, CJS, JMAP, CJP, PUSH, JSRP, CJV, JRP, RFCT, RPCT, CRTN,
// CJPP, LDCT, LOOP, CONT, TWB).
//
// Structure as in the processor's CCU diagram: address multiplexer,
// incrementer, micro-PC register, stack with top-of-stack pointer,
// counter with zero test, and a separate register loaded from the pipeline.
// Design choices: the counter and the register are loaded together (when
// the Am2910 would load its single register/counter) and the register keeps
// the loaded value while the counter counts down; the stack is five words
// deep like the Am2910's, a push onto a full stack overwrites the top entry
// and a pop from an empty stack does nothing. There is no vector source:
// CJV branches to D like CJP, with vect_n low. Synchronous active-high reset
// clears stack pointer, micro-PC, counter and register.
//
// Timing: Y is combinational from the instruction, D, cc_n and the state;
// the state updates on the rising edge of clk.
module ccu_2910
  import mpp_pkg::*;
#(
  parameter int unsigned AW    = 8,
  parameter int unsigned DEPTH = 5
) (
  input  logic          clk,
  input  logic          rst,
  input  nas_e          op,       // next-address instruction
  input  logic [AW-1:0] d,        // direct input (branch address or map)
  input  logic          cc_n,     // condition, active low (0 = pass)
  output logic [AW-1:0] y,        // next micro-address
  output logic          pl_n,     // enable the pipeline branch address onto D
  output logic          map_n,    // enable the mapping PROM onto D
  output logic          vect_n,   // vector enable (no vector source here)
  output logic          full_n,   // stack full
  output logic [AW-1:0] upc,      // micro-PC (observation)
  output logic [AW-1:0] count     // loop counter (observation)
);

  localparam int unsigned SPW = $clog2(DEPTH + 1);

  typedef enum logic [1:0] {SEL_PC, SEL_R, SEL_F, SEL_D} ysel_e;
  typedef enum logic [1:0] {STK_HOLD, STK_PUSH, STK_POP, STK_CLEAR} stk_e;
  typedef enum logic [1:0] {CNT_HOLD, CNT_LOAD, CNT_DEC} cnt_e;

  logic [AW-1:0]  stack [DEPTH];
  logic [SPW-1:0] sp;           // number of entries in the stack
  logic [AW-1:0]  reg_r;
  logic [AW-1:0]  upc_q;
  logic [AW-1:0]  cnt_q;
  logic [AW-1:0]  tos;
  logic           pass;
  logic           zero;
  ysel_e          ysel;
  stk_e           stk;
  cnt_e           cnt;

  assign pass = ~cc_n;
  assign zero = (cnt_q == '0);
  assign tos  = (sp == '0) ? '0 : stack[sp - 1'b1];

  // CCU logic: instruction decoder.
  always_comb begin
    ysel = SEL_PC;
    stk  = STK_HOLD;
    cnt  = CNT_HOLD;
    unique case (op)
      NAS_JZ:   begin ysel = SEL_D; stk = STK_CLEAR; end
      NAS_CJS:  if (pass) begin ysel = SEL_D; stk = STK_PUSH; end
      NAS_JMAP: ysel = SEL_D;
      NAS_CJP:  if (pass) ysel = SEL_D;
      NAS_PUSH: begin stk = STK_PUSH; if (pass) cnt = CNT_LOAD; end
      NAS_JSRP: begin stk = STK_PUSH; ysel = pass ? SEL_D : SEL_R; end
      NAS_CJV:  if (pass) ysel = SEL_D;
      NAS_JRP:  ysel = pass ? SEL_D : SEL_R;
      NAS_RFCT: if (!zero) begin ysel = SEL_F; cnt = CNT_DEC; end
                else stk = STK_POP;
      NAS_RPCT: if (!zero) begin ysel = SEL_D; cnt = CNT_DEC; end
      NAS_CRTN: if (pass) begin ysel = SEL_F; stk = STK_POP; end
      NAS_CJPP: if (pass) begin ysel = SEL_D; stk = STK_POP; end
      NAS_LDCT: cnt = CNT_LOAD;
      NAS_LOOP: if (pass) stk = STK_POP; else ysel = SEL_F;
      NAS_CONT: ;
      NAS_TWB: begin
        if (!zero) begin
          cnt = CNT_DEC;
          if (pass) stk = STK_POP; else ysel = SEL_F;
        end else begin
          stk = STK_POP;
          if (!pass) ysel = SEL_D;
        end
      end
      default: ;
    endcase
  end

  // Address selection multiplexer. JZ drives D to zero by selecting it with
  // the output forced low.
  always_comb begin
    unique case (ysel)
      SEL_PC: y = upc_q;
      SEL_R:  y = reg_r;
      SEL_F:  y = tos;
      SEL_D:  y = (op == NAS_JZ) ? '0 : d;
      default: y = upc_q;
    endcase
  end

  assign map_n  = (op != NAS_JMAP);
  assign vect_n = (op != NAS_CJV);
  assign pl_n   = ~(map_n & vect_n);
  assign full_n = (sp != SPW'(DEPTH));
  assign upc    = upc_q;
  assign count  = cnt_q;

  // Micro-PC (incrementer output), counter, register and stack.
  always_ff @(posedge clk) begin
    if (rst) begin
      upc_q <= '0;
      cnt_q <= '0;
      reg_r <= '0;
      sp    <= '0;
    end else begin
      upc_q <= y + 1'b1;
      unique case (cnt)
        CNT_LOAD: begin cnt_q <= d; reg_r <= d; end
        CNT_DEC:  cnt_q <= cnt_q - 1'b1;
        default: ;
      endcase
      unique case (stk)
        STK_PUSH: begin
          // the return address is the micro-PC of the current instruction
          if (sp == SPW'(DEPTH)) stack[DEPTH-1] <= upc_q;
          else begin
            stack[sp] <= upc_q;
            sp <= sp + 1'b1;
          end
        end
        STK_POP:   if (sp != '0) sp <= sp - 1'b1;
        STK_CLEAR: sp <= '0;
        default: ;
      endcase
    end
  end

endmodule
