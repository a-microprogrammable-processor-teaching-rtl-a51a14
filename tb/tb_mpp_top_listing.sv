// tb_mpp_top_listing: runs the example program with FETCHINSTR and LOAD R,imm
// written the way the original micro-code listings write them.
//
// There, the sequential fetch steps use NAS = 1 (CJS, conditional call) with
// branch address 0 and no condition enabled, relying on the condition
// failing so the sequencer simply continues; the end of FETCHINSTR is
// NAS = 2 (JMAP) and LOAD R,imm ends with NAS = 3 (CJP) to 05h with the
// condition forced. This testbench builds such a microprogram and checks
// that the example program gives the same results on the same cycles as with
// the default microprogram (R8 = 7 on rising edge 23) and that no
// subroutine call ever happened (the stack stays empty).
module tb_mpp_top_listing;
  import mpp_pkg::*;

  function automatic uword_array_t build_prog();
    uword_array_t p;
    uinstr_t u;
    p = default_microprogram();
    for (int a = 5; a <= 7; a++) begin
      u = uinstr_t'(p[a]);
      u.nas = NAS_CJS; u.ba = 8'h00;
      p[a] = u;
    end
    u = uinstr_t'(p[8'h19]); u.nas = NAS_CJS; u.ba = 8'h00; p[8'h19] = u;
    return p;
  endfunction

  localparam uword_array_t PROG = build_prog();

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [5:0] sel = '0;
  logic [7:0] leds;
  int checks = 0, failures = 0;
  int edges = 0, n_cjs = 0, n_calls = 0;

  mpp_top #(.MICROPROGRAM(PROG)) dut (.clk, .rst, .sel, .leds);

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    edges <= edges + 1;
    if (dut.pl.nas == NAS_CJS) begin
      n_cjs++;
      if (!dut.cc_n) n_calls++;
    end
  end

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  task automatic peek(input logic [5:0] s, output logic [7:0] v);
    sel = s;
    #1;
    v = leds;
  endtask

  task automatic run_to(input int n);
    while (edges < n) begin
      @(posedge clk);
      #2;
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
    run_to(12);
    peek(6'b00_1000, v); check("R8 after first LOAD", v, 8'h03);
    run_to(22);
    peek(6'b00_1000, v); check("R8 before ADD ends", v, 8'h03);
    run_to(23);
    peek(6'b00_1000, v); check("R8 = 7", v, 8'h07);
    peek(6'b00_1001, v); check("R9 = 4", v, 8'h04);
    peek(6'b00_0000, v); check("PC = 8", v, 8'h08);
    checks++;
    if (n_cjs == 0) begin failures++; $display("FAIL no CJS step executed"); end
    checks++;
    if (n_calls != 0) begin failures++; $display("FAIL a CJS step called a subroutine"); end
    $display("CJS steps executed as continue: %0d", n_cjs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
