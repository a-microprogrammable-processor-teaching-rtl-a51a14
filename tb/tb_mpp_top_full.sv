// tb_mpp_top_full: the processor with its default tables, end to end.
//
// Runs the built-in example macro-program (LOAD R8,3; LOAD R9,4; ADD with
// A = 9, B = 8) through the default microprogram and checks, through the
// LED display only, the reset sequence length, the cycle on which each
// result appears, and the final register, PC and memory contents. The
// expected values and cycle counts are worked out by hand from the
// microprogram: RESET takes 5 micro-cycles, a LOAD R,imm 4 + 2, an ADD 4 + 1.
module tb_mpp_top_full;
  import mpp_pkg::*;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [5:0] sel = '0;
  logic [7:0] leds;
  int checks = 0, failures = 0;
  int edges = 0;             // rising edges since reset was released

  mpp_top dut (.clk, .rst, .sel, .leds);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h (edge %0d)", what, got, exp, edges);
    end
  endtask

  // Read a value through the display switches (combinational path).
  task automatic peek(input logic [5:0] s, output logic [7:0] v);
    sel = s;
    #1;
    v = leds;
  endtask

  // Advance to just after the n-th rising edge since reset release.
  task automatic run_to(input int n);
    while (edges < n) begin
      @(posedge clk);
      #2;
    end
  endtask

  always @(posedge clk) if (!rst) edges <= edges + 1;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // Reset microroutine: after 5 rising edges the sequencer points at 05h.
    run_to(4);
    peek(6'b01_0000, v); check("sequencer before end of reset", v, 8'h04);
    run_to(5);
    peek(6'b01_0000, v); check("sequencer after reset", v, UA_FETCH);
    peek(6'b00_0000, v); check("PC cleared", v, 8'h00);
    // First LOAD: R8 written at the end of micro-cycle 1Ah (edge 12).
    run_to(11);
    peek(6'b00_1000, v); check("R8 before first LOAD ends", v == 8'h03 ? 8'h01 : 8'h00, 8'h00);
    run_to(12);
    peek(6'b00_1000, v); check("R8 after LOAD", v, 8'h03);
    peek(6'b01_0001, v); check("opcode in IR", v, 8'h01);
    peek(6'b01_0010, v); check("operand in IR", v, 8'h08);
    peek(6'b00_0000, v); check("PC after 3-byte instruction", v, 8'h03);
    run_to(18);
    peek(6'b00_1001, v); check("R9 after LOAD", v, 8'h04);
    run_to(22);
    peek(6'b00_1000, v); check("R8 before ADD ends", v, 8'h03);
    peek(6'b01_0001, v); check("ADD opcode", v, 8'h02);
    peek(6'b01_0010, v); check("ADD operand", v, 8'h98);
    run_to(23);
    peek(6'b00_1000, v); check("R8 = R9 + R8", v, 8'h07);
    peek(6'b00_1001, v); check("R9 unchanged", v, 8'h04);
    peek(6'b00_0000, v); check("PC after program", v, 8'h08);
    peek(6'b01_0111, v); check("macro flags after ADD (Z=N=C=V=0)", v[7:4], 4'h0);
    // Memory contents through the display.
    peek(6'b10_0000, v); check("mem[0]", v, 8'h01);
    peek(6'b10_0111, v); check("mem[7]", v, 8'h98);
    // Opcode 00h at address 8 maps to RESET, which restarts the program.
    run_to(23 + 4 + 5 + 6);
    peek(6'b00_0000, v); check("PC after restart and first LOAD", v, 8'h03);
    peek(6'b00_1000, v); check("R8 reloaded", v, 8'h03);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
