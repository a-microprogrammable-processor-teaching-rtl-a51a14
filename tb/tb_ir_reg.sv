// tb_ir_reg: checks the instruction register: both bytes reset to zero,
// each byte loads from the bus only on its own load signal.
module tb_ir_reg;
  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       msb_ld = 1'b0, lsb_ld = 1'b0;
  logic [7:0] bus = 8'hFF, opcode_byte, operand_byte, m_hi, m_lo;
  int checks = 0, failures = 0;

  ir_reg dut (.clk, .rst, .msb_ld, .lsb_ld, .bus, .opcode_byte, .operand_byte);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (opcode_byte !== 0 || operand_byte !== 0) begin failures++; $display("FAIL reset"); end
    m_hi = 0; m_lo = 0;
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      msb_ld = 1'($urandom); lsb_ld = 1'($urandom); bus = 8'($urandom);
      @(posedge clk);
      #1;
      if (msb_ld) m_hi = bus;
      if (lsb_ld) m_lo = bus;
      checks += 2;
      if (opcode_byte !== m_hi) begin failures++; $display("FAIL opcode byte, cycle %0d", n); end
      if (operand_byte !== m_lo) begin failures++; $display("FAIL operand byte, cycle %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
