// tb_pipeline_reg: checks the pipeline register.
//
// After reset the register must hold the reset word (JZ, no writes); then
// random 70-bit words must appear at the output exactly one rising edge
// after they are applied, and not before.
module tb_pipeline_reg;
  import mpp_pkg::*;

  logic    clk = 1'b0;
  logic    rst = 1'b1;
  uinstr_t d, q, prev;
  int checks = 0, failures = 0;

  pipeline_reg dut (.clk, .rst, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== ui_reset()) begin failures++; $display("FAIL reset word"); end
    checks++;
    if (q.nas !== NAS_JZ) begin failures++; $display("FAIL reset word is not JZ"); end
    @(negedge clk) rst = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (q !== '1) begin failures++; $display("FAIL first word after reset"); end
    prev = q;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      d = {6'($urandom), 32'($urandom), 32'($urandom)};
      #1;
      checks++;
      if (q !== prev) begin failures++; $display("FAIL output changed before the edge"); end
      @(posedge clk);
      #1;
      checks++;
      if (q !== d) begin failures++; $display("FAIL word %0d not captured", n); end
      prev = q;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
