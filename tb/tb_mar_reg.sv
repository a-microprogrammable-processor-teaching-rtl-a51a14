// tb_mar_reg: checks the memory address register: reset to zero, load from
// the bus only when load is set, hold otherwise.
module tb_mar_reg;
  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       load = 1'b0;
  logic [7:0] bus = 8'hFF, q, model;
  int checks = 0, failures = 0;

  mar_reg dut (.clk, .rst, .load, .bus, .q);

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
    if (q !== 8'h00) begin failures++; $display("FAIL reset"); end
    model = 8'h00;
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      load = 1'($urandom); bus = 8'($urandom);
      @(posedge clk);
      #1;
      if (load) model = bus;
      checks++;
      if (q !== model) begin failures++; $display("FAIL cycle %0d: %0h vs %0h", n, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
