// tb_mbr_reg: checks the memory buffer register.
//
// A read requested in one cycle must load the memory byte present at the
// falling edge of the next cycle (not earlier); a bus load must take the bus
// value at the falling edge of its own cycle; the register holds otherwise.
// Reset clears it.
module tb_mbr_reg;
  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       read = 1'b0, load = 1'b0;
  logic [7:0] bus = '0, mem_data = '0, q, model;
  logic       rd_pend;
  int checks = 0, failures = 0;

  mbr_reg dut (.clk, .rst, .read, .load, .bus, .mem_data, .q);

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
    @(negedge clk);
    #1;
    checks++;
    if (q !== 8'h00) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    model = 8'h00; rd_pend = 1'b0;
    for (int n = 0; n < 400; n++) begin
      @(posedge clk);          // start of a micro-cycle
      #1;
      rd_pend = read;          // read of the cycle just ended
      read = ($urandom % 3) == 0;
      load = 1'($urandom);
      bus = 8'($urandom);
      mem_data = 8'($urandom);
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL changed before falling edge, cycle %0d", n); end
      @(negedge clk);
      #1;
      if (rd_pend) model = mem_data;
      else if (load) model = bus;
      checks++;
      if (q !== model) begin failures++; $display("FAIL cycle %0d: %0h vs %0h", n, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
