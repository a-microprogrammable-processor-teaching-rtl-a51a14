// tb_macro_memory: checks the macro-memory.
//
// Reads the default example program from both ports, then writes random
// bytes: a write requested in one micro-cycle must not be visible before
// the falling edge of the next cycle and must be visible after it, at the
// address present then. A model array tracks the expected contents.
module tb_macro_memory;
  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [4:0] addr = '0, dbg_addr = '0;
  logic       write = 1'b0;
  logic [7:0] wdata = '0, rdata, dbg_data;
  logic [7:0] model [32];
  int checks = 0, failures = 0;

  macro_memory dut (.clk, .rst, .addr, .write, .wdata, .rdata, .dbg_addr, .dbg_data);

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
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
    logic [7:0] prog [8] = '{8'h01, 8'h08, 8'h03, 8'h01, 8'h09, 8'h04, 8'h02, 8'h98};
    for (int i = 0; i < 32; i++) model[i] = (i < 8) ? prog[i] : 8'h00;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 32; i++) begin
      addr = 5'(i); dbg_addr = 5'(31 - i);
      #1;
      expect_eq("default contents", rdata, model[i]);
      expect_eq("default contents, display port", dbg_data, model[31 - i]);
    end
    for (int n = 0; n < 100; n++) begin
      logic [4:0] a;
      logic [7:0] v;
      a = 5'($urandom); v = 8'($urandom);
      @(negedge clk);
      write = 1'b1;            // cycle k: WRITE requested
      @(posedge clk);
      #1;
      write = 1'b0;
      addr = a; wdata = v;     // address and data settle in cycle k+1
      #1;
      expect_eq("no write before the falling edge", rdata, model[a]);
      @(negedge clk);
      #1;
      model[a] = v;
      expect_eq("written byte", rdata, v);
    end
    for (int i = 0; i < 32; i++) begin
      dbg_addr = 5'(i);
      #1;
      expect_eq("final contents", dbg_data, model[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
