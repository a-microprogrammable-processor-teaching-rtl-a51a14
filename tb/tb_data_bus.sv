// tb_data_bus: checks the bus multiplexer for every single source and for
// no source: bus value and the value seen by the ALU's direct input.
module tb_data_bus;
  logic       clk = 1'b0;
  logic       rst = 1'b0;
  logic       alu_oe, mbr_oe, const_oe;
  logic [7:0] alu_y, mbr, alu_const, bus, ext;
  int checks = 0, failures = 0;

  data_bus dut (.clk, .rst, .alu_oe, .alu_y, .mbr_oe, .mbr, .const_oe, .alu_const, .bus, .ext);

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
    for (int n = 0; n < 200; n++) begin
      int which;
      @(negedge clk);
      alu_y = 8'($urandom); mbr = 8'($urandom); alu_const = 8'($urandom);
      which = $urandom % 4;
      alu_oe = (which == 1); mbr_oe = (which == 2); const_oe = (which == 3);
      #1;
      case (which)
        0: begin expect_eq("idle bus", bus, 0); expect_eq("idle ext", ext, 0); end
        1: begin expect_eq("ALU on bus", bus, alu_y); expect_eq("ALU not on ext", ext, 0); end
        2: begin expect_eq("MBR on bus", bus, mbr); expect_eq("MBR on ext", ext, mbr); end
        default: begin expect_eq("const on bus", bus, alu_const); expect_eq("const on ext", ext, alu_const); end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
