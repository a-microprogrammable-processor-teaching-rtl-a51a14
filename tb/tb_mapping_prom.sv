// tb_mapping_prom: checks the opcode-to-micro-address table.
//
// The default table must send opcode 01h to 19h, 02h to 0Bh and all other
// opcodes to 00h; a second instance with table entry i = 255 - 7i checks
// that all 32 entries are reachable.
module tb_mapping_prom;
  import mpp_pkg::*;

  function automatic map_array_t pattern();
    map_array_t m;
    for (int i = 0; i < 32; i++) m[i] = 8'(255 - 7 * i);
    return m;
  endfunction

  logic [4:0] opcode;
  logic [7:0] addr, addr2;
  int checks = 0, failures = 0;

  mapping_prom dut (.opcode, .addr);
  mapping_prom #(.TABLE(pattern())) dut2 (.opcode, .addr(addr2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp;
    for (int i = 0; i < 32; i++) begin
      opcode = 5'(i);
      #1;
      exp = (i == 1) ? 8'h19 : (i == 2) ? 8'h0B : 8'h00;
      checks += 2;
      if (addr !== exp) begin failures++; $display("FAIL default opcode %0d -> %0h", i, addr); end
      if (addr2 !== 8'(255 - 7 * i)) begin failures++; $display("FAIL table opcode %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
