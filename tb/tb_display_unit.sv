// tb_display_unit: checks every switch setting of the display selector
// against the documented encoding, with random values on all inputs.
module tb_display_unit;
  import mpp_pkg::*;

  logic [5:0] sel;
  logic [3:0] reg_addr;
  logic [4:0] mem_addr;
  logic [7:0] reg_data, mem_data, seq_y, ir_msb, ir_lsb, mar, mbr, bus, q, upc, count, leds;
  flags_t     mflags, uflags;
  int checks = 0, failures = 0;

  display_unit dut (.sel, .reg_addr, .reg_data, .mem_addr, .mem_data, .seq_y,
                    .ir_msb, .ir_lsb, .mar, .mbr, .bus, .q, .mflags, .uflags,
                    .upc, .count, .leds);

  // register file and memory stand-ins: data = function of the address
  assign reg_data = {4'hA, reg_addr};
  assign mem_data = {3'b110, mem_addr};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp;
    for (int rep = 0; rep < 4; rep++) begin
      for (int s = 0; s < 64; s++) begin
        seq_y = 8'($urandom); ir_msb = 8'($urandom); ir_lsb = 8'($urandom);
        mar = 8'($urandom); mbr = 8'($urandom); bus = 8'($urandom); q = 8'($urandom);
        upc = 8'($urandom); count = 8'($urandom);
        mflags = 4'($urandom); uflags = 4'($urandom);
        sel = 6'(s);
        #1;
        if (s >= 32) exp = {3'b110, 5'(s - 32)};
        else if (s < 16) exp = {4'hA, 4'(s)};
        else begin
          case (s - 16)
            0: exp = seq_y;  1: exp = ir_msb; 2: exp = ir_lsb; 3: exp = mar;
            4: exp = mbr;    5: exp = bus;    6: exp = q;      7: exp = {mflags, uflags};
            8: exp = upc;    9: exp = count;  default: exp = 8'h00;
          endcase
        end
        checks++;
        if (leds !== exp) begin failures++; $display("FAIL sel %0d: %0h vs %0h", s, leds, exp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
