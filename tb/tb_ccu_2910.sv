// tb_ccu_2910: directed test of the microsequencer.
//
// Applies a sequence of next-address instructions with chosen D and
// condition inputs and compares the next address Y (before each clock edge)
// with values worked out by hand from the Am2910 instruction definitions:
// continue, conditional jump, subroutine call and return, counter loops
// (LDCT/RPCT, PUSH/RFCT), register jumps, map jump, LOOP, three-way branch,
// CJPP, JSRP, stack full and stack clear by JZ. Also checks the D-source
// enables.
module tb_ccu_2910;
  import mpp_pkg::*;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  nas_e       op = NAS_CONT;
  logic [7:0] d = '0;
  logic       cc_n = 1'b1;
  logic [7:0] y, upc, count;
  logic       pl_n, map_n, vect_n, full_n;
  int checks = 0, failures = 0;

  ccu_2910 dut (.clk, .rst, .op, .d, .cc_n, .y, .pl_n, .map_n, .vect_n,
                .full_n, .upc, .count);

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // One micro-cycle: apply inputs, check Y, clock.
  task automatic step(input nas_e o, input logic [7:0] dd, input logic c_n,
                      input logic [7:0] exp_y);
    @(negedge clk);
    op = o; d = dd; cc_n = c_n;
    #1;
    expect_eq($sformatf("Y for %s", o.name()), y, exp_y);
    @(posedge clk);
  endtask

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    step(NAS_JZ,   8'h55, 1, 8'h00);
    step(NAS_CONT, 8'h55, 1, 8'h01);
    step(NAS_CJP,  8'h10, 1, 8'h02);   // fail
    step(NAS_CJP,  8'h10, 0, 8'h10);   // pass
    step(NAS_CJS,  8'h40, 0, 8'h40);   // call, pushes 11h
    step(NAS_CONT, 8'h00, 1, 8'h41);
    step(NAS_CRTN, 8'h00, 1, 8'h42);   // fail: continue
    step(NAS_CRTN, 8'h00, 0, 8'h11);   // return
    step(NAS_LDCT, 8'h02, 1, 8'h12);
    #1 expect_eq("counter loaded", count, 2);
    step(NAS_RPCT, 8'h30, 1, 8'h30);
    step(NAS_RPCT, 8'h30, 1, 8'h30);
    step(NAS_RPCT, 8'h30, 1, 8'h31);   // counter reached zero
    step(NAS_PUSH, 8'h01, 0, 8'h32);   // push 32h, counter <- 1
    step(NAS_CONT, 8'h00, 1, 8'h33);
    step(NAS_RFCT, 8'h00, 1, 8'h32);   // counter 1 -> 0, back to top
    step(NAS_CONT, 8'h00, 1, 8'h33);
    step(NAS_RFCT, 8'h00, 1, 8'h34);   // counter 0: fall out, pop
    step(NAS_JRP,  8'h70, 1, 8'h01);   // fail: register (loaded by PUSH)
    step(NAS_JRP,  8'h70, 0, 8'h70);
    @(negedge clk); op = NAS_JMAP; #1;
    expect_eq("map_n on JMAP", map_n, 0);
    expect_eq("pl_n on JMAP", pl_n, 1);
    step(NAS_JMAP, 8'h99, 1, 8'h99);
    step(NAS_PUSH, 8'h07, 1, 8'h9A);   // push 9Ah, no counter load
    #1 expect_eq("counter not loaded on failed PUSH", count, 0);
    step(NAS_LOOP, 8'h00, 1, 8'h9A);   // fail: loop back
    step(NAS_LOOP, 8'h00, 0, 8'h9B);   // pass: exit, pop
    step(NAS_PUSH, 8'h01, 0, 8'h9C);   // push 9Ch, counter <- 1
    step(NAS_TWB,  8'hC0, 1, 8'h9C);   // counter 1: loop to F
    step(NAS_TWB,  8'hC0, 1, 8'hC0);   // counter 0, fail: D, pop
    step(NAS_PUSH, 8'h00, 1, 8'hC1);   // push C1h
    step(NAS_CJPP, 8'h20, 0, 8'h20);   // jump and pop
    step(NAS_JSRP, 8'h50, 1, 8'h01);   // fail: R, push 21h
    step(NAS_CRTN, 8'h00, 0, 8'h21);
    step(NAS_CJV,  8'h66, 0, 8'h66);
    // Fill the stack: five calls.
    for (int i = 0; i < 5; i++) step(NAS_CJS, 8'h80 + 8'(i), 0, 8'h80 + 8'(i));
    #1 expect_eq("stack full", full_n, 0);
    step(NAS_CRTN, 8'h00, 0, 8'h84);   // return address of the last call
    #1 expect_eq("stack no longer full", full_n, 1);
    step(NAS_JZ, 8'h00, 1, 8'h00);
    #1 expect_eq("stack cleared", full_n, 1);
    step(NAS_CRTN, 8'h00, 1, 8'h01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
