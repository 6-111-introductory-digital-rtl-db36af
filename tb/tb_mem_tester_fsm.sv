// Self-checking test of the memory tester controller against a model SRAM,
// with the 1 Hz enable replaced by a tick every 6 cycles. A good memory
// must pass with exactly 32 write strobes and the pattern 0x3/0xC then
// 0xC/0x3 seen on the bus; an open data line D[3] must stop the test at
// address 0 with the failure LED and D[0] open at address 1. Address line
// A1 stuck low is a fault this simple test cannot see (the patterns repeat
// every two words), so it must pass.
module tb_mem_tester_fsm;
  import mt_pkg::*;
  logic clk = 0, rst, tick;
  logic [3:0] din, addr, dout, disp_data, open_d;
  logic doe, we_n, oe_n, led_write, led_read, led_fail, led_pass, short_a1;
  int checks = 0, failures = 0;
  int tcnt;
  int wr_seen [$];
  logic [3:0] wr_addr [$];

  mem_tester_fsm dut (.*);
  sram_6264_model ram (.addr(addr), .dout(dout), .doe(doe), .din(din), .we_n(we_n), .oe_n(oe_n),
                       .open_d(open_d), .short_a1(short_a1));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst || tcnt == 5) tcnt <= 0; else tcnt <= tcnt + 1;
  end
  assign tick = (tcnt == 5);

  // Record every write: data and address at the falling edge of WE.
  always @(negedge we_n) begin
    wr_seen.push_back(int'(dout));
    wr_addr.push_back(addr);
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%s (addr=%0d fail=%b pass=%b)", what, addr, led_fail, led_pass);
    end
  endtask

  // Reset, run until an LED ends the test, return the cycles taken.
  task automatic run(output int cycles);
    wr_seen.delete(); wr_addr.delete();
    for (int i = 0; i < 16; i++) ram.mem[i] = 4'(i);
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    cycles = 0;
    while (!led_fail && !led_pass && cycles < 5000) begin
      @(posedge clk); #1;
      cycles++;
      if (led_write && led_read) check(0, "write and read LEDs both on");
    end
  endtask

  int cyc;
  initial begin
    open_d = 0; short_a1 = 0; rst = 1;
    // Good memory.
    run(cyc);
    check(led_pass && !led_fail, "good memory did not pass");
    check(wr_seen.size() == 32, $sformatf("%0d writes, expected 32", wr_seen.size()));
    for (int i = 0; i < wr_seen.size() && i < 32; i++) begin
      check(wr_addr[i] == 4'(i % 16), $sformatf("write %0d at address %0d", i, wr_addr[i]));
      check(wr_seen[i] == ((((i % 16) % 2) != (i / 16)) ? 12 : 3), $sformatf("write %0d data %0h", i, wr_seen[i]));
    end
    // 64 operations, one per tick of 6 cycles, plus the setup/release cycles.
    check(cyc >= 64 * 6 && cyc <= 64 * 6 + 40, $sformatf("test took %0d cycles", cyc));
    repeat (20) @(posedge clk);
    #1 check(led_pass && !led_write && !led_read, "pass LED not held");
    // D[3] open: 0x3 is read back as 0xB at address 0.
    open_d = 4'b1000;
    run(cyc);
    check(led_fail && !led_pass && addr == 0, "open D[3] not caught at address 0");
    repeat (20) @(posedge clk);
    #1 check(led_fail && addr == 0 && disp_data == 4'hB, "failure not held at address 0 with data 0xB");
    // D[0] open: 0xC reads as 0xD at address 1.
    open_d = 4'b0001;
    run(cyc);
    check(led_fail && addr == 1, "open D[0] not caught at address 1");
    // A1 stuck low: address 2 aliases 0 and 3 aliases 1, which hold the
    // same pattern values, so the test passes.
    open_d = 4'b0000; short_a1 = 1;
    run(cyc);
    check(led_pass, "A1 alias is beyond this test and should pass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
