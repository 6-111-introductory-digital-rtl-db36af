// Self-checking test of the memory tester with its synchronizer and
// divider, at a scaled clock (CLK_HZ = 8). Each read or write must take one
// second (8 cycles), a good memory must pass after 64 operations, and an
// open D[3] must stop the test at address 0 with the failure LED; the
// display must show the address and the data read there.
module tb_mem_tester;
  localparam int HZ = 8;
  logic clk = 0, reset;
  logic [3:0] sram_addr, sram_dout, sram_din, disp_addr, disp_data, open_d;
  logic sram_doe, sram_we_n, sram_oe_n, led_write, led_read, led_fail, led_pass;
  int checks = 0, failures = 0;

  mem_tester #(.CLK_HZ(HZ)) dut (.*);
  sram_6264_model ram (.addr(sram_addr), .dout(sram_dout), .doe(sram_doe), .din(sram_din),
                       .we_n(sram_we_n), .oe_n(sram_oe_n), .open_d(open_d), .short_a1(1'b0));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%s", what);
    end
  endtask

  int cyc, wr0;

  task automatic run();
    #3 reset = 1;
    repeat (3) @(posedge clk);
    #3 reset = 0;
    cyc = 0; wr0 = ram.wr_count;
    while (!led_fail && !led_pass && cyc < 2000) begin
      @(posedge clk); #1;
      cyc++;
      if (disp_addr != sram_addr) check(0, "display address differs");
    end
  endtask

  initial begin
    open_d = 0;
    run();
    check(led_pass && !led_fail, "good memory did not pass");
    check(ram.wr_count - wr0 == 32, $sformatf("%0d write strobes, expected 32", ram.wr_count - wr0));
    check(cyc >= 64 * HZ - 2 && cyc <= 64 * HZ + 6, $sformatf("test took %0d cycles, expected %0d", cyc, 64 * HZ));
    open_d = 4'b1000;
    run();
    check(led_fail && sram_addr == 0 && disp_data == 4'hB, $sformatf("open D[3]: fail=%b addr=%0d data=%h", led_fail, sram_addr, disp_data));
    check(cyc >= 17 * HZ - 2 && cyc <= 17 * HZ + 6, $sformatf("failure after %0d cycles, expected %0d", cyc, 17 * HZ));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
