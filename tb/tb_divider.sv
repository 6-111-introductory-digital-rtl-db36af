// Self-checking test of the divider: with CLK_HZ = 10 the tick must be one
// cycle wide and come exactly every 10 cycles, the first 10 cycles after
// reset.
module tb_divider;
  localparam int HZ = 10;
  logic clk = 0, rst, tick;
  int checks = 0, failures = 0;
  int cyc, last;

  divider #(.CLK_HZ(HZ)) dut (.clk(clk), .rst(rst), .tick(tick));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1;
    @(posedge clk); @(negedge clk);
    rst = 0;
    cyc = 0; last = 0;
    for (int i = 0; i < 20 * HZ; i++) begin
      @(posedge clk); #1;
      cyc++;
      if (tick) begin
        checks++;
        if (cyc - last != HZ) begin
          failures++;
          $display("tick after %0d cycles, expected %0d", cyc - last, HZ);
        end
        last = cyc;
      end
    end
    checks++;
    if (last != 20 * HZ) begin
      failures++;
      $display("last tick at cycle %0d, expected %0d", last, 20 * HZ);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
