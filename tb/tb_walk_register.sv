// Self-checking test of the walk request register against a reference
// set/clear model: reset clears it, a press sets it and it stays set, the
// clear from the controller wins over a press held at the same time.
module tb_walk_register;
  logic clk = 0, rst, wr_sync, wr_reset, wr;
  logic model;
  int checks = 0, failures = 0;

  walk_register dut (.clk(clk), .rst(rst), .wr_sync(wr_sync), .wr_reset(wr_reset), .wr(wr));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic r, input logic s, input logic c);
    @(negedge clk);
    rst = r; wr_sync = s; wr_reset = c;
    @(posedge clk);
    if (r || c) model = 0; else if (s) model = 1;
    #1;
    checks++;
    if (wr !== model) begin
      failures++;
      $display("rst=%b set=%b clr=%b: wr=%b expected %b", r, s, c, wr, model);
    end
  endtask

  initial begin
    step(1, 0, 0);
    step(0, 0, 0);
    step(0, 1, 0);   // press
    step(0, 0, 0);   // held after release
    step(0, 0, 0);
    step(0, 1, 1);   // press during walk service is ignored
    step(0, 0, 1);
    step(0, 0, 0);
    step(0, 1, 0);
    step(1, 1, 0);   // reset wins
    for (int i = 0; i < 300; i++) step($urandom_range(0, 15) == 0, $urandom_range(0, 3) == 0, $urandom_range(0, 4) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
