// Self-checking test of the input synchronizer: random 3-bit inputs must
// appear at q exactly STAGES clock cycles later.
module tb_synchronizer;
  localparam int W = 3, S = 2;
  logic clk = 0;
  logic [W-1:0] d, q;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  synchronizer #(.WIDTH(W), .STAGES(S)) dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (4) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      d = W'($urandom);
      hist.push_back(d);
      @(posedge clk); #1;
      if (hist.size() > S) void'(hist.pop_front());
      if (hist.size() == S) begin
        checks++;
        if (q !== hist[0]) begin
          failures++;
          $display("cycle %0d: q=%b expected %b", i, q, hist[0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
