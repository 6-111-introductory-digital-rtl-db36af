// Self-checking test of the time parameter memory: reset values 6, 3, 2 at
// parameter numbers 00, 01, 10; parameter 11 reads 0; reprogramming writes
// only the selected entry; random writes checked against a reference array.
module tb_time_parameters;
  import tl_pkg::*;
  logic clk = 0, rst, prog;
  logic [1:0] sel;
  logic [3:0] time_value, value;
  interval_t interval;
  logic [3:0] model [4];
  int checks = 0, failures = 0;

  time_parameters dut (.clk(clk), .rst(rst), .prog(prog), .sel(sel), .time_value(time_value),
                       .interval(interval), .value(value));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < 4; a++) begin
      interval = interval_t'(a);
      #1;
      checks++;
      if (value !== model[a]) begin
        failures++;
        $display("param %0d: value=%0d expected %0d", a, value, model[a]);
      end
    end
  endtask

  initial begin
    rst = 1; prog = 0; sel = 0; time_value = 0; interval = P_BASE;
    @(posedge clk); @(negedge clk);
    rst = 0;
    model = '{4'd6, 4'd3, 4'd2, 4'd0};
    check_all();
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      sel = 2'($urandom); time_value = 4'($urandom); prog = ($urandom_range(0, 2) == 0);
      @(posedge clk);
      if (prog && sel != 2'b11) model[sel] = time_value;
      @(negedge clk);
      prog = 0;
      check_all();
    end
    @(negedge clk);
    rst = 1;
    @(negedge clk);
    rst = 0;
    model = '{4'd6, 4'd3, 4'd2, 4'd0};
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
