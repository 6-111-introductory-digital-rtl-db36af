// SRAM memory tester: checks that 16 locations x 4 bits of a 6264 static
// RAM, and the wiring between it and the FPGA, can each hold a 0 and a 1.
// The external reset is synchronized and starts the test; a divider makes
// the 1 Hz enable that paces one read or write per second; the tester FSM
// drives the SRAM and the write, read, fail and pass LEDs. Address and data
// of the current operation are brought out for a hex display.
// The SRAM data pins are split into sram_dout, sram_doe (drive enable) and
// sram_din: the bidirectional pad is outside this module. The upper address
// pins are grounded and the chip selects tied active on the board.
// The test itself follows the lab description; the synchronizer on reset
// and CLK_HZ (an assumed clock frequency) are this design's choices.
module mem_tester
  import mt_pkg::*;
#(
  parameter int unsigned CLK_HZ = 1_843_200
) (
  input  logic          clk,
  input  logic          reset,
  output logic [AW-1:0] sram_addr,
  output logic [DW-1:0] sram_dout,
  output logic          sram_doe,
  input  logic [DW-1:0] sram_din,
  output logic          sram_we_n,
  output logic          sram_oe_n,
  output logic [AW-1:0] disp_addr,
  output logic [DW-1:0] disp_data,
  output logic          led_write,
  output logic          led_read,
  output logic          led_fail,
  output logic          led_pass
);

  logic reset_sync, tick;

  synchronizer #(.WIDTH(1)) u_sync (
    .clk (clk),
    .d   (reset),
    .q   (reset_sync)
  );

  divider #(.CLK_HZ(CLK_HZ)) u_div (
    .clk  (clk),
    .rst  (reset_sync),
    .tick (tick)
  );

  mem_tester_fsm u_fsm (
    .clk       (clk),
    .rst       (reset_sync),
    .tick      (tick),
    .din       (sram_din),
    .addr      (sram_addr),
    .dout      (sram_dout),
    .doe       (sram_doe),
    .we_n      (sram_we_n),
    .oe_n      (sram_oe_n),
    .disp_data (disp_data),
    .led_write (led_write),
    .led_read  (led_read),
    .led_fail  (led_fail),
    .led_pass  (led_pass)
  );

  assign disp_addr = sram_addr;

endmodule
