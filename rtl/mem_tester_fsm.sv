// Memory tester controller for 16 locations x 4 bits of a 6264 SRAM.
// Pass 0 writes 0x3, 0xC, 0x3, ... to addresses 0..15, then reads 0..15
// back and checks each word; pass 1 does the same with 0xC, 0x3, ... .
// All writes of a pass come before its reads, so a value left floating on
// the data wires cannot fake a good read. One operation is done per 1 Hz
// enable (tick) so that address and data can be watched on a display.
// A write spans three states: SETUP drives address and data with WE high,
// STROBE pulls WE low until the next tick, RELEASE raises WE again while
// address and data are still held, so the address never changes while WE
// is low. A read holds OE low for a whole second; the data bus is
// registered every cycle and the registered word is compared at the tick.
// On a mismatch the tester stops with the failing address and the data
// read still shown and led_fail set; after both passes led_pass is set.
// Reset restarts the test. din is asynchronous; all outputs are registered
// state or decodes of it.
// The patterns, their order, the write-all-then-read rule, the LEDs and
// stopping at a failed address follow the lab description; the state
// split, the one-second strobe and the read timing are this design's.
module mem_tester_fsm
  import mt_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          tick,
  input  logic [DW-1:0] din,
  output logic [AW-1:0] addr,
  output logic [DW-1:0] dout,
  output logic          doe,
  output logic          we_n,
  output logic          oe_n,
  output logic [DW-1:0] disp_data,
  output logic          led_write,
  output logic          led_read,
  output logic          led_fail,
  output logic          led_pass
);

  mstate_t       state;
  logic          pass;
  logic [DW-1:0] rd_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= M_W_SETUP;
      addr  <= '0;
      pass  <= 1'b0;
      rd_q  <= '0;
    end else begin
      rd_q <= din;
      unique case (state)
        M_W_SETUP:  state <= M_W_STROBE;
        M_W_STROBE: if (tick) state <= M_W_RELEASE;
        M_W_RELEASE: begin
          addr <= addr + 1'b1;
          state <= (addr == '1) ? M_R_ACCESS : M_W_SETUP;
        end
        M_R_ACCESS: if (tick) begin
          if (rd_q != expected(pass, addr[0])) begin
            state <= M_FAIL;
          end else if (addr == '1) begin
            addr <= '0;
            if (pass) state <= M_PASS;
            else begin
              pass  <= 1'b1;
              state <= M_W_SETUP;
            end
          end else begin
            addr <= addr + 1'b1;
          end
        end
        M_FAIL:  ;
        M_PASS:  ;
        default: state <= M_FAIL;
      endcase
    end
  end

  assign dout      = expected(pass, addr[0]);
  assign doe       = (state inside {M_W_SETUP, M_W_STROBE, M_W_RELEASE});
  assign we_n      = (state != M_W_STROBE);
  assign oe_n      = !(state inside {M_R_ACCESS, M_FAIL});
  assign led_write = doe;
  assign led_read  = (state == M_R_ACCESS);
  assign led_fail  = (state == M_FAIL);
  assign led_pass  = (state == M_PASS);
  assign disp_data = doe ? dout : rd_q;

  // The address and the written data stay put for every cycle WE is low,
  // and the FPGA never drives the bus while the SRAM may.
  a_we_drive: assert property (@(posedge clk) disable iff (rst) !we_n |-> doe && oe_n);
  a_we_addr:  assert property (@(posedge clk) disable iff (rst) !we_n |=> $stable(addr));
  a_oe_bus:   assert property (@(posedge clk) disable iff (rst) !oe_n |-> !doe);

endmodule
