// Behavioural model of the part of a 6264 8K x 8 static RAM that the
// memory tester uses: 16 words of 4 bits (upper address pins grounded,
// chip selects active). A word is written at the rising edge of we_n
// (the end of the write cycle), from the data the FPGA drives; with oe_n low and we_n high the addressed word is
// returned, otherwise the bus floats and reads as all ones (pull-ups).
// Fault inputs model board wiring errors: open_d bits never reach the RAM
// and read as 1 at the FPGA; short_a1 ties address bit 1 low at the RAM.
// wr_count counts write strobes. Not synthesizable.
module sram_6264_model (
  input  logic [3:0] addr,
  input  logic [3:0] dout,      // data driven by the FPGA
  input  logic       doe,       // FPGA drives the bus
  output logic [3:0] din,       // data seen by the FPGA
  input  logic       we_n,
  input  logic       oe_n,
  input  logic [3:0] open_d,
  input  logic       short_a1
);

  logic [3:0] mem [16];
  logic [3:0] a_eff;
  int wr_count = 0;

  assign a_eff = short_a1 ? (addr & 4'b1101) : addr;

  initial for (int i = 0; i < 16; i++) mem[i] = 4'h0;

  always @(negedge we_n) wr_count++;

  always @(posedge we_n) if (doe) mem[a_eff] <= (mem[a_eff] & open_d) | (dout & ~open_d);

  assign din = doe ? (dout | open_d) : (!oe_n && we_n) ? (mem[a_eff] | open_d) : 4'hF;

endmodule
