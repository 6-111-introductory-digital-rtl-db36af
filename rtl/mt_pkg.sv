// Shared types and constants of the SRAM memory tester.
// Sixteen locations of four bits are tested with the two alternating
// patterns 0x3/0xC and then 0xC/0x3 (location 0 first). The state
// encoding is this design's own choice.
package mt_pkg;

  localparam int unsigned AW = 4;  // address bits in use (16 locations)
  localparam int unsigned DW = 4;  // data bits in use

  localparam logic [DW-1:0] PAT_A = 4'h3;
  localparam logic [DW-1:0] PAT_B = 4'hC;

  typedef enum logic [2:0] {
    M_W_SETUP,    // address and data driven, WE high
    M_W_STROBE,   // WE low until the next 1 Hz enable
    M_W_RELEASE,  // WE high again, address and data still held
    M_R_ACCESS,   // OE low, data compared at the next 1 Hz enable
    M_FAIL,       // stopped at the failing address
    M_PASS        // both passes read back correctly
  } mstate_t;

  // Expected value at an even (odd = 0) or odd address in pass 0 (0x3 at
  // even addresses) or pass 1 (0xC at even addresses).
  function automatic logic [DW-1:0] expected(input logic pass, input logic odd);
    return (odd ^ pass) ? PAT_B : PAT_A;
  endfunction

endpackage
