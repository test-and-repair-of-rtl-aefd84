// rsn_pkg: types and constants shared by the scan-network test-and-repair design.
//
// The command encoding follows the 16-bit command words of the access protocol:
// a word is sent as two UART bytes, most significant byte first. A setup word
// (bit 15 = 0) names one scan register in its low byte and carries the access
// type in bit 14 (0 = iRead, 1 = iWrite). An action word (bit 15 = 1, the
// iApply) carries in its low bits the number of data bytes that follow. The
// two maintenance commands are recognised by their first byte: 0x7F starts the
// built-in test (iTest) and 0x7E loads the fault list into the repair
// component (iRepair). The 8-bit address width is this design's choice; it
// matches the 8-bit fault-location counter of the repair component.
package rsn_pkg;

  localparam int unsigned ADDR_W = 8;

  localparam logic [7:0] CMD_ITEST_BYTE   = 8'h7F;
  localparam logic [7:0] CMD_IREPAIR_BYTE = 8'h7E;

  // Control bundle driven into the flat network by whichever controller owns it.
  typedef struct packed {
    logic si;          // serial data into the first SIB segment (TDI)
    logic shift_en;
    logic capture_en;
    logic update_en;
  } scan_ctrl_t;

  // Serial test pattern bit k (k = 0 is shifted first): 1,0,1,0,...
  // This reproduces the per-register pattern 10101010 of the test function.
  function automatic logic test_bit(input int unsigned k);
    return ~k[0];
  endfunction

endpackage
