// scan_register: the instrument data register behind one SIB.
//
// A LEN-bit shift stage sr and a LEN-bit update stage. Bits enter at the top
// (sr[LEN-1]) and leave at the bottom (sr[0]), so a byte shifted in LSB first
// lands as sr = byte and the captured value leaves LSB first. While the owning
// SIB selects the segment (sel = 1): capture_en loads the instrument's
// output, shift_en shifts, update_en copies sr to the instrument's input.
// When not selected the register holds and its update stage keeps driving
// the instrument.
//
// The fault input models the defect used to evaluate the test function: a
// faulty register is replaced by a plain inverter on its scan path, so its
// serial output is the complement of its serial input, with no storage in
// between (the segment loses its LEN bits and inverts what passes). It is
// tied low in a fault-free chip.
// The length of 8 follows the evaluated networks; the shift direction,
// capture/update behaviour and the fault model's form are this design's
// choices. Timing: one shift per clock with shift_en = 1.
module scan_register #(
  parameter int unsigned LEN = 8
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           sel,
  input  logic           shift_en,
  input  logic           capture_en,
  input  logic           update_en,
  input  logic           si,
  output logic           so,
  input  logic           fault,
  input  logic [LEN-1:0] instr_out,   // value read from the instrument
  output logic [LEN-1:0] instr_in     // value written to the instrument
);
  logic [LEN-1:0] sr, upd;

  assign so       = fault ? ~si : sr[0];
  assign instr_in = upd;

  always_ff @(posedge clk) begin
    if (rst) begin
      sr  <= '0;
      upd <= '0;
    end else if (sel) begin
      if (capture_en)    sr <= instr_out;
      else if (shift_en) sr <= {si, sr[LEN-1:1]};
      if (update_en)     upd <= sr;
    end
  end
endmodule
