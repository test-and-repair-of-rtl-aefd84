// sib: Segment Insertion Bit of an IEEE 1687 flat network.
//
// A shift flip-flop S and an update flip-flop U. Mux H selects the bit that
// reaches S: the serial input TDI while U = 0 (segment excluded) or the return
// from the scan register behind the SIB, FSO, while U = 1 (segment included).
// With shift_en = 1 the output of H is clocked into S (mux K1), otherwise S
// holds. With update_en = 1 S is copied into U (mux K2), otherwise U holds.
// TDO is S.Q, TSI is TDI passed on to the segment and ToSel is U.Q, which
// selects the segment. capture_en has no effect on the SIB itself and is only
// routed to the segment, as in the reference schematic. This follows the
// published SIB schematic; the synchronous, active-high reset stands for its
// CLR inputs (the schematic shows a reset but not its polarity or timing).
module sib (
  input  logic clk,
  input  logic rst,        // clears S and U: segment excluded
  input  logic shift_en,
  input  logic update_en,
  input  logic tdi,
  input  logic fso,        // from the segment behind the SIB
  output logic tsi,        // to the segment behind the SIB
  output logic to_sel,     // segment selected
  output logic tdo
);
  logic s_q, u_q, h_out;

  assign h_out  = u_q ? fso : tdi;
  assign tsi    = tdi;
  assign to_sel = u_q;
  assign tdo    = s_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      s_q <= 1'b0;
      u_q <= 1'b0;
    end else begin
      if (shift_en)  s_q <= h_out;
      if (update_en) u_q <= s_q;
    end
  end
endmodule
