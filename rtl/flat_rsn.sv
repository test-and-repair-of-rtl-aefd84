// flat_rsn: flat IEEE 1687 reconfigurable scan network of N_SIB segments.
//
// Segment k is a SIB with one LEN-bit scan register behind it; segments are
// chained TDI -> segment 0 -> ... -> segment N_SIB-1 -> TDO. Within a segment
// the scan register sits between the SIB's TSI and FSO, so the SIB's shift
// bit is the last flip-flop of the segment. With every SIB closed the path is
// N_SIB bits long (one per SIB); every open SIB adds LEN bits. Segment 0 is
// the one nearest TDI and is called the first scan register.
//
// fault_mask[k] turns scan register k into a faulty one (an inverter with no
// storage in place of the register's shift stage); it is a
// defect-injection input for evaluation and is tied low in a real chip.
// sel reports which segments are currently included. The flat topology,
// 8-bit registers and network sizes follow the evaluated networks; the
// ordering of segment numbers along the chain is this design's choice.
module flat_rsn #(
  parameter int unsigned N_SIB = 150,
  parameter int unsigned LEN   = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  rsn_pkg::scan_ctrl_t      ctrl,
  output logic                     tdo,
  input  logic [N_SIB-1:0]         fault_mask,
  input  logic [N_SIB-1:0][LEN-1:0] instr_out,
  output logic [N_SIB-1:0][LEN-1:0] instr_in,
  output logic [N_SIB-1:0]         sel
);
  logic [N_SIB:0] chain;   // chain[k] is the TDI of segment k

  assign chain[0] = ctrl.si;
  assign tdo      = chain[N_SIB];

  for (genvar k = 0; k < N_SIB; k++) begin : g_seg
    logic tsi, fso;
    sib u_sib (
      .clk      (clk),
      .rst      (rst),
      .shift_en (ctrl.shift_en),
      .update_en(ctrl.update_en),
      .tdi      (chain[k]),
      .fso      (fso),
      .tsi      (tsi),
      .to_sel   (sel[k]),
      .tdo      (chain[k+1])
    );
    scan_register #(.LEN(LEN)) u_sr (
      .clk       (clk),
      .rst       (rst),
      .sel       (sel[k]),
      .shift_en  (ctrl.shift_en),
      .capture_en(ctrl.capture_en),
      .update_en (ctrl.update_en),
      .si        (tsi),
      .so        (fso),
      .fault     (fault_mask[k]),
      .instr_out (instr_out[k]),
      .instr_in  (instr_in[k])
    );
  end
endmodule
