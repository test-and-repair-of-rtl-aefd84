// rsn_test_repair_top: UART-accessed IEEE 1687 flat scan network with
// built-in test and repair of its scan registers.
//
// The host talks to the chip over one UART (rx/tx). The network controller
// decodes the host's 16-bit commands: setup (iRead/iWrite) and action
// (iApply) commands become scan accesses to the flat network, iTest starts
// the test block and iRepair makes the repair component copy the fault
// locations found by the test. From then on any setup command that names a
// faulty scan register is bypassed, so that register's SIB is never opened
// and the rest of the network stays usable.
//
// Ownership of the network: while the test block is busy it drives the
// network's shift/update/serial-in; otherwise the network controller does.
// The test block also resets the network between its steps (net_clr).
//
// Ports brought out: the instruments' parallel interfaces (instr_out into
// the scan registers, instr_in from their update stages), the SIB select
// lines, a defect-injection mask (fault_mask, a set bit makes that scan
// register invert its scan data; tie low in a real chip) and status. The
// system partition (UART, network controller with repair component, test
// block, flat network) follows the published connection diagram; the
// ownership multiplexer, status ports and the two assertions on the
// network controls are this design's choices.
module rsn_test_repair_top #(
  parameter int unsigned N_SIB        = 150,
  parameter int unsigned LEN          = 8,
  parameter int unsigned CLKS_PER_BIT = 868,
  parameter int unsigned PARITY       = 0
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          uart_rxd,
  output logic                          uart_txd,
  input  logic [N_SIB-1:0]              fault_mask,
  input  logic [N_SIB-1:0][LEN-1:0]     instr_out,
  output logic [N_SIB-1:0][LEN-1:0]     instr_in,
  output logic [N_SIB-1:0]              sib_sel,
  output logic                          test_busy,
  output logic                          repair,
  output logic [N_SIB-1:0]              scr_test,
  output logic [N_SIB-1:0]              fault_valid,
  output logic [15:0]                   bypass_count,
  output logic                          rx_overrun,
  output logic                          rx_frame_err,
  output logic                          rx_parity_err,
  output logic                          ctrl_idle
);
  logic [7:0] rx_data, tx_data;
  logic       rx_valid, tx_start, tx_busy;
  logic       test_en, test_done, net_clr, network_en;
  logic       tdo;

  rsn_pkg::scan_ctrl_t nc_ctrl, tb_ctrl, net_ctrl;
  logic [N_SIB-1:0][rsn_pkg::ADDR_W-1:0] fault_reg;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT), .PARITY(PARITY)) u_rx (
    .clk, .rst, .rx(uart_rxd), .rx_data, .rx_valid,
    .frame_err(rx_frame_err), .parity_err(rx_parity_err)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT), .PARITY(PARITY)) u_tx (
    .clk, .rst, .tx_data, .tx_start, .tx(uart_txd), .busy(tx_busy)
  );

  network_controller #(.N_SIB(N_SIB), .LEN(LEN)) u_nc (
    .clk, .rst, .rx_data, .rx_valid, .tx_data, .tx_start, .tx_busy,
    .test_en, .test_done, .scr_test,
    .ctrl(nc_ctrl), .tdo,
    .fault_valid, .fault_reg, .bypass_count, .overrun(rx_overrun), .idle(ctrl_idle)
  );

  test_block #(.N_SIB(N_SIB), .LEN(LEN)) u_test (
    .clk, .rst, .test_en, .sib_in(tdo),
    .ctrl(tb_ctrl), .network_en, .net_clr, .test_done, .busy(test_busy),
    .fulltest(), .onebyone(), .scr_test, .repair
  );

  assign net_ctrl = network_en ? tb_ctrl : (test_busy ? '0 : nc_ctrl);

  // the network sees at most one of shift, capture and update per cycle, and
  // the access controller leaves it alone while a test runs
  a_one_scan_op: assert property (@(posedge clk) disable iff (rst)
    $onehot0({net_ctrl.shift_en, net_ctrl.capture_en, net_ctrl.update_en}));
  a_test_owns_network: assert property (@(posedge clk) disable iff (rst)
    test_busy |-> (nc_ctrl == '0));

  flat_rsn #(.N_SIB(N_SIB), .LEN(LEN)) u_net (
    .clk, .rst(rst || net_clr), .ctrl(net_ctrl), .tdo,
    .fault_mask, .instr_out, .instr_in, .sel(sib_sel)
  );
endmodule
