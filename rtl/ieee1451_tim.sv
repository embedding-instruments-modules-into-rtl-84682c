// ieee1451_tim: the Transducer Interface Module (TIM) of an IEEE1451.0 weblab,
// as one FPGA design: the IEEE1451-module (UART, decoder/controller, TEDS
// controller, status/state) with a bipolar step-motor controller bound to
// one transducer channel, number TC_ID (1 by default).
//
// The NCAP (a networked computer that turns IEEE1451-HTTP requests into
// low-level commands) talks to the TIM over RS-232 on rs232_rx/rs232_tx; see
// decoder_controller for the frame layout and the commands. The TC bus
// between the decoder/controller's tasks and the I&M is a tc_bus_if instance
// driven by tc_handshake_master. The step-motor I&M runs its sequence logic
// on clk_external and drives the six motor lines data_out[5:0] =
// {EN_B, EN_A, B2, B1, A2, A1}.
//
// Clocks: clk is the system clock and the TC bus clock; clk_external sets the
// motor speed (step period = 2 * time divider cycles of clk_external).
// rst_n is an asynchronous active-low reset for both domains; it must be
// released synchronously to each clock by the board. After reset the
// decoder/controller initialises the channel by itself (init task), then
// waits for commands.
module ieee1451_tim
  import ieee1451_pkg::*;
#(
  parameter logic [15:0] TC_ID        = 16'd1,
  parameter int unsigned CLKS_PER_BIT = 434,
  parameter int unsigned TEDS_BYTES   = 64,
  parameter int unsigned MAX_DS       = 16,
  parameter int unsigned MAX_SEG      = 32,
  parameter int unsigned HS_TIMEOUT   = 65535
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rs232_rx,
  output logic       rs232_tx,
  input  logic       clk_external,
  output logic [5:0] data_out
);
  // UART
  logic [7:0] rx_data, tx_data;
  logic       rx_valid, rx_frame_err, tx_start, tx_busy;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rx(rs232_rx), .data(rx_data), .valid(rx_valid),
    .frame_err(rx_frame_err)
  );
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .data(tx_data), .start(tx_start), .busy(tx_busy),
    .tx(rs232_tx)
  );

  // TEDS controller
  logic [7:0] teds_sel, teds_addr, teds_wdata, teds_rdata;
  logic       teds_we, teds_sel_ok;

  teds_controller #(.TEDS_BYTES(TEDS_BYTES)) u_teds (
    .clk, .rst_n, .sel(teds_sel), .addr(teds_addr), .we(teds_we),
    .wdata(teds_wdata), .rdata(teds_rdata), .sel_ok(teds_sel_ok)
  );

  // status / state
  logic       st_we, cmd_done, cmd_rejected, im_error_flag, status_read, im_en;
  tc_state_e  st_wdata, tc_state;
  logic [7:0] status;

  status_state u_status (
    .clk, .rst_n, .state_we(st_we), .state_wdata(st_wdata), .cmd_done,
    .cmd_rejected, .im_error(im_error_flag), .status_read, .state(tc_state),
    .status, .im_en
  );

  // TC bus of channel 1 and its handshake engine
  tc_bus_if tc1 ();
  logic       im_rst, hs_req, hs_finish, hs_ack, hs_ended, hs_timeout;
  acc_t       hs_acc;
  logic [7:0] hs_wdata, hs_rdata;

  tc_handshake_master #(.TIMEOUT(HS_TIMEOUT)) u_hs (
    .clk, .rst_n, .bus(tc1.master), .im_en, .im_rst, .req(hs_req),
    .op_finish(hs_finish), .acc(hs_acc), .wdata(hs_wdata), .ack(hs_ack),
    .rdata(hs_rdata), .ended(hs_ended), .timeout(hs_timeout)
  );

  decoder_controller #(
    .TC_ID(TC_ID), .MAX_DS(MAX_DS), .MAX_SEG(MAX_SEG), .TEDS_BYTES(TEDS_BYTES)
  ) u_dec (
    .clk, .rst_n,
    .rx_data, .rx_valid, .rx_err(rx_frame_err), .tx_data, .tx_start, .tx_busy,
    .teds_sel, .teds_addr, .teds_we, .teds_wdata, .teds_rdata, .teds_sel_ok,
    .st_we, .st_wdata, .cmd_done, .cmd_rejected, .im_error_flag, .status_read,
    .tc_state, .status,
    .im_rst, .im_error(tc1.error), .im_event(tc1.event_),
    .hs_req, .hs_finish, .hs_acc, .hs_wdata, .hs_ack, .hs_rdata, .hs_ended,
    .hs_timeout
  );

  // the step-motor I&M on channel 1
  step_motor_controller u_motor (
    .rst_n, .bus(tc1.slave), .clk_external, .data_out
  );
endmodule
