// can_frame_seq: frame sequencer, the protocol core of the controller.
//
// Groups the three sub-blocks of the document's decomposition: the receiver
// (always listening), the transmitter (started by a host request or by an
// error or overload event of the receiver) and the error management, which
// watches both and decides the node's error state. The receiver works at
// the sample point, the transmitter at the transmission point; both come
// from the bit synchronization block. The transmitter receives the
// receiver's state and counter to compute its next bit, and the receiver the
// transmitter's driven bit to detect bit errors and lost arbitration.
module can_frame_seq (
  input  logic                 clk,
  input  logic                 rst_n,
  // bit synchronization
  input  logic                 tx_point,
  input  logic                 sample_point,
  input  logic                 rx_bit,
  output logic                 can_tx,
  output logic                 hard_sync_en,
  output logic                 tx_dominant,
  // host side
  input  logic                 tx_req,
  input  can_pkg::can_frame_t  tx_frame,
  input  logic                 ovl_req,
  output can_pkg::can_frame_t  rx_frame,
  output logic                 rx_valid,
  output logic                 tx_ok,
  output logic                 arb_lost,
  output logic                 err_det,
  output logic [8:0]           tec,
  output logic [7:0]           rec,
  output logic                 err_passive,
  output logic                 bus_off
);
  import can_pkg::*;

  rx_state_t  rx_state;
  tx_state_t  tx_state;
  logic [6:0] rx_cnt, tx_cnt;
  logic       crc_ok, bus_idle, sof, rx_stuff, ovl_start, dom_after_flag, dom8, err_arb_stuff,
              flag_bit_err;
  logic [4:0] err_code;
  logic       tx_active, tx_chk, tx_arb, tx_start, tx_stuff, recovered;
  err_state_t err_state;

  can_rx u_rx (
    .clk, .rst_n, .sample_point, .rx_bit,
    .tx_bit(can_tx), .tx_active, .tx_chk, .tx_arb, .ovl_req, .err_passive,
    .state(rx_state), .cnt(rx_cnt), .frame(rx_frame), .crc_ok, .hard_sync_en,
    .bus_idle,
    .sof, .stuff_bit(rx_stuff), .rx_valid, .tx_ok, .arb_lost, .err_det,
    .err_code, .ovl_start, .dom_after_flag, .dom8, .err_arb_stuff, .flag_bit_err
  );

  can_tx u_tx (
    .clk, .rst_n, .tx_point,
    .rx_state, .rx_cnt, .rx_bus_idle(bus_idle), .rx_tx_ok(tx_ok), .rx_crc_ok(crc_ok), .err_det, .ovl_start, .arb_lost,
    .err_passive, .bus_off, .tx_req, .tx_frame,
    .tx_out(can_tx), .state(tx_state), .cnt(tx_cnt), .tx_active, .tx_chk, .tx_arb,
    .tx_start, .stuff_sent(tx_stuff)
  );

  can_err u_err (
    .clk, .rst_n, .sample_point, .rx_bit, .err_det, .err_code, .tx_active,
    .dom_after_flag, .dom8, .err_arb_stuff, .flag_bit_err, .rx_valid, .tx_ok, .tec, .rec, .err_state, .err_passive,
    .bus_off, .recovered
  );

  assign tx_dominant = !can_tx;
endmodule
