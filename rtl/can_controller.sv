// can_controller: one CAN node, top level.
//
// The three blocks of the document's block diagram: the host interface
// (registers, transmit buffer, double receive buffer), the frame sequencer
// (receiver, transmitter, error management) and the bit synchronization.
// The node talks to the bus through a transceiver outside this design:
// 'can_tx' is the bit to drive (0 = dominant) and 'can_rx' the bus level
// read back; the bus itself is a wired AND of all nodes' outputs.
// Everything runs on the single clock 'clk' with an asynchronous active-low
// reset; 'can_rx' may be asynchronous to it. Host bus: see can_host_if.
module can_controller (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       can_rx,
  output logic       can_tx,
  input  logic [4:0] addr,
  input  logic       wr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       irq
);
  import can_pkg::*;

  logic       tx_point, sample_point, rx_bit, bus_now, hard_sync, resync;
  logic       hard_sync_en, tx_dominant;
  logic [7:0] brp;
  logic [4:0] seg1;
  logic [3:0] seg2;
  logic [1:0] sjw;
  logic       tx_req, ovl_req, rx_valid, tx_ok, arb_lost, err_det;
  logic       err_passive, bus_off, release_buf, vis_full, hid_full, overrun, transfer;
  logic [8:0] tec;
  logic [7:0] rec;
  can_frame_t tx_frame, rx_frame, vis_frame;

  can_bit_sync u_bs (
    .clk, .rst_n, .can_rx, .brp, .seg1, .seg2, .sjw, .hard_sync_en, .tx_dominant,
    .tx_point, .sample_point, .rx_bit, .bus_now, .hard_sync, .resync
  );

  can_frame_seq u_fs (
    .clk, .rst_n, .tx_point, .sample_point, .rx_bit, .can_tx, .hard_sync_en,
    .tx_dominant, .tx_req, .tx_frame, .ovl_req, .rx_frame, .rx_valid, .tx_ok,
    .arb_lost, .err_det, .tec, .rec, .err_passive, .bus_off
  );

  can_rx_buffer u_rxb (
    .clk, .rst_n, .rx_frame, .rx_valid, .release_buf, .vis_frame, .vis_full,
    .hid_full, .ovl_req, .overrun, .transfer
  );

  can_host_if u_host (
    .clk, .rst_n, .addr, .wr, .wdata, .rdata, .irq, .tx_req, .tx_frame, .tx_ok,
    .arb_lost, .err_det, .tec, .rec, .err_passive, .bus_off,
    .rx_frame(vis_frame), .rx_full(vis_full), .overrun, .release_buf,
    .brp, .seg1, .seg2, .sjw
  );
endmodule
