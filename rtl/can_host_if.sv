// can_host_if: host interface of the CAN controller.
//
// The document keeps the connection to the host CPU in a block of its own so
// that it can be adapted to each host; this design gives it a simple
// byte-wide register bus (write strobe, combinational read). It holds the
// transmit buffer and the transmit request, the bit timing registers, the
// interrupt enables and the sticky status flags, and shows the visible
// receive buffer and the error counters.
//
// Register map (address: meaning):
//   0x00 W  command: bit0 request transmission, bit1 abort the pending
//           request (a frame already on the bus is finished), bit2 release
//           the receive buffer
//   0x01 R  status {bus_off, err_passive, overrun, err_seen, arb_lost_seen,
//           tx_done, tx_pending, rx_full}; W writing 1 clears bits 2..4
//   0x02 RW prescaler (TQ = value+1 clocks)   0x03 RW seg1 (TQ, sync incl.)
//   0x04 RW seg2 (TQ)                         0x05 RW SJW (TQ, 1..3; 0 = 4)
//   0x06 R  TEC (255 when above)              0x07 R  REC
//   0x08 RW TX identifier[10:3]   0x09 RW {identifier[2:0], RTR, DLC}
//   0x0A..0x11 RW TX data bytes 0..7
//   0x12 R  RX identifier[10:3]   0x13 R  {identifier[2:0], RTR, DLC}
//   0x14..0x1B R  RX data bytes 0..7
//   0x1C RW interrupt enable {err_seen, tx_done, rx_full}
// 'irq' is the OR of the enabled flags. Register writes take effect in the
// next cycle; a write while the message is pending is not blocked.
module can_host_if #(
  parameter logic [7:0] DEF_BRP  = 8'd1,   // reset bit timing: 2 clocks/TQ,
  parameter logic [4:0] DEF_SEG1 = 5'd7,   // 7+3 = 10 TQ per bit
  parameter logic [3:0] DEF_SEG2 = 4'd3,
  parameter logic [1:0] DEF_SJW  = 2'd1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host bus
  input  logic [4:0]           addr,
  input  logic                 wr,
  input  logic [7:0]           wdata,
  output logic [7:0]           rdata,
  output logic                 irq,
  // to/from the frame sequencer
  output logic                 tx_req,
  output can_pkg::can_frame_t  tx_frame,
  input  logic                 tx_ok,
  input  logic                 arb_lost,
  input  logic                 err_det,
  input  logic [8:0]           tec,
  input  logic [7:0]           rec,
  input  logic                 err_passive,
  input  logic                 bus_off,
  // receive buffer
  input  can_pkg::can_frame_t  rx_frame,
  input  logic                 rx_full,
  input  logic                 overrun,
  output logic                 release_buf,
  // bit timing
  output logic [7:0]           brp,
  output logic [4:0]           seg1,
  output logic [3:0]           seg2,
  output logic [1:0]           sjw
);
  import can_pkg::*;

  logic       tx_done, arb_seen, err_seen;
  logic [2:0] irq_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_req <= 1'b0; tx_frame <= '0; tx_done <= 1'b0; arb_seen <= 1'b0;
      err_seen <= 1'b0; irq_en <= '0; release_buf <= 1'b0;
      brp <= DEF_BRP; seg1 <= DEF_SEG1; seg2 <= DEF_SEG2; sjw <= DEF_SJW;
    end else begin
      release_buf <= 1'b0;
      if (tx_ok)    begin tx_req <= 1'b0; tx_done <= 1'b1; end
      if (arb_lost) arb_seen <= 1'b1;
      if (err_det)  err_seen <= 1'b1;
      if (wr) begin
        unique case (addr) inside
          5'h00: begin
            if (wdata[0]) begin tx_req <= 1'b1; tx_done <= 1'b0; end
            if (wdata[1]) tx_req <= 1'b0;
            if (wdata[2]) release_buf <= 1'b1;
          end
          5'h01: begin
            if (wdata[2]) tx_done  <= 1'b0;
            if (wdata[3]) arb_seen <= 1'b0;
            if (wdata[4]) err_seen <= 1'b0;
          end
          5'h02: brp  <= wdata;
          5'h03: seg1 <= wdata[4:0];
          5'h04: seg2 <= wdata[3:0];
          5'h05: sjw  <= wdata[1:0];
          5'h08: tx_frame.id[10:3] <= wdata;
          5'h09: {tx_frame.id[2:0], tx_frame.rtr, tx_frame.dlc} <= wdata;
          [5'h0A:5'h11]: tx_frame.data[addr - 5'h0A] <= wdata;
          5'h1C: irq_en <= wdata[2:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rdata = '0;
    unique case (addr) inside
      5'h01: rdata = {bus_off, err_passive, overrun, err_seen, arb_seen,
                      tx_done, tx_req, rx_full};
      5'h02: rdata = brp;
      5'h03: rdata = {3'b0, seg1};
      5'h04: rdata = {4'b0, seg2};
      5'h05: rdata = {6'b0, sjw};
      5'h06: rdata = tec[8] ? 8'hFF : tec[7:0];
      5'h07: rdata = rec;
      5'h08: rdata = tx_frame.id[10:3];
      5'h09: rdata = {tx_frame.id[2:0], tx_frame.rtr, tx_frame.dlc};
      [5'h0A:5'h11]: rdata = tx_frame.data[addr - 5'h0A];
      5'h12: rdata = rx_frame.id[10:3];
      5'h13: rdata = {rx_frame.id[2:0], rx_frame.rtr, rx_frame.dlc};
      [5'h14:5'h1B]: rdata = rx_frame.data[addr - 5'h14];
      5'h1C: rdata = {5'b0, irq_en};
      default: rdata = '0;
    endcase
  end

  assign irq = |(irq_en & {err_seen, tx_done, rx_full});
endmodule
