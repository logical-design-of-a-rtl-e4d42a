// can_tx: transmitter of the frame sequencer.
//
// The transmitter puts a new bit on the bus at each transmission point, one
// bit ahead of the receiver, which only samples that bit at the following
// sample point. As the document proposes, it has its own state machine and
// bit counter ('state'/'cnt' name the bit being driven), advanced at the
// transmission point: the same field states as the receiver, except that
// TX_EOF covers CRC delimiter, ACK slot, ACK delimiter, end of frame and the
// first two intermission bits, which a transmitter sends recessive. The next
// bit is computed in the seg2 time between the sample point and the
// transmission point from the states and counters of both machines:
//  * idle: a dominant ACK bit when the receiver is at the ACK slot of a frame
//    whose CRC was correct; a start of frame when a message is pending and
//    the bus is idle or in the third intermission bit; recessive otherwise.
//    As in the CAN 2.0 specification, an error-passive node that has just
//    transmitted waits 8 more bit times of idle bus before it starts again
//    (suspend transmission), unless another node starts a frame first;
//  * sending a frame: start of frame, identifier, RTR, IDE=0, r0=0, DLC,
//    data and the CRC-15 computed on the fly, with a complementary stuff bit
//    after five equal bits;
//  * error flag (6 dominant bits, recessive for an error-passive node),
//    overload flag (6 dominant bits) and recessive delimiter, started by the
//    receiver's error and overload events.
// The receiver's events (one-cycle pulses right after the sample point) act
// at once: an error moves the machine
// to TX_ERR_FL, an overload to TX_OVL_FL, lost arbitration back to TX_IDLE,
// where the message stays pending for a new attempt. 'tx_out' changes in the
// cycle after 'tx_point'. A bus-off node drives recessive only.
// What each field holds follows the CAN 2.0 standard frame; the split into
// states follows the document; the interface is this design's.
module can_tx (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tx_point,
  // from the receiver
  input  can_pkg::rx_state_t   rx_state,
  input  logic [6:0]           rx_cnt,
  input  logic                 rx_bus_idle,
  input  logic                 rx_tx_ok,
  input  logic                 rx_crc_ok,
  input  logic                 err_det,
  input  logic                 ovl_start,
  input  logic                 arb_lost,
  // from error management
  input  logic                 err_passive,
  input  logic                 bus_off,
  // from the host interface
  input  logic                 tx_req,
  input  can_pkg::can_frame_t  tx_frame,
  output logic                 tx_out,      // bit driven on the bus (0 = dominant)
  output can_pkg::tx_state_t   state,
  output logic [6:0]           cnt,
  output logic                 tx_active,
  output logic                 tx_chk,
  output logic                 tx_arb,
  output logic                 tx_start,    // pulse: start of frame sent
  output logic                 stuff_sent   // pulse: a stuff bit sent
);
  import can_pkg::*;

  logic [2:0]  run;
  logic        last;
  logic        is_stuff;     // the bit driven now is a stuff bit
  logic [14:0] crc;
  logic        crc_clr, crc_en, crc_din;

  can_crc15 u_crc (
    .clk, .rst_n, .clear(crc_clr), .en(crc_en), .din(crc_din), .crc(crc)
  );

  assign tx_active = state inside {TX_SOF, TX_ARB, TX_CTRL, TX_DATA, TX_CRC, TX_EOF};
  assign tx_chk    = state inside {TX_SOF, TX_ARB, TX_CTRL, TX_DATA, TX_CRC};
  assign tx_arb    = (state == TX_ARB) && !is_stuff;

  logic [6:0] data_bits;
  assign data_bits = {dlc_bytes(tx_frame.dlc), 3'b000};

  // Next state, counter and bit at the coming transmission point.
  tx_state_t  n_state;
  logic [6:0] n_cnt;
  logic       n_bit, n_stuff, n_crc, n_sof, n_stuffed;
  logic       may_start;
  logic       sent;          // transmitted last: suspend if error passive
  logic [2:0] susp_cnt;
  always_comb begin
    n_state = state; n_cnt = cnt; n_bit = 1'b1; n_stuff = 1'b0; n_crc = 1'b0;
    n_sof = 1'b0; n_stuffed = 1'b0;
    may_start = tx_req && !bus_off && !(sent && err_passive) &&
                (rx_bus_idle || (rx_state == RX_IM && rx_cnt == 7'd2));
    // a position that follows the current one
    unique case (state)
      TX_SOF:  begin n_state = TX_ARB; n_cnt = '0; end
      TX_ARB:  if (cnt == 7'd11) begin n_state = TX_CTRL; n_cnt = '0; end
               else n_cnt = cnt + 7'd1;
      TX_CTRL: if (cnt == 7'd5) begin
                 n_cnt = '0;
                 n_state = (tx_frame.rtr || data_bits == '0) ? TX_CRC : TX_DATA;
               end else n_cnt = cnt + 7'd1;
      TX_DATA: if (cnt == data_bits - 7'd1) begin n_state = TX_CRC; n_cnt = '0; end
               else n_cnt = cnt + 7'd1;
      TX_CRC:  if (cnt == 7'd14) begin n_state = TX_EOF; n_cnt = '0; end
               else n_cnt = cnt + 7'd1;
      TX_EOF:  if (cnt == 7'd11) begin n_state = TX_IDLE; n_cnt = '0; end
               else n_cnt = cnt + 7'd1;
      TX_ERR_FL, TX_OVL_FL:
               if (cnt == 7'd6) begin n_state = TX_FLAG_D; n_cnt = '0; end
               else n_cnt = cnt + 7'd1;
      TX_FLAG_D: if (rx_state inside {RX_IM, RX_IDLE}) n_state = TX_IDLE;
      default: ;
    endcase
    if (bus_off) begin
      n_state = TX_IDLE; n_cnt = '0;
    end else if (state inside {TX_SOF, TX_ARB, TX_CTRL, TX_DATA, TX_CRC} && run == 3'd5) begin
      // stuff bit: the position does not advance
      n_state = state; n_cnt = cnt; n_bit = ~last; n_stuff = 1'b1;
    end
    if (!n_stuff && !bus_off) begin
      unique case (n_state)
        TX_IDLE: begin
          n_cnt = '0;
          if (rx_state == RX_ACK && rx_crc_ok) n_bit = 1'b0;
          else if (may_start) begin
            n_state = TX_SOF; n_bit = 1'b0; n_sof = 1'b1; n_crc = 1'b1; n_stuffed = 1'b1;
          end
        end
        TX_ARB: begin
          n_bit = (n_cnt < 7'd11) ? tx_frame.id[4'd10 - n_cnt[3:0]] : tx_frame.rtr;
          n_crc = 1'b1; n_stuffed = 1'b1;
        end
        TX_CTRL: begin
          n_bit = (n_cnt < 7'd2) ? 1'b0 : tx_frame.dlc[2'(3'd5 - n_cnt[2:0])];
          n_crc = 1'b1; n_stuffed = 1'b1;
        end
        TX_DATA: begin
          n_bit = tx_frame.data[n_cnt[6:3]][3'd7 - n_cnt[2:0]];
          n_crc = 1'b1; n_stuffed = 1'b1;
        end
        TX_CRC: begin
          n_bit = crc[4'd14 - n_cnt[3:0]];
          n_stuffed = 1'b1;
        end
        TX_ERR_FL: n_bit = err_passive;   // flag bits 1..6
        TX_OVL_FL: n_bit = 1'b0;
        default:   n_bit = 1'b1;
      endcase
    end
  end

  // The CRC register takes each frame bit as it is driven.
  assign crc_clr = tx_point && n_sof;
  assign crc_en  = tx_point && n_crc && !n_sof && !n_stuff;
  assign crc_din = n_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= TX_IDLE; cnt <= '0; tx_out <= 1'b1; run <= '0; last <= 1'b1;
      is_stuff <= 1'b0; tx_start <= 1'b0; stuff_sent <= 1'b0;
      sent <= 1'b0; susp_cnt <= '0;
    end else begin
      // suspend transmission: 8 bit times of idle bus after a transmission
      if (bus_off) begin
        sent <= 1'b0;
      end else if (rx_tx_ok || (err_det && tx_active)) begin
        sent <= 1'b1; susp_cnt <= '0;
      end else if (tx_point && sent) begin
        if (!err_passive || rx_state == RX_ARB) sent <= 1'b0;
        else if (rx_bus_idle) begin
          susp_cnt <= susp_cnt + 3'd1;
          if (susp_cnt == 3'd7) sent <= 1'b0;
        end
      end
      tx_start   <= 1'b0;
      stuff_sent <= 1'b0;
      if (!bus_off && err_det) begin
        state <= TX_ERR_FL; cnt <= 7'd0; is_stuff <= 1'b0;
      end else if (!bus_off && ovl_start) begin
        state <= TX_OVL_FL; cnt <= 7'd0; is_stuff <= 1'b0;
      end else if (arb_lost) begin
        state <= TX_IDLE; cnt <= '0; is_stuff <= 1'b0;
      end else if (tx_point) begin
        state    <= n_state;
        cnt      <= n_cnt;
        tx_out   <= n_bit;
        is_stuff <= n_stuff;
        tx_start <= n_sof;
        stuff_sent <= n_stuff;
        if (n_stuff) begin
          run <= 3'd1; last <= n_bit;
        end else if (n_stuffed) begin
          run  <= (n_sof || n_bit != last) ? 3'd1 : run + 3'd1;
          last <= n_bit;
        end else begin
          run <= '0;
        end
      end
    end
  end
endmodule
