// can_rx: receiver of the frame sequencer.
//
// The receiver listens to the bus all the time, also while this node is
// transmitting. Following the document, it is a state machine with one state
// per frame field (can_pkg::rx_state_t, the states of the receiver state
// diagram) and a separate counter 'cnt' that numbers the bit within the
// current field; both advance at the sample point, on the bit value sampled
// there. 'state'/'cnt' name the bit that will be sampled next.
//
// At each sample point it
//  * removes stuff bits (after five equal bits from the start of frame to the
//    end of the CRC sequence the next bit must be the complement and is
//    dropped; otherwise a stuff error),
//  * stores identifier, RTR, DLC and data in 'frame' (the receive shift
//    register) and runs the CRC-15 over start of frame..data,
//  * checks the fixed-form bits (CRC and ACK delimiters, end of frame,
//    flag delimiters), the CRC (signalled after the ACK delimiter) and, when
//    this node is the transmitter, the acknowledgement and every bit it sent
//    (bit error, or lost arbitration for a recessive identifier/RTR bit read
//    back dominant),
//  * follows error flags, overload flags and their delimiters.
// A frame it received is valid after the 6th end-of-frame bit ('rx_valid');
// a frame this node sent is complete after the 7th ('tx_ok'). A dominant
// bit in the first two intermission bits, in the last end-of-frame bit of a
// received frame or in the last delimiter bit, or a request from the
// receive buffer at the end of the frame ('ovl_req', at most two in a row)
// starts an overload flag; a dominant third intermission bit is a start of
// frame. All outputs except 'state', 'cnt', 'frame' and 'crc_ok' are
// one-cycle pulses in the cycle after 'sample_point'.
//
// The field states and the bit counter follow the document; the state
// encoding, the exact checks (taken from the CAN 2.0 specification for
// standard frames) and the interface are this design's choices. As in the
// CAN 2.0 specification, after reset the node takes part in bus activity
// only once it has seen 11 consecutive recessive bits ('bus_idle'), and a
// passive error flag is complete once six consecutive equal bits were seen.
// For the error counters it also reports each run of 8 dominant bits after a
// completed flag ('dom8': the 14th bit after an active or overload flag, the
// 8th after a passive one, and every 8 more) and marks a stuff bit sent
// recessive but read dominant during arbitration ('err_arb_stuff', a stuff
// error that the transmit error counter does not count). A recessive bit
// read during this node's own active error flag or overload flag is a bit
// error ('flag_bit_err') and starts a new error flag.
module can_rx (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sample_point,
  input  logic                 rx_bit,
  // from the transmitter
  input  logic                 tx_bit,      // bit this node drives now
  input  logic                 tx_active,   // this node transmits the current frame
  input  logic                 tx_chk,      // the driven bit must be read back unchanged
  input  logic                 tx_arb,      // the driven bit is an arbitration bit
  // from the receive buffer
  input  logic                 ovl_req,
  // from error management
  input  logic                 err_passive,
  output can_pkg::rx_state_t   state,
  output logic [6:0]           cnt,
  output can_pkg::can_frame_t  frame,
  output logic                 crc_ok,
  output logic                 hard_sync_en,
  output logic                 bus_idle,     // idle and integrated
  output logic                 sof,          // start of frame seen
  output logic                 stuff_bit,    // a stuff bit was removed
  output logic                 rx_valid,     // received frame is valid
  output logic                 tx_ok,        // transmitted frame is complete
  output logic                 arb_lost,
  output logic                 err_det,      // error: an error flag follows
  output logic [4:0]           err_code,     // {ack, crc, form, stuff, bit}
  output logic                 ovl_start,    // an overload flag follows
  output logic                 dom_after_flag,
  output logic                 dom8,
  output logic                 err_arb_stuff,
  output logic                 flag_bit_err
);
  import can_pkg::*;

  logic [2:0]  run;        // equal consecutive bits, stuffing region
  logic        last;
  logic [14:0] crc_rcv;
  logic [14:0] crc_calc;
  logic        crc_clr, crc_en;
  logic [1:0]  ovl_cnt;
  logic [3:0]  integ;      // recessive bits seen after reset, up to 11
  logic        fl_last;    // previous bit of a passive error flag
  logic [2:0]  dom_run;    // dominant bits after a completed flag, modulo 8

  can_crc15 u_crc (
    .clk, .rst_n, .clear(crc_clr), .en(crc_en), .din(rx_bit), .crc(crc_calc)
  );

  assign bus_idle     = (state == RX_IDLE) && (integ == 4'd11);
  assign hard_sync_en = bus_idle || (state == RX_IM && cnt == 7'd2);

  logic stuffing, is_stuff;
  always_comb begin
    stuffing = (state inside {RX_ARB, RX_CTRL, RX_DATA, RX_CRC}) ||
               (state == RX_CRC_D && run == 3'd5);
    is_stuff = stuffing && run == 3'd5;
    crc_clr  = sample_point && !rx_bit && hard_sync_en;
    crc_en   = sample_point && !is_stuff &&
               (state inside {RX_ARB, RX_CTRL, RX_DATA});
  end

  logic [6:0] data_bits;
  assign data_bits = {dlc_bytes(frame.dlc), 3'b000};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= RX_IDLE; cnt <= '0; frame <= '0; crc_ok <= 1'b0;
      run <= '0; last <= 1'b1; crc_rcv <= '0; ovl_cnt <= '0;
      integ <= '0; fl_last <= 1'b1; dom_run <= '0;
      dom8 <= 1'b0; err_arb_stuff <= 1'b0; flag_bit_err <= 1'b0;
      sof <= 1'b0; stuff_bit <= 1'b0; rx_valid <= 1'b0; tx_ok <= 1'b0;
      arb_lost <= 1'b0; err_det <= 1'b0; err_code <= '0; ovl_start <= 1'b0;
      dom_after_flag <= 1'b0;
    end else begin
      sof <= 1'b0; stuff_bit <= 1'b0; rx_valid <= 1'b0; tx_ok <= 1'b0;
      arb_lost <= 1'b0; err_det <= 1'b0; err_code <= '0; ovl_start <= 1'b0;
      dom_after_flag <= 1'b0; dom8 <= 1'b0; err_arb_stuff <= 1'b0;
      flag_bit_err <= 1'b0;
      if (sample_point) begin
        if (tx_active && tx_chk && rx_bit != tx_bit && tx_arb && tx_bit) begin
          arb_lost <= 1'b1;
        end
        if (tx_active && tx_chk && rx_bit != tx_bit && !(tx_arb && tx_bit)) begin
          err_det <= 1'b1;
          if (is_stuff && state == RX_ARB && tx_bit) begin
            // recessive stuff bit read dominant during arbitration
            err_code <= 5'b00010; err_arb_stuff <= 1'b1;
          end else err_code <= 5'b00001;   // bit error
          state <= RX_ERR_FL; cnt <= '0;
        end else if (is_stuff) begin
          stuff_bit <= 1'b1;
          if (rx_bit == last) begin
            err_det <= 1'b1; err_code <= 5'b00010;
            state <= RX_ERR_FL; cnt <= '0;
          end else begin
            run <= 3'd1; last <= rx_bit;
          end
        end else begin
          if (stuffing) begin
            run  <= (rx_bit == last) ? run + 3'd1 : 3'd1;
            last <= rx_bit;
          end
          unique case (state)
            RX_IDLE: if (integ != 4'd11) begin
              integ <= rx_bit ? integ + 4'd1 : 4'd0;
            end else if (!rx_bit) begin
              state <= RX_ARB; cnt <= '0; frame <= '0; run <= 3'd1; last <= 1'b0;
              sof <= 1'b1; ovl_cnt <= '0;
            end
            RX_ARB: begin
              if (cnt < 7'd11) frame.id <= {frame.id[9:0], rx_bit};
              else             frame.rtr <= rx_bit;
              if (cnt == 7'd11) begin state <= RX_CTRL; cnt <= '0; end
              else cnt <= cnt + 7'd1;
            end
            RX_CTRL: begin
              // bit 0 is IDE, bit 1 is r0, bits 2..5 are the DLC
              if (cnt >= 7'd2) frame.dlc <= {frame.dlc[2:0], rx_bit};
              if (cnt == 7'd5) begin
                cnt <= '0;
                if (frame.rtr || dlc_bytes({frame.dlc[2:0], rx_bit}) == 4'd0) state <= RX_CRC;
                else state <= RX_DATA;
              end else cnt <= cnt + 7'd1;
            end
            RX_DATA: begin
              frame.data[cnt[6:3]] <= {frame.data[cnt[6:3]][6:0], rx_bit};
              if (cnt == data_bits - 7'd1) begin state <= RX_CRC; cnt <= '0; end
              else cnt <= cnt + 7'd1;
            end
            RX_CRC: begin
              crc_rcv <= {crc_rcv[13:0], rx_bit};
              if (cnt == 7'd14) begin state <= RX_CRC_D; cnt <= '0; end
              else cnt <= cnt + 7'd1;
            end
            RX_CRC_D: begin
              crc_ok <= (crc_rcv == crc_calc);
              if (!rx_bit) begin
                err_det <= 1'b1; err_code <= 5'b00100; state <= RX_ERR_FL; cnt <= '0;
              end else state <= RX_ACK;
            end
            RX_ACK: begin
              if (tx_active && rx_bit) begin
                err_det <= 1'b1; err_code <= 5'b10000; state <= RX_ERR_FL; cnt <= '0;
              end else state <= RX_ACK_D;
            end
            RX_ACK_D: begin
              if (!rx_bit) begin
                err_det <= 1'b1; err_code <= 5'b00100; state <= RX_ERR_FL; cnt <= '0;
              end else if (!crc_ok) begin
                err_det <= 1'b1; err_code <= 5'b01000; state <= RX_ERR_FL; cnt <= '0;
              end else begin
                state <= RX_EOF; cnt <= '0;
              end
            end
            RX_EOF: begin
              if (!rx_bit) begin
                if (cnt == 7'd6 && !tx_active) begin
                  ovl_start <= 1'b1; state <= RX_OVL_FL; cnt <= '0;
                end else begin
                  err_det <= 1'b1; err_code <= 5'b00100; state <= RX_ERR_FL; cnt <= '0;
                end
              end else begin
                if (cnt == 7'd5 && !tx_active) rx_valid <= 1'b1;
                if (cnt == 7'd6) begin
                  if (tx_active) tx_ok <= 1'b1;
                  if (ovl_req && !tx_active) begin
                    ovl_start <= 1'b1; ovl_cnt <= ovl_cnt + 2'd1;
                    state <= RX_OVL_FL; cnt <= '0;
                  end else begin
                    state <= RX_IM; cnt <= '0;
                  end
                end else cnt <= cnt + 7'd1;
              end
            end
            RX_IM: begin
              if (cnt == 7'd2) begin
                if (!rx_bit) begin
                  state <= RX_ARB; cnt <= '0; frame <= '0; run <= 3'd1; last <= 1'b0;
                  sof <= 1'b1; ovl_cnt <= '0;
                end else state <= RX_IDLE;
              end else if (!rx_bit) begin
                ovl_start <= 1'b1; state <= RX_OVL_FL; cnt <= '0;
              end else cnt <= cnt + 7'd1;
            end
            RX_ERR_FL, RX_OVL_FL: begin
              if (cnt < 7'd6 && rx_bit && !tx_bit) begin
                // own dominant flag bit read recessive
                err_det <= 1'b1; err_code <= 5'b00001; flag_bit_err <= 1'b1;
                state <= RX_ERR_FL; cnt <= '0;
              end else if (cnt < 7'd6) begin
                // a passive flag needs six equal bits in a row
                if (state == RX_ERR_FL && err_passive && cnt != 7'd0 && rx_bit != fl_last)
                  cnt <= 7'd1;
                else cnt <= cnt + 7'd1;
                fl_last <= rx_bit;
              end else if (rx_bit) begin
                state <= RX_FLAG_D; cnt <= 7'd1;
              end else begin
                if (cnt == 7'd6 && state == RX_ERR_FL) dom_after_flag <= 1'b1;
                cnt <= 7'd7;
                dom_run <= (cnt == 7'd6) ? 3'd1 : dom_run + 3'd1;
                if (cnt == 7'd7 && dom_run == 3'd7) dom8 <= 1'b1;
              end
            end
            RX_FLAG_D: begin
              if (!rx_bit) begin
                if (cnt == 7'd7) begin
                  ovl_start <= 1'b1; state <= RX_OVL_FL; cnt <= '0;
                end else begin
                  err_det <= 1'b1; err_code <= 5'b00100; state <= RX_ERR_FL; cnt <= '0;
                end
              end else if (cnt == 7'd7) begin
                if (ovl_req && ovl_cnt != 2'd2) begin
                  ovl_start <= 1'b1; ovl_cnt <= ovl_cnt + 2'd1;
                  state <= RX_OVL_FL; cnt <= '0;
                end else begin
                  state <= RX_IM; cnt <= '0;
                end
              end else cnt <= cnt + 7'd1;
            end
            default: begin state <= RX_IDLE; cnt <= '0; end
          endcase
        end
      end
    end
  end
endmodule
