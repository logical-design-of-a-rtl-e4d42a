// can_err: error management (fault confinement) of the frame sequencer.
//
// Watches the events of receiver and transmitter and keeps the transmit and
// receive error counters, from which it derives the node's error state:
// error active, error passive (a counter above 127) or bus off (transmit
// counter above 255). The document places this unit beside receiver and
// transmitter and says only that it determines the error and bus status; the
// counting rules below are the main ones of the CAN 2.0 specification:
//  * an error detected while transmitting: TEC += 8, except an ACK error of
//    an error-passive transmitter and a stuff error on a recessive stuff bit
//    during arbitration,
//  * an error detected while receiving: REC += 1,
//  * a dominant bit right after this receiver's own error flag: REC += 8,
//  * a bit error while sending an active error flag or overload flag
//    ('flag_bit_err'): +8 to TEC when the node was transmitting, else REC,
//  * each run of 8 dominant bits after a completed flag ('dom8'): TEC += 8
//    when the node was transmitting, REC += 8 otherwise,
//  * a frame sent successfully: TEC -= 1; received: REC -= 1, or back to 120
//    when it was above 127,
//  * bus off ends after 128 sequences of 11 recessive bits; both counters
//    are then cleared.
// Counters update in the cycle after the event pulse.
module can_err (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sample_point,
  input  logic                rx_bit,
  input  logic                err_det,
  input  logic [4:0]          err_code,     // {ack, crc, form, stuff, bit}
  input  logic                tx_active,
  input  logic                dom_after_flag,
  input  logic                dom8,
  input  logic                err_arb_stuff,
  input  logic                flag_bit_err,
  input  logic                rx_valid,
  input  logic                tx_ok,
  output logic [8:0]          tec,
  output logic [7:0]          rec,
  output can_pkg::err_state_t err_state,
  output logic                err_passive,
  output logic                bus_off,
  output logic                recovered     // pulse: bus off ended
);
  import can_pkg::*;

  logic       was_tx;       // role of the node when the last error was seen
  logic [3:0] rec_run;      // consecutive recessive bits in bus off
  logic [7:0] seq_cnt;      // sequences of 11 recessive bits in bus off

  always_comb begin
    if (tec > 9'd255)                      err_state = BUS_OFF;
    else if (tec > 9'd127 || rec > 8'd127) err_state = ERR_PASSIVE;
    else                                   err_state = ERR_ACTIVE;
  end
  assign err_passive = (err_state == ERR_PASSIVE);
  assign bus_off     = (err_state == BUS_OFF);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tec <= '0; rec <= '0; was_tx <= 1'b0; rec_run <= '0; seq_cnt <= '0;
      recovered <= 1'b0;
    end else begin
      recovered <= 1'b0;
      if (bus_off) begin
        if (sample_point) begin
          if (!rx_bit) rec_run <= '0;
          else if (rec_run == 4'd10) begin
            rec_run <= '0;
            if (seq_cnt == 8'd127) begin
              seq_cnt <= '0; tec <= '0; rec <= '0; recovered <= 1'b1;
            end else seq_cnt <= seq_cnt + 8'd1;
          end else rec_run <= rec_run + 4'd1;
        end
      end else begin
        rec_run <= '0; seq_cnt <= '0;
        if (err_det && flag_bit_err) begin
          if (was_tx) tec <= tec + 9'd8;
          else        rec <= (rec > 8'd247) ? 8'd255 : rec + 8'd8;
        end else if (err_det) begin
          was_tx <= tx_active;
          if (tx_active) begin
            if (!(err_code[4] && err_state == ERR_PASSIVE) && !err_arb_stuff)
              tec <= tec + 9'd8;
          end else if (rec != 8'd255) rec <= rec + 8'd1;
        end else if (dom8 && was_tx) begin
          tec <= tec + 9'd8;
        end else if ((dom8 || dom_after_flag) && !was_tx) begin
          rec <= (rec > 8'd247) ? 8'd255 : rec + 8'd8;
        end
        if (tx_ok || rx_valid) was_tx <= 1'b0;
        if (tx_ok && tec != '0) tec <= tec - 9'd1;
        if (rx_valid) begin
          if (rec > 8'd127)      rec <= 8'd120;
          else if (rec != 8'd0)  rec <= rec - 8'd1;
        end
      end
    end
  end
endmodule
