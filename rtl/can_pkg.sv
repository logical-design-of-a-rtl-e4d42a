// can_pkg: types and constants shared by the CAN controller modules.
//
// The receiver state set is the one of the receiver state diagram: one state
// per frame field (arbitration, control, data, CRC, CRC delimiter,
// acknowledge slot and delimiter, end of frame, intermission) plus the error
// flag, the flag delimiter and the overload flag. The transmitter uses almost
// the same set, except that one state (TX_EOF) covers everything from the CRC
// delimiter to the intermission, which a transmitter only sends recessive.
// TX_SOF (a state of its own for the start-of-frame bit) and the field
// lengths of the standard (11-bit identifier) frame are this design's choice
// of encoding.
//
// Frame layout used throughout: arbitration 12 bits (11 identifier bits and
// RTR), control 6 bits (IDE, r0, DLC), data 0..64 bits, CRC 15 bits, then
// CRC delimiter, ACK slot, ACK delimiter, 7 end-of-frame bits and 3
// intermission bits. Error and overload flags are 6 bits, their delimiters 8.
package can_pkg;

  // Receiver states, named after the receiver state diagram.
  typedef enum logic [3:0] {
    RX_IDLE, RX_ARB, RX_CTRL, RX_DATA, RX_CRC, RX_CRC_D, RX_ACK, RX_ACK_D,
    RX_EOF, RX_IM, RX_ERR_FL, RX_FLAG_D, RX_OVL_FL
  } rx_state_t;

  // Transmitter states.
  typedef enum logic [3:0] {
    TX_IDLE, TX_SOF, TX_ARB, TX_CTRL, TX_DATA, TX_CRC, TX_EOF,
    TX_ERR_FL, TX_FLAG_D, TX_OVL_FL
  } tx_state_t;

  // Fault confinement state.
  typedef enum logic [1:0] {
    ERR_ACTIVE, ERR_PASSIVE, BUS_OFF
  } err_state_t;

  // A standard-format data or remote frame as stored in the buffers.
  typedef struct packed {
    logic [10:0]     id;
    logic            rtr;
    logic [3:0]      dlc;
    logic [7:0][7:0] data;   // data[0] is the first byte on the bus
  } can_frame_t;

  // Number of data bytes a DLC code stands for (codes above 8 mean 8).
  function automatic logic [3:0] dlc_bytes(input logic [3:0] dlc);
    return (dlc > 4'd8) ? 4'd8 : dlc;
  endfunction

endpackage
