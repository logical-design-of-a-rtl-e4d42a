// can_rx_buffer: double receive buffer.
//
// Two message buffers sit between the receiver and the host. The visible
// buffer is the one the host reads; the hidden one is not visible to the
// host. A frame that becomes valid (rx_valid, 6th end-of-frame bit) goes
// straight to the visible buffer if the host has released it; otherwise it
// is kept in the hidden buffer and moved to the visible one as soon as the
// host releases that ('release'). While the hidden buffer holds a message the
// visible one has not been read, so 'ovl_req' asks the receiver for overload
// frames, which delay the next frame on the bus and give the host time to
// read. This is the scheme the document proposes in place of a single buffer
// with an overload frame after every message. If a further frame becomes
// valid while both buffers are full, it is dropped and 'overrun' is set
// until the next release (this design's choice).
// Timing: buffers and flags change in the cycle after rx_valid/release.
module can_rx_buffer (
  input  logic                 clk,
  input  logic                 rst_n,
  input  can_pkg::can_frame_t  rx_frame,    // frame assembled by the receiver
  input  logic                 rx_valid,    // pulse: rx_frame is valid
  input  logic                 release_buf, // pulse: host has read the visible buffer
  output can_pkg::can_frame_t  vis_frame,
  output logic                 vis_full,
  output logic                 hid_full,
  output logic                 ovl_req,
  output logic                 overrun,
  output logic                 transfer     // pulse: hidden -> visible
);
  import can_pkg::*;

  can_frame_t hid_frame;

  assign ovl_req = hid_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vis_frame <= '0; hid_frame <= '0; vis_full <= 1'b0; hid_full <= 1'b0;
      overrun <= 1'b0; transfer <= 1'b0;
    end else begin
      transfer <= 1'b0;
      if (release_buf) begin
        overrun <= 1'b0;
        if (hid_full) begin
          vis_frame <= hid_frame; vis_full <= 1'b1; transfer <= 1'b1;
          if (rx_valid) hid_frame <= rx_frame;
          else          hid_full  <= 1'b0;
        end else if (rx_valid) begin
          vis_frame <= rx_frame; vis_full <= 1'b1;
        end else vis_full <= 1'b0;
      end else if (rx_valid) begin
        if (!vis_full) begin
          vis_frame <= rx_frame; vis_full <= 1'b1;
        end else if (!hid_full) begin
          hid_frame <= rx_frame; hid_full <= 1'b1;
        end else overrun <= 1'b1;
      end
    end
  end
endmodule
