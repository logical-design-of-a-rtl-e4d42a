// tb_can_rx_buffer: checks the double receive buffer.
//
// Sequence: a first frame goes to the visible buffer; a second one, while
// the first is unread, goes to the hidden buffer and raises the overload
// request; releasing the visible buffer moves the hidden frame up and drops
// the request; a third frame while both are full is dropped with overrun;
// release with a frame arriving in the same cycle; release of an empty
// buffer.
`timescale 1ns/1ps
module tb_can_rx_buffer;
  import can_pkg::*;
  logic clk = 0, rst_n = 0, rx_valid = 0, release_buf = 0;
  can_frame_t rx_frame = '0, vis_frame;
  logic vis_full, hid_full, ovl_req, overrun, transfer;
  int checks = 0, failures = 0;

  can_rx_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic can_frame_t mk(int k);
    can_frame_t f = '0;
    f.id = 11'(k * 37 + 5); f.dlc = 4'(k % 9);
    for (int i = 0; i < 8; i++) f.data[i] = 8'(k * 16 + i);
    return f;
  endfunction

  task automatic deliver(can_frame_t f);
    @(negedge clk); rx_frame = f; rx_valid = 1;
    @(negedge clk); rx_valid = 0; rx_frame = '0;
  endtask
  task automatic rel();
    @(negedge clk); release_buf = 1; @(negedge clk); release_buf = 0;
    @(negedge clk);
  endtask

  int n_xfer;
  always @(posedge clk) if (rst_n && transfer) n_xfer++;

  initial begin
    n_xfer = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(!vis_full && !hid_full && !ovl_req, "empty after reset");
    deliver(mk(1));
    check(vis_full && vis_frame == mk(1) && !ovl_req, "first frame visible");
    deliver(mk(2));
    check(vis_frame == mk(1) && hid_full && ovl_req, "second frame hidden, overload request");
    deliver(mk(3));
    check(overrun && vis_frame == mk(1) && hid_full, "third frame dropped, overrun");
    rel();
    check(vis_full && vis_frame == mk(2) && !hid_full && !ovl_req && !overrun && n_xfer == 1,
          "release moves the hidden frame up");
    @(negedge clk); release_buf = 1; rx_frame = mk(4); rx_valid = 1;
    @(negedge clk); release_buf = 0; rx_valid = 0;
    check(vis_full && vis_frame == mk(4) && !hid_full, "release and new frame together");
    rel();
    check(!vis_full && !hid_full, "empty after release");
    rel();
    check(!vis_full, "release of an empty buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
