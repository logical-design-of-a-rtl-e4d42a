// tb_can_host_if: checks the register map of the host interface.
//
// Bit timing registers reset to their defaults and read back after writes;
// the transmit buffer registers fill the frame handed to the sequencer;
// the command register sets and clears the request and pulses the buffer
// release; tx_ok clears the request and sets tx_done; sticky flags clear on
// a write of 1; received frame, error counters and status read back; the
// interrupt follows the enabled flags.
`timescale 1ns/1ps
module tb_can_host_if;
  import can_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0] addr = '0;
  logic wr = 0;
  logic [7:0] wdata = '0, rdata;
  logic irq, tx_req;
  can_frame_t tx_frame, rx_frame = '0;
  logic tx_ok = 0, arb_lost = 0, err_det = 0, err_passive = 0, bus_off = 0;
  logic [8:0] tec = '0;
  logic [7:0] rec = '0;
  logic rx_full = 0, overrun = 0, release_buf;
  logic [7:0] brp;
  logic [4:0] seg1;
  logic [3:0] seg2;
  logic [1:0] sjw;
  int checks = 0, failures = 0;

  can_host_if dut (.*);

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
  task automatic w(logic [4:0] a, logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1; @(negedge clk); wr = 0;
  endtask
  task automatic r(logic [4:0] a, output logic [7:0] d);
    @(negedge clk); addr = a; #1 d = rdata;
  endtask
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  int n_rel;
  always @(posedge clk) if (rst_n && release_buf) n_rel++;

  initial begin
    logic [7:0] v;
    can_frame_t f;
    n_rel = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(brp == 8'd1 && seg1 == 5'd7 && seg2 == 4'd3 && sjw == 2'd1, "bit timing defaults");
    w(5'h02, 8'd4); w(5'h03, 8'd13); w(5'h04, 8'd6); w(5'h05, 8'd3);
    check(brp == 8'd4 && seg1 == 5'd13 && seg2 == 4'd6 && sjw == 2'd3, "bit timing written");
    r(5'h03, v); check(v == 8'd13, "seg1 read back");
    // transmit buffer
    f = '0; f.id = 11'h5A3; f.rtr = 0; f.dlc = 4'd8;
    for (int i = 0; i < 8; i++) f.data[i] = 8'(8'hA0 + i);
    w(5'h08, f.id[10:3]); w(5'h09, {f.id[2:0], f.rtr, f.dlc});
    for (int i = 0; i < 8; i++) w(5'(5'h0A + i), f.data[i]);
    check(tx_frame == f, "transmit buffer");
    r(5'h0D, v); check(v == 8'hA3, "transmit data read back");
    w(5'h00, 8'h01);
    check(tx_req, "request set");
    r(5'h01, v); check(v[1], "status shows pending");
    w(5'h00, 8'h02);
    check(!tx_req, "abort clears the request");
    w(5'h00, 8'h01);
    w(5'h1C, 8'h07);
    pulse(tx_ok);
    check(!tx_req, "tx_ok clears the request");
    r(5'h01, v); check(v[2] && !v[1], "tx_done set");
    check(irq, "interrupt on tx_done");
    w(5'h01, 8'h04);
    r(5'h01, v); check(!v[2] && !irq, "tx_done cleared");
    pulse(arb_lost); pulse(err_det);
    r(5'h01, v); check(v[3] && v[4] && irq, "arbitration and error flags");
    w(5'h01, 8'h18);
    r(5'h01, v); check(!v[3] && !v[4], "flags cleared");
    // receive side
    f.id = 11'h1C7; f.rtr = 1; f.dlc = 4'd2; f.data[7] = 8'h5E;
    rx_frame = f; rx_full = 1; overrun = 1; err_passive = 1; tec = 9'd300; rec = 8'd77;
    r(5'h12, v); check(v == f.id[10:3], "RX identifier high");
    r(5'h13, v); check(v == {f.id[2:0], f.rtr, f.dlc}, "RX identifier low, RTR, DLC");
    r(5'h1B, v); check(v == 8'h5E, "RX data byte 7");
    r(5'h01, v); check(v[0] && v[5] && v[6] && !v[7], "status: full, overrun, passive");
    r(5'h06, v); check(v == 8'hFF, "TEC saturates at 255 for reading");
    r(5'h07, v); check(v == 8'd77, "REC");
    check(irq, "interrupt on receive");
    w(5'h00, 8'h04);
    @(negedge clk);
    check(n_rel == 1, "release pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
