// tb_can_tx: checks the bits the transmitter puts on the bus.
//
// The bench plays the receiver side (state, counter, CRC verdict and event
// pulses) and gives one transmission point at a time, reading the driven
// bit after each. The expected frame is built independently: start of
// frame, identifier, RTR, IDE, r0, DLC, data, CRC-15 by polynomial long
// division, a stuff bit after five equal bits, then 12 recessive bits
// (CRC delimiter to the second intermission bit). Also checked: the
// arbitration/monitor flags, the dominant ACK of a receiver (only with a
// correct CRC), active and passive error flags, the overload flag, the
// start in the third intermission bit, no start before the receiver has
// integrated into the bus, the 8 suspend bits of an error-passive sender
// (skipped when another node starts), withdrawal after lost arbitration and
// silence when bus off.
`timescale 1ns/1ps
module tb_can_tx;
  import can_pkg::*;
  logic clk = 0, rst_n = 0, tx_point = 0;
  rx_state_t rx_state = RX_IDLE;
  logic [6:0] rx_cnt = '0;
  logic bus_int = 1, rx_tx_ok = 0;
  logic rx_bus_idle;
  assign rx_bus_idle = (rx_state == RX_IDLE) && bus_int;
  logic rx_crc_ok = 0, err_det = 0, ovl_start = 0, arb_lost = 0;
  logic err_passive = 0, bus_off = 0, tx_req = 0;
  can_frame_t tx_frame = '0;
  logic tx_out;
  tx_state_t state;
  logic [6:0] cnt;
  logic tx_active, tx_chk, tx_arb, tx_start, stuff_sent;
  int checks = 0, failures = 0;

  can_tx dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [14:0] ref_crc(bit msg[$]);
    bit w[$];
    w = msg;
    for (int i = 0; i < 15; i++) w.push_back(1'b0);
    for (int i = 0; i + 15 < w.size(); i++)
      if (w[i]) begin
        logic [15:0] g = 16'hC599;
        for (int k = 0; k < 16; k++) w[i + k] ^= g[15 - k];
      end
    ref_crc = '0;
    for (int i = 0; i < 15; i++) ref_crc[14 - i] = w[w.size() - 15 + i];
  endfunction

  function automatic void build(can_frame_t f, ref bit q[$]);
    bit raw[$];
    logic [14:0] c;
    int run, nb;
    bit last;
    raw.push_back(0);
    for (int i = 10; i >= 0; i--) raw.push_back(f.id[i]);
    raw.push_back(f.rtr); raw.push_back(0); raw.push_back(0);
    for (int i = 3; i >= 0; i--) raw.push_back(f.dlc[i]);
    nb = f.rtr ? 0 : int'(dlc_bytes(f.dlc));
    for (int b = 0; b < nb; b++) for (int i = 7; i >= 0; i--) raw.push_back(f.data[b][i]);
    c = ref_crc(raw);
    for (int i = 14; i >= 0; i--) raw.push_back(c[i]);
    q.delete(); run = 0; last = 1;
    foreach (raw[i]) begin
      q.push_back(raw[i]);
      run = (i > 0 && raw[i] == last) ? run + 1 : 1;
      last = raw[i];
      if (run == 5) begin q.push_back(~last); last = ~last; run = 1; end
    end
  endfunction

  // one transmission point; returns the bit driven afterwards
  task automatic txp(output bit b);
    @(negedge clk); tx_point = 1;
    @(negedge clk); tx_point = 0;
    @(negedge clk); b = tx_out;
  endtask

  task automatic pulse_err();
    @(negedge clk); err_det = 1; @(negedge clk); err_det = 0;
  endtask

  task automatic send_check(can_frame_t f, string what);
    bit q[$];
    bit b;
    int bad, arb_bits;
    build(f, q);
    tx_frame = f; tx_req = 1;
    bad = 0; arb_bits = 0;
    foreach (q[i]) begin
      txp(b);
      if (i == 0) begin tx_req = 0; rx_state = RX_ARB; end
      if (b != q[i]) bad++;
      if (tx_arb) arb_bits++;
      if (!tx_chk) bad++;
    end
    for (int i = 0; i < 12; i++) begin
      txp(b); if (b != 1'b1) bad++;
      if (!tx_active || tx_chk) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d wrong bits of %0d", what, bad, q.size() + 12));
    check(arb_bits == 12, $sformatf("%s: %0d arbitration bits", what, arb_bits));
    rx_state = RX_IDLE;
    txp(b);
    check(b == 1'b1 && state == TX_IDLE && !tx_active, {what, ": back to idle"});
  endtask

  initial begin
    can_frame_t f;
    bit b;
    int bad;
    repeat (3) @(posedge clk);
    rst_n = 1;
    txp(b);
    check(b == 1'b1, "idle: recessive");

    f = '0; f.id = 11'h7C0; f.dlc = 4'd8;
    f.data = {8'h00, 8'hFF, 8'h83, 8'h7C, 8'h00, 8'h01, 8'hF8, 8'h1F};
    send_check(f, "data frame");
    f = '0; f.id = 11'h001; f.rtr = 1; f.dlc = 4'd4;
    send_check(f, "remote frame");
    f = '0; f.id = 11'h6B5; f.dlc = 4'd0;
    send_check(f, "empty data frame");

    // ACK as a receiver
    rx_state = RX_ACK; rx_crc_ok = 1;
    txp(b); check(b == 1'b0, "ACK slot dominant with correct CRC");
    rx_state = RX_ACK_D;
    txp(b); check(b == 1'b1, "ACK delimiter recessive");
    rx_state = RX_ACK; rx_crc_ok = 0;
    txp(b); check(b == 1'b1, "no ACK with CRC error");
    rx_state = RX_ERR_FL;

    // active error flag, then delimiter until the receiver is in intermission
    pulse_err();
    bad = 0;
    for (int i = 0; i < 6; i++) begin txp(b); if (b) bad++; end
    check(bad == 0, "active error flag: 6 dominant bits");
    rx_state = RX_FLAG_D;
    for (int i = 0; i < 8; i++) begin txp(b); if (!b) bad++; end
    check(bad == 0 && state == TX_FLAG_D, "error delimiter recessive");
    rx_state = RX_IM; rx_cnt = 7'd0;
    txp(b); check(state == TX_IDLE && b, "idle after delimiter");

    // passive error flag
    err_passive = 1;
    pulse_err();
    bad = 0;
    for (int i = 0; i < 6; i++) begin txp(b); if (!b) bad++; end
    check(bad == 0 && state == TX_ERR_FL, "passive error flag: 6 recessive bits");
    err_passive = 0;
    txp(b);

    // overload flag
    @(negedge clk); ovl_start = 1; @(negedge clk); ovl_start = 0;
    bad = 0;
    for (int i = 0; i < 6; i++) begin txp(b); if (b) bad++; end
    txp(b); if (!b) bad++;
    check(bad == 0, "overload flag: 6 dominant bits, then recessive");
    rx_state = RX_IM; rx_cnt = 7'd0;
    txp(b);

    // start in the third intermission bit only
    f = '0; f.id = 11'h0AA; f.dlc = 4'd1; f.data[0] = 8'h3C;
    tx_frame = f; tx_req = 1;
    rx_cnt = 7'd1; txp(b);
    check(b == 1'b1 && !tx_start, "no start in the second intermission bit");
    rx_cnt = 7'd2; txp(b);
    check(b == 1'b0 && state == TX_SOF, "start of frame in the third intermission bit");
    rx_state = RX_ARB;
    txp(b); txp(b);
    // lost arbitration: withdraw
    @(negedge clk); arb_lost = 1; @(negedge clk); arb_lost = 0;
    check(state == TX_IDLE, "lost arbitration: idle");
    bad = 0;
    for (int i = 0; i < 5; i++) begin txp(b); if (!b) bad++; end
    check(bad == 0, "lost arbitration: only recessive afterwards");

    // not integrated yet: no start on an idle bus
    tx_req = 0; rx_state = RX_IDLE; bus_int = 0;
    txp(b);
    tx_req = 1;
    bad = 0;
    for (int i = 0; i < 3; i++) begin txp(b); if (!b) bad++; end
    check(bad == 0 && state == TX_IDLE, "no start before bus integration");
    bus_int = 1;
    txp(b);
    check(!b && state == TX_SOF, "start once integrated");
    @(negedge clk); arb_lost = 1; @(negedge clk); arb_lost = 0;

    // suspend transmission after a frame sent while error passive
    err_passive = 1;
    @(negedge clk); rx_tx_ok = 1; @(negedge clk); rx_tx_ok = 0;
    rx_state = RX_IM; rx_cnt = 7'd2; txp(b);
    check(b && state == TX_IDLE, "passive sender: no start in the third intermission bit");
    rx_state = RX_IDLE;
    bad = 0;
    for (int i = 0; i < 8; i++) begin txp(b); if (!b) bad++; end
    check(bad == 0 && state == TX_IDLE, "passive sender: 8 recessive suspend bits");
    txp(b);
    check(!b && state == TX_SOF, "passive sender: start after suspend");
    @(negedge clk); arb_lost = 1; @(negedge clk); arb_lost = 0;
    // another node starts during the suspension: this node then receives
    // and may start at the next third intermission bit
    @(negedge clk); rx_tx_ok = 1; @(negedge clk); rx_tx_ok = 0;
    rx_state = RX_IDLE; txp(b); txp(b);
    rx_state = RX_ARB; txp(b);
    rx_state = RX_IM; rx_cnt = 7'd2; txp(b);
    check(!b && state == TX_SOF, "passive sender: suspension ends when another node starts");
    @(negedge clk); arb_lost = 1; @(negedge clk); arb_lost = 0;
    err_passive = 0;

    // bus off: silent even with a request and at the ACK slot
    bus_off = 1; rx_state = RX_IDLE;
    bad = 0;
    for (int i = 0; i < 4; i++) begin txp(b); if (!b) bad++; end
    rx_state = RX_ACK; rx_crc_ok = 1;
    txp(b); if (!b) bad++;
    check(bad == 0, "bus off: recessive only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
