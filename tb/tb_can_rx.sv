// tb_can_rx: checks the receiver with bit streams built by the bench.
//
// The bench builds each frame bit by bit (start of frame, identifier, RTR,
// IDE, r0, DLC, data, CRC-15 by polynomial long division, stuff bits after
// five equal bits) and feeds it one bit per sample point, with the ACK slot
// driven dominant as another node would. Checks:
//   * after reset the receiver waits for 11 consecutive recessive bits
//     before it treats a dominant bit as a start of frame;
//   * a data frame and a remote frame are stored correctly, the CRC is found
//     correct and rx_valid comes after the 6th end-of-frame bit; the
//     receiver then passes the intermission and goes idle;
//   * the field sequence seen at each sample point of a frame with DLC 6
//     and control field 000110 (the example of the transmission figure);
//   * a sixth equal bit is a stuff error; a wrong CRC is signalled after the
//     ACK delimiter; a dominant CRC delimiter is a form error;
//   * a passive error flag ends only after six equal bits in a row;
//   * a dominant first intermission bit and a full receive buffer start an
//     overload flag; flag plus 8 recessive bits lead back to intermission;
//   * as transmitter: a recessive arbitration bit read dominant is lost
//     arbitration, other mismatches are bit errors, a recessive ACK slot is
//     an ACK error; a recessive stuff bit read dominant during arbitration
//     is a stuff error marked 'err_arb_stuff';
//   * after an active flag the 14th dominant bit and every 8 more give a
//     'dom8' pulse, the 7th does not;
//   * a recessive bit inside the node's own active error flag is a bit
//     error ('flag_bit_err') and a new error flag follows.
`timescale 1ns/1ps
module tb_can_rx;
  import can_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sample_point = 0, rx_bit = 1;
  logic tx_bit = 1, tx_active = 0, tx_chk = 0, tx_arb = 0, ovl_req = 0;
  logic err_passive = 0, bus_idle;
  rx_state_t state;
  logic [6:0] cnt;
  can_frame_t frame;
  logic crc_ok, hard_sync_en, sof, stuff_bit, rx_valid, tx_ok, arb_lost, err_det;
  logic [4:0] err_code;
  logic ovl_start, dom_after_flag, dom8, err_arb_stuff, flag_bit_err;
  int checks = 0, failures = 0;

  can_rx dut (.*);

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

  // Stuffed bits from start of frame to the end of the CRC; crc_xor
  // corrupts the CRC that is sent.
  function automatic void build(can_frame_t f, logic [14:0] crc_xor, ref bit q[$]);
    bit raw[$];
    logic [14:0] c;
    int run;
    bit last;
    int nb;
    raw.push_back(0);
    for (int i = 10; i >= 0; i--) raw.push_back(f.id[i]);
    raw.push_back(f.rtr); raw.push_back(0); raw.push_back(0);
    for (int i = 3; i >= 0; i--) raw.push_back(f.dlc[i]);
    nb = f.rtr ? 0 : int'(dlc_bytes(f.dlc));
    for (int b = 0; b < nb; b++) for (int i = 7; i >= 0; i--) raw.push_back(f.data[b][i]);
    c = ref_crc(raw) ^ crc_xor;
    for (int i = 14; i >= 0; i--) raw.push_back(c[i]);
    q.delete(); run = 0; last = 1;
    foreach (raw[i]) begin
      q.push_back(raw[i]);
      run = (i > 0 && raw[i] == last) ? run + 1 : 1;
      last = raw[i];
      if (run == 5) begin q.push_back(~last); last = ~last; run = 1; end
    end
  endfunction

  // one sample point
  task automatic smp(bit b);
    @(negedge clk); rx_bit = b; sample_point = 1;
    @(negedge clk); sample_point = 0;
    @(negedge clk);
  endtask

  int n_valid, n_err, n_ovl, n_arb, n_stuff, n_dom8, n_daf, n_as, n_fbe;
  logic [4:0] last_code;
  always @(posedge clk) if (rst_n) begin
    if (rx_valid) n_valid++;
    if (err_det) begin n_err++; last_code <= err_code; end
    if (ovl_start) n_ovl++;
    if (arb_lost) n_arb++;
    if (stuff_bit) n_stuff++;
    if (dom8) n_dom8++;
    if (dom_after_flag) n_daf++;
    if (err_arb_stuff) n_as++;
    if (flag_bit_err) n_fbe++;
  end

  // send a whole frame: body, CRC delimiter, ACK (dominant), ACK delimiter,
  // EOF and intermission; returns the number of rx_valid pulses seen after
  // EOF bit 6 and before EOF bit 7
  task automatic send_frame(can_frame_t f, output int valid_at6);
    bit q[$];
    int v0;
    build(f, '0, q);
    foreach (q[i]) smp(q[i]);
    smp(1); smp(0); smp(1);
    for (int i = 1; i <= 7; i++) begin
      v0 = n_valid;
      smp(1);
      if (i == 6) valid_at6 = n_valid - v0;
    end
    smp(1); smp(1); smp(1);
  endtask

  initial begin
    can_frame_t f;
    bit q[$];
    int v6, e0;
    n_valid = 0; n_err = 0; n_ovl = 0; n_arb = 0; n_stuff = 0; last_code = '0;
    n_dom8 = 0; n_daf = 0; n_as = 0; n_fbe = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(!bus_idle && !hard_sync_en, "after reset: not yet integrated");
    for (int i = 0; i < 5; i++) smp(1);
    smp(0);
    check(!bus_idle && n_err == 0 && state == RX_IDLE, "dominant bit before integration ignored");
    for (int i = 0; i < 10; i++) smp(1);
    check(!bus_idle, "10 recessive bits: not yet integrated");
    smp(1);
    check(bus_idle && hard_sync_en, "11 recessive bits: idle, hard sync enabled");

    // data frame rich in stuff bits
    f = '0; f.id = 11'h400; f.dlc = 4'd8;
    f.data = {8'h00, 8'hFF, 8'h0F, 8'hF0, 8'h12, 8'h34, 8'h00, 8'hFF};
    send_frame(f, v6);
    check(v6 == 1, "data frame: rx_valid at EOF bit 6");
    check(frame == f, $sformatf("data frame stored: %h", frame));
    check(crc_ok, "data frame: CRC correct");
    check(n_err == 0, "data frame: no error");
    check(n_stuff > 3, $sformatf("data frame: %0d stuff bits removed", n_stuff));
    check(state == RX_IDLE, "idle after intermission");

    // remote frame
    f = '0; f.id = 11'h2AA; f.rtr = 1; f.dlc = 4'd3;
    send_frame(f, v6);
    check(v6 == 1 && frame.id == f.id && frame.rtr && frame.dlc == 4'd3, "remote frame");

    // field sequence of a frame with control field 000110
    f = '0; f.id = 11'h555; f.dlc = 4'd6; f.data = {16'h0, 48'hC0FFEE123456};
    build(f, '0, q);
    begin
      rx_state_t seq[$];
      int k;
      foreach (q[i]) begin smp(q[i]); if (!dut.is_stuff) seq.push_back(state); end
      // after SOF, 12 ARB bits, 6 CTRL bits, 48 DATA bits, 15 CRC bits
      k = 0;
      check(seq[k] == RX_ARB, "SOF leads to ARB");
      check(seq[12] == RX_CTRL && seq[11] == RX_ARB, "ARB is 12 bits");
      check(seq[18] == RX_DATA && seq[17] == RX_CTRL, "CTRL is 6 bits");
      check(seq[66] == RX_CRC && seq[65] == RX_DATA, "DATA is 48 bits");
      check(state == RX_CRC_D, "CRC_D after 15 CRC bits");
    end
    smp(1); check(state == RX_ACK, "ACK after CRC_D");
    smp(0); check(state == RX_ACK_D, "ACK_D after ACK");
    smp(1); check(state == RX_EOF, "EOF after ACK_D");
    for (int i = 0; i < 10; i++) smp(1);

    // stuff error: six dominant bits from the start of frame
    e0 = n_err;
    for (int i = 0; i < 6; i++) smp(0);
    check(n_err == e0 + 1 && last_code == 5'b00010, "stuff error");
    check(state == RX_ERR_FL, "error flag follows");
    for (int i = 0; i < 6; i++) smp(0);   // the flags on the bus
    for (int i = 0; i < 8; i++) smp(1);   // delimiter
    check(state == RX_IM, "flag and delimiter lead to intermission");
    smp(1); smp(1); smp(1);

    // passive error flag: complete after six equal bits in a row
    err_passive = 1;
    e0 = n_err;
    for (int i = 0; i < 6; i++) smp(0);
    check(n_err == e0 + 1 && state == RX_ERR_FL, "passive node: stuff error");
    for (int i = 0; i < 3; i++) smp(0);
    smp(1);
    for (int i = 0; i < 5; i++) smp(0);
    smp(1);
    check(state == RX_ERR_FL, "passive flag: not complete without six equal bits");
    for (int i = 0; i < 6; i++) smp(0);
    smp(1);
    check(state == RX_FLAG_D, "passive flag: complete after six equal bits");
    for (int i = 0; i < 7; i++) smp(1);
    check(state == RX_IM, "passive flag: delimiter leads to intermission");
    smp(1); smp(1); smp(1);
    err_passive = 0;

    // CRC error: signalled after the ACK delimiter
    f = '0; f.id = 11'h123; f.dlc = 4'd1; f.data[0] = 8'h5A;
    build(f, 15'h0004, q);
    e0 = n_err;
    foreach (q[i]) smp(q[i]);
    smp(1); check(!crc_ok, "CRC mismatch found");
    smp(1); smp(1);   // no ACK from anyone, ACK delimiter
    check(n_err == e0 + 1 && last_code == 5'b01000, "CRC error after ACK delimiter");
    for (int i = 0; i < 6; i++) smp(0);
    for (int i = 0; i < 8; i++) smp(1);
    smp(1); smp(1); smp(1);

    // form error: dominant CRC delimiter
    f = '0; f.id = 11'h321; f.dlc = 4'd0;
    build(f, '0, q);
    e0 = n_err;
    foreach (q[i]) smp(q[i]);
    smp(0);
    check(n_err == e0 + 1 && last_code == 5'b00100, "form error in CRC delimiter");
    for (int i = 0; i < 6; i++) smp(0);
    for (int i = 0; i < 8; i++) smp(1);

    // overload: dominant first intermission bit
    e0 = n_ovl;
    smp(0);
    check(n_ovl == e0 + 1 && state == RX_OVL_FL, "overload flag after dominant IM bit");
    for (int i = 0; i < 6; i++) smp(0);   // this node's own flag
    for (int i = 0; i < 8; i++) smp(1);
    check(state == RX_IM, "overload delimiter ends in intermission");
    smp(1); smp(1); smp(1);

    // overload requested by the receive buffer
    ovl_req = 1;
    f = '0; f.id = 11'h0F0; f.dlc = 4'd1; f.data[0] = 8'h77;
    build(f, '0, q);
    e0 = n_ovl;
    foreach (q[i]) smp(q[i]);
    smp(1); smp(0); smp(1);
    for (int i = 0; i < 7; i++) smp(1);
    check(n_ovl == e0 + 1 && state == RX_OVL_FL, "overload after EOF for full buffer");
    ovl_req = 0;
    for (int i = 0; i < 6; i++) smp(0);
    for (int i = 0; i < 8; i++) smp(1);
    smp(1); smp(1); smp(1);

    // as transmitter: arbitration lost, bit error, ACK error
    tx_active = 1; tx_chk = 1; tx_bit = 0;
    smp(0);                                  // SOF
    tx_arb = 1; tx_bit = 1;
    e0 = n_arb;
    v6 = n_err;
    smp(0);                                  // sent 1, read 0
    check(n_arb == e0 + 1 && n_err == v6, "arbitration lost, no error");
    tx_active = 0; tx_chk = 0; tx_arb = 0;
    v6 = n_err;
    for (int i = 0; i < 6; i++) smp(1);      // sixth recessive bit: stuff error
    check(n_err == v6 + 1 && last_code == 5'b00010, "stuff error as receiver");
    for (int i = 0; i < 6; i++) smp(0);
    for (int i = 0; i < 8; i++) smp(1);
    smp(1); smp(1); smp(1);
    tx_active = 1; tx_chk = 1; tx_bit = 0;
    e0 = n_err;
    smp(1);                                  // SOF sent dominant, read recessive
    check(n_err == e0 + 1 && last_code == 5'b00001, "bit error");
    tx_chk = 0;
    for (int i = 0; i < 6; i++) smp(0);
    for (int i = 0; i < 8; i++) smp(1);
    smp(1); smp(1); smp(1);
    // ACK error: a full frame sent, nobody acknowledges
    f = '0; f.id = 11'h111; f.dlc = 4'd0;
    build(f, '0, q);
    tx_chk = 0; tx_active = 1;
    e0 = n_err;
    foreach (q[i]) smp(q[i]);
    smp(1); smp(1);
    check(n_err == e0 + 1 && last_code == 5'b10000, "ACK error");
    tx_active = 0;
    for (int i = 0; i < 6; i++) smp(0);
    for (int i = 0; i < 8; i++) smp(1);
    smp(1); smp(1); smp(1);

    // recessive stuff bit read dominant during arbitration
    tx_active = 1; tx_chk = 1; tx_bit = 0;
    e0 = n_err;
    smp(0);                                  // SOF
    tx_arb = 1;
    for (int i = 0; i < 4; i++) smp(0);      // identifier 0000
    tx_arb = 0; tx_bit = 1;
    smp(0);                                  // stuff bit sent 1, read 0
    check(n_err == e0 + 1 && last_code == 5'b00010 && n_as == 1,
          "stuff bit in arbitration read dominant: stuff error, marked");
    tx_active = 0; tx_chk = 0;

    // dominant bits after an active error flag: 14th, then every 8th
    v6 = n_dom8;
    for (int i = 0; i < 13; i++) smp(0);     // 6 flag bits and 7 more
    check(n_dom8 == v6, "13 dominant bits: no dom8");
    smp(0);
    check(n_dom8 == v6 + 1, "14th dominant bit: dom8");
    for (int i = 0; i < 7; i++) smp(0);
    check(n_dom8 == v6 + 1, "21 dominant bits: one dom8");
    smp(0);
    check(n_dom8 == v6 + 2, "22nd dominant bit: second dom8");
    for (int i = 0; i < 8; i++) smp(1);
    check(state == RX_IM, "delimiter after long dominant run");
    smp(1); smp(1); smp(1);

    // recessive bit in the node's own active error flag
    for (int i = 0; i < 6; i++) smp(0);      // stuff error
    e0 = n_err;
    tx_bit = 0;                              // the node drives its flag
    smp(0); smp(0); smp(1);                  // flag bit 3 read recessive
    check(n_err == e0 + 1 && n_fbe == 1 && last_code == 5'b00001 && state == RX_ERR_FL && cnt == 0,
          "bit error in own error flag: new error flag");
    for (int i = 0; i < 6; i++) smp(0);
    tx_bit = 1;
    for (int i = 0; i < 8; i++) smp(1);
    check(state == RX_IM && n_fbe == 1, "new flag and delimiter lead to intermission");
    smp(1); smp(1); smp(1);

    // a flag this node does not drive dominant (passive or bus off): no bit error
    for (int i = 0; i < 6; i++) smp(0);      // stuff error
    for (int i = 0; i < 3; i++) smp(1);
    check(n_fbe == 1 && state == RX_ERR_FL, "recessive flag bits not driven dominant: no bit error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
