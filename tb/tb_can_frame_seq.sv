// tb_can_frame_seq: two frame sequencers on one bus with ideal bit timing.
//
// The bench generates transmission and sample points for both nodes from
// one counter (8 clocks per bit, sample 5 clocks after the transmission
// point) and models the bus as the wired AND of both outputs. Checks:
//   1. node A sends a data frame: node B stores it (rx_valid), acknowledges,
//      node A reports tx_ok and keeps TEC 0;
//   2. both request at once: the lower identifier wins arbitration, the
//      other node loses it without an error and sends right afterwards;
//   3. node B asks for overload (full receive buffer): overload frames
//      follow the frame, and node A's next frame still arrives;
//   1a. during node A's frame, right after each transmission point, A's
//      transmitter field/counter equal A's receiver field/counter, i.e.
//      the transmitter is one bit ahead of the receiver's last sample;
//   4. node B sees a corrupted bit (private flip): both nodes signal an
//      error, node A retransmits, TEC of A = 8-1 after success.
`timescale 1ns/1ps
module tb_can_frame_seq;
  import can_pkg::*;
  logic clk = 0, rst_n = 0;
  logic tx_point = 0, sample_point = 0;
  logic bus, flip_b = 0;
  logic txa, txb, hse_a, hse_b, dom_a, dom_b;
  logic req_a = 0, req_b = 0, ovl_b = 0;
  can_frame_t fa = '0, fb = '0, rxa, rxb;
  logic va, vb, oka, okb, arba, arbb, erra, errb, pa, pb, boa, bob;
  logic [8:0] teca, tecb;
  logic [7:0] reca, recb;
  logic rbit_a, rbit_b;
  int checks = 0, failures = 0;

  assign bus = txa & txb;

  can_frame_seq ua (
    .clk, .rst_n, .tx_point, .sample_point, .rx_bit(rbit_a), .can_tx(txa),
    .hard_sync_en(hse_a), .tx_dominant(dom_a), .tx_req(req_a), .tx_frame(fa),
    .ovl_req(1'b0), .rx_frame(rxa), .rx_valid(va), .tx_ok(oka), .arb_lost(arba),
    .err_det(erra), .tec(teca), .rec(reca), .err_passive(pa), .bus_off(boa)
  );
  can_frame_seq ub (
    .clk, .rst_n, .tx_point, .sample_point, .rx_bit(rbit_b), .can_tx(txb),
    .hard_sync_en(hse_b), .tx_dominant(dom_b), .tx_req(req_b), .tx_frame(fb),
    .ovl_req(ovl_b), .rx_frame(rxb), .rx_valid(vb), .tx_ok(okb), .arb_lost(arbb),
    .err_det(errb), .tec(tecb), .rec(recb), .err_passive(pb), .bus_off(bob)
  );

  always #5 clk = ~clk;

  // ideal bit timing: tx point at phase 0, sample point at phase 5
  int ph = 0;
  always @(posedge clk) begin
    ph <= (ph == 7) ? 0 : ph + 1;
    tx_point <= (ph == 7);
    sample_point <= (ph == 4);
    if (ph == 4) begin rbit_a <= bus; rbit_b <= bus ^ flip_b; end
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_va, n_vb, n_oka, n_okb, n_arba, n_arbb, n_erra, n_errb, n_ovl;
  can_frame_t last_b, last_a;
  always @(posedge clk) if (rst_n) begin
    if (va) begin n_va++; last_a = rxa; end
    if (vb) begin n_vb++; last_b = rxb; end
    if (oka) n_oka++;
    if (okb) n_okb++;
    if (arba) n_arba++;
    if (arbb) n_arbb++;
    if (erra) n_erra++;
    if (errb) n_errb++;
    if (ub.ovl_start) n_ovl++;
  end

  // Transmitter one bit ahead of the receiver: right after each
  // transmission point inside a frame, the transmitter's field and counter
  // name the bit the receiver will sample next (stuff bits excluded).
  int n_align, n_misalign;
  function automatic bit same_field(tx_state_t t, rx_state_t r);
    case (t)
      TX_ARB:  return r == RX_ARB;
      TX_CTRL: return r == RX_CTRL;
      TX_DATA: return r == RX_DATA;
      TX_CRC:  return r == RX_CRC;
      default: return 0;
    endcase
  endfunction
  always @(posedge clk) if (rst_n && ph == 1) begin
    if (ua.u_tx.state inside {TX_ARB, TX_CTRL, TX_DATA, TX_CRC} && !ua.u_tx.is_stuff) begin
      if (same_field(ua.u_tx.state, ua.u_rx.state) && ua.u_tx.cnt == ua.u_rx.cnt) n_align++;
      else n_misalign++;
    end
  end

  task automatic bits(int n);
    repeat (n * 8) @(posedge clk);
  endtask

  initial begin
    {n_va, n_vb, n_oka, n_okb, n_arba, n_arbb, n_erra, n_errb, n_ovl} = '0;
    n_align = 0; n_misalign = 0;
    rbit_a = 1; rbit_b = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    bits(12);
    // 1
    fa.id = 11'h3F1; fa.dlc = 4'd5; fa.data = {24'h0, 40'h0102030405};
    req_a = 1;
    wait (n_oka == 1); req_a = 0;
    check(n_vb == 1 && last_b == fa, "1: B received A's frame");
    check(teca == 0 && n_erra == 0 && n_errb == 0, "1: no errors");
    check(n_align > 60 && n_misalign == 0,
          $sformatf("1: transmitter one bit ahead (%0d aligned, %0d not)", n_align, n_misalign));
    bits(20);
    // 2
    fa.id = 11'h155; fa.dlc = 4'd1; fa.data = 64'h77;
    fb.id = 11'h154; fb.dlc = 4'd2; fb.data = 64'h8899;
    @(posedge clk); req_a = 1; req_b = 1;
    wait (n_okb == 1); req_b = 0;
    check(n_arba == 1 && n_arbb == 0, "2: A lost arbitration");
    check(n_va == 1 && last_a == fb, "2: A received B's frame");
    wait (n_oka == 2); req_a = 0;
    check(n_vb == 2 && last_b == fa, "2: B received A's frame afterwards");
    check(n_erra == 0 && n_errb == 0, "2: no errors");
    bits(20);
    // 3
    ovl_b = 1;
    fa.id = 11'h222; fa.dlc = 4'd0;
    req_a = 1;
    wait (n_oka == 3); req_a = 0;
    bits(12);
    check(n_ovl >= 1, $sformatf("3: %0d overload frames from B", n_ovl));
    check(n_ovl <= 2, "3: at most two overload frames");
    ovl_b = 0;
    fa.id = 11'h223; fa.dlc = 4'd1; fa.data = 64'h5;
    req_a = 1;
    wait (n_oka == 4); req_a = 0;
    check(n_vb == 4 && last_b == fa, "3: next frame after overload");
    bits(20);
    // 4
    fa.id = 11'h0F0; fa.dlc = 4'd2; fa.data = 64'hABCD;
    req_a = 1;
    wait (ub.u_rx.state == RX_DATA);
    bits(3);
    flip_b = 1; bits(1); flip_b = 0;
    wait (n_oka == 5); req_a = 0;
    check(n_erra >= 1 && n_errb >= 1, "4: error signalled by both");
    check(n_vb == 5 && last_b == fa, "4: retransmitted frame received");
    check(teca == 9'd7, $sformatf("4: TEC of A %0d, expected 7", teca));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
