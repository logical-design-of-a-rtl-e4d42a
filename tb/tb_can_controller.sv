// tb_can_controller: end-to-end test of three CAN nodes on one bus.
//
// Three can_controller instances with default parameters share a wired-AND
// bus; each runs from its own clock (10.00, 10.03 and 9.98 ns periods) so
// that the receivers have to resynchronize during a frame. The bench plays
// the host of every node through the register bus and checks:
//   A  a data frame with long runs of equal bits (stuffing) from node 0,
//      received and acknowledged by nodes 1 and 2;
//   B  nodes 0 and 1 request during a frame of node 2, start together in the
//      third intermission bit and arbitrate; node 1 (lower identifier) wins,
//      node 0 sends afterwards; node 2 does not read in between, so the
//      second frame goes to the hidden receive buffer and overload frames
//      follow; after node 2 releases, the hidden frame moves up;
//   C  one bit forced dominant on the bus during node 0's data field: bit
//      error, error frame, automatic retransmission, TEC of node 0 = 8-1;
//   D  one bit flipped in node 1's private view only: CRC error at node 1,
//      error frame after the ACK delimiter, retransmission;
//   E  the bus stuck recessive while node 2 transmits: bit errors in its
//      frame and in its own active error flags; node 2 goes error
//      passive (its passive error flags end after six equal bits, and it
//      waits 8 suspend bits before each new attempt), then bus off; after 128 x 11 recessive bits it recovers and
//      sends a frame again;
//   F  the bus held dominant for 24 bit times from a data bit of node 0:
//      bit error, then dominant bits after the error flag; the 14th and the
//      22nd each add 8 to node 0's TEC (8 + 16, then -1 for the
//      retransmission);
//   G  12 rounds of random traffic: one or two nodes request at the same
//      time with random identifiers, RTR, DLC and data; every other node
//      must read all the frames (the order depends on whether the two
//      starts fall in the same bit, so it is not checked);
//   H  all nodes reprogrammed to the longest (25 TQ of 1 clock) and the
//      shortest (8 TQ of 2 clocks) bit time: the measured bit length, then
//      two senders and each frame read by the other nodes.
// Expected frames are the ones the bench wrote; every mechanism is counted
// and a mechanism that never occurred counts as a failure.
`timescale 1ns/1ps
module tb_can_controller;
  import can_pkg::*;

  localparam int N = 3;
  logic [N-1:0] clk;
  logic         rst_n;
  logic [N-1:0] txo;
  logic [N-1:0] flip;       // per-node bus view corruption
  logic         inj_dom, stuck_rec;
  logic         bus;
  logic [4:0]   addr  [N];
  logic         wr    [N];
  logic [7:0]   wdata [N];
  logic [7:0]   rdata [N];
  logic [N-1:0] irq;

  int checks = 0, failures = 0;

  initial begin clk[0] = 0; forever #5.000 clk[0] = ~clk[0]; end
  initial begin clk[1] = 0; #1.3; forever #5.015 clk[1] = ~clk[1]; end
  initial begin clk[2] = 0; #3.1; forever #4.990 clk[2] = ~clk[2]; end

  assign bus = stuck_rec | (&txo & ~inj_dom);

  for (genvar i = 0; i < N; i++) begin : g_node
    can_controller u (
      .clk(clk[i]), .rst_n, .can_rx(bus ^ flip[i]), .can_tx(txo[i]),
      .addr(addr[i]), .wr(wr[i]), .wdata(wdata[i]), .rdata(rdata[i]), .irq(irq[i])
    );
  end

  // ---------------------------------------------------------------- host
  task automatic tick(int n);
    case (n)
      0: @(posedge clk[0]);
      1: @(posedge clk[1]);
      default: @(posedge clk[2]);
    endcase
  endtask

  task automatic hwr(int n, logic [4:0] a, logic [7:0] d);
    tick(n); #1; addr[n] = a; wdata[n] = d; wr[n] = 1'b1;
    tick(n); #1; wr[n] = 1'b0;
  endtask

  task automatic hrd(int n, logic [4:0] a, output logic [7:0] d);
    tick(n); #1; addr[n] = a; #1; d = rdata[n];
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load_tx(int n, can_frame_t f);
    hwr(n, 5'h08, f.id[10:3]);
    hwr(n, 5'h09, {f.id[2:0], f.rtr, f.dlc});
    for (int b = 0; b < 8; b++) hwr(n, 5'(8'h0A + b), f.data[b]);
  endtask

  task automatic read_rx(int n, output can_frame_t f);
    logic [7:0] v;
    f = '0;
    hrd(n, 5'h12, v); f.id[10:3] = v;
    hrd(n, 5'h13, v); {f.id[2:0], f.rtr, f.dlc} = v;
    for (int b = 0; b < 8; b++) begin hrd(n, 5'(8'h14 + b), v); f.data[b] = v; end
  endtask

  // read as many frames as expected, in any order (two requests on an idle
  // bus start in the same bit only if the nodes' bit times happen to line up)
  task automatic expect_rx_any(int n, can_frame_t exp [$], string what);
    can_frame_t got;
    logic [7:0] st;
    bit found;
    while (exp.size() > 0) begin
      hrd(n, 5'h01, st);
      check(st[0], {what, ": receive buffer full"});
      read_rx(n, got);
      found = 0;
      foreach (exp[i]) if (same(got, exp[i])) begin exp.delete(i); found = 1; break; end
      check(found, $sformatf("%s: unexpected frame id %h", what, got.id));
      hwr(n, 5'h00, 8'h04);
      if (!found) break;
    end
  endtask

  function automatic bit same(can_frame_t a, can_frame_t b);
    if (a.id != b.id || a.rtr != b.rtr || a.dlc != b.dlc) return 0;
    if (!a.rtr)
      for (int i = 0; i < int'(dlc_bytes(a.dlc)); i++) if (a.data[i] != b.data[i]) return 0;
    return 1;
  endfunction

  task automatic wait_status(int n, int bitn, int max_bits, output bit ok);
    logic [7:0] v;
    ok = 0;
    for (int k = 0; k < max_bits * 20; k++) begin
      hrd(n, 5'h01, v);
      if (v[bitn]) begin ok = 1; break; end
    end
  endtask

  task automatic expect_rx(int n, can_frame_t exp, string what);
    can_frame_t got;
    logic [7:0] st;
    hrd(n, 5'h01, st);
    check(st[0], {what, ": receive buffer full"});
    read_rx(n, got);
    check(same(got, exp), $sformatf("%s: frame id %h got id %h dlc %0d", what, exp.id, got.id, got.dlc));
    hwr(n, 5'h00, 8'h04);   // release
  endtask

  // ------------------------------------------------------- event counters
  int n_stuff, n_arb, n_ack, n_err, n_crc_err, n_bit_err, n_ovl, n_xfer;
  int n_hs, n_rs, n_passive, n_busoff, n_recover, n_start, n_valid;
  int n_susp, n_pflag, n_dom8, n_fbe;
  logic [N-1:0] pas_q, off_q;
  rx_state_t rs2_q;
  always @(posedge clk[0]) begin
    if (g_node[0].u.u_fs.u_tx.stuff_sent) n_stuff++;
    if (g_node[0].u.u_fs.arb_lost) n_arb++;
    if (g_node[0].u.u_fs.err_det) n_err++;
    if (g_node[0].u.u_fs.err_det && g_node[0].u.u_fs.u_rx.err_code[0]) n_bit_err++;
    if (g_node[0].u.u_fs.u_rx.ovl_start) n_ovl++;
    if (g_node[0].u.u_bs.hard_sync) n_hs++;
    if (g_node[0].u.u_bs.resync) n_rs++;
    if (g_node[0].u.u_fs.dom8) n_dom8++;
    if (g_node[0].u.u_fs.u_tx.tx_start) n_start++;
    if (g_node[0].u.u_fs.sample_point && g_node[0].u.u_fs.u_rx.state == RX_ACK_D &&
        g_node[0].u.u_fs.tx_ok == 1'b0 && g_node[0].u.u_fs.rx_bit == 1'b1 &&
        g_node[0].u.u_fs.u_tx.tx_active) ; // placeholder, ACK counted below
  end
  always @(posedge clk[1]) begin
    if (g_node[1].u.u_fs.u_tx.stuff_sent) n_stuff++;
    if (g_node[1].u.u_fs.arb_lost) n_arb++;
    if (g_node[1].u.u_fs.err_det && g_node[1].u.u_fs.u_rx.err_code[3]) n_crc_err++;
    if (g_node[1].u.u_bs.resync) n_rs++;
    if (g_node[1].u.u_bs.hard_sync) n_hs++;
    if (g_node[1].u.u_fs.rx_valid) n_valid++;
    if (g_node[1].u.u_fs.u_tx.tx_start) n_start++;
  end
  always @(posedge clk[2]) begin
    // ACK: node 2 sampling the ACK slot dominant
    if (g_node[2].u.u_fs.sample_point && g_node[2].u.u_fs.u_rx.state == RX_ACK &&
        !g_node[2].u.u_fs.rx_bit) n_ack++;
    if (g_node[2].u.u_fs.u_rx.ovl_start) n_ovl++;
    if (g_node[2].u.u_rxb.transfer) n_xfer++;
    if (g_node[2].u.u_bs.resync) n_rs++;
    if (g_node[2].u.u_fs.rx_valid) n_valid++;
    if (g_node[2].u.u_fs.u_tx.tx_start) n_start++;
    pas_q[2] <= g_node[2].u.err_passive;
    off_q[2] <= g_node[2].u.bus_off;
    if (g_node[2].u.err_passive && !pas_q[2]) n_passive++;
    if (g_node[2].u.bus_off && !off_q[2]) n_busoff++;
    if (g_node[2].u.u_fs.u_err.recovered) n_recover++;
    if (g_node[2].u.u_fs.flag_bit_err) n_fbe++;
    // a transmission point on an idle bus where the pending start waits
    if (g_node[2].u.u_bs.tx_point && g_node[2].u.u_fs.u_tx.sent &&
        g_node[2].u.err_passive && g_node[2].u.u_fs.u_tx.tx_req &&
        g_node[2].u.u_fs.bus_idle) n_susp++;
    rs2_q <= g_node[2].u.u_fs.u_rx.state;
    if (rs2_q == RX_ERR_FL && g_node[2].u.u_fs.u_rx.state == RX_FLAG_D &&
        g_node[2].u.err_passive) n_pflag++;
  end

  // ------------------------------------------------------------ watchdog
  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- main
  can_frame_t fa, fb0, fb1, fb2, fc, fd, fe;
  int et0;
  bit ok;
  logic [7:0] v;
  initial begin
    {n_stuff, n_arb, n_ack, n_err, n_crc_err, n_bit_err, n_ovl, n_xfer} = '0;
    {n_hs, n_rs, n_passive, n_busoff, n_recover, n_start, n_valid} = '0;
    {n_susp, n_pflag, n_dom8, n_fbe} = '0;
    pas_q = '0; off_q = '0;
    rst_n = 0; flip = '0; inj_dom = 0; stuck_rec = 0;
    for (int i = 0; i < N; i++) begin addr[i] = '0; wr[i] = 0; wdata[i] = '0; end
    #100; rst_n = 1;
    #3000;   // 11 recessive bits for bus integration

    // A: one frame with stuffing, two receivers
    fa = '0; fa.id = 11'h123; fa.dlc = 4'd8;
    fa.data = {8'h5A, 8'h81, 8'hC3, 8'h00, 8'h00, 8'hFF, 8'hFF, 8'h00};
    load_tx(0, fa);
    hwr(0, 5'h1C, 8'h02);                 // tx_done interrupt
    hwr(0, 5'h00, 8'h01);
    wait_status(0, 2, 400, ok);
    check(ok, "A: tx_done at node 0");
    check(irq[0], "A: node 0 interrupt");
    expect_rx(1, fa, "A node1");
    expect_rx(2, fa, "A node2");
    hrd(0, 5'h06, v); check(v == 8'd0, "A: TEC 0");
    hwr(0, 5'h01, 8'h1C);

    // B: arbitration after a frame of node 2, then double buffer at node 2
    fb2 = '0; fb2.id = 11'h7F0; fb2.dlc = 4'd2; fb2.data[0] = 8'hA5; fb2.data[1] = 8'h3C;
    fb0 = '0; fb0.id = 11'h200; fb0.dlc = 4'd1; fb0.data[0] = 8'h11;
    fb1 = '0; fb1.id = 11'h100; fb1.dlc = 4'd3; fb1.data = {40'h0, 8'h33, 8'h22, 8'h11};
    load_tx(0, fb0); load_tx(1, fb1); load_tx(2, fb2);
    hwr(2, 5'h00, 8'h01);
    #(20 * 200);                          // node 2 is on the bus
    fork
      hwr(0, 5'h00, 8'h01);
      hwr(1, 5'h00, 8'h01);
    join
    wait_status(0, 2, 800, ok);
    check(ok, "B: node 0 done");
    wait_status(1, 2, 800, ok);
    check(ok, "B: node 1 done");
    hrd(0, 5'h01, v); check(v[3], "B: node 0 lost arbitration");
    hrd(1, 5'h01, v); check(!v[3], "B: node 1 won arbitration");
    expect_rx(2, fb1, "B node2 first");   // release moves the hidden frame up
    #200;
    expect_rx(2, fb0, "B node2 second");
    expect_rx(0, fb2, "B node0 gets node2");
    hwr(0, 5'h00, 8'h04);
    #400;
    hwr(1, 5'h00, 8'h04); hwr(1, 5'h00, 8'h04);
    hwr(0, 5'h00, 8'h04);
    hwr(0, 5'h01, 8'h1C); hwr(1, 5'h01, 8'h1C);
    #1000;

    // C: bit error injected in the data field of node 0
    fc = '0; fc.id = 11'h0A5; fc.dlc = 4'd4; fc.data = {32'h0, 8'h0F, 8'hF0, 8'h55, 8'hAA};
    load_tx(0, fc);
    hwr(0, 5'h00, 8'h01);
    wait (g_node[0].u.u_fs.u_tx.state == TX_DATA);
    wait (g_node[0].u.can_tx == 1'b1);
    #20; inj_dom = 1; #(20 * 10); inj_dom = 0;
    wait_status(0, 2, 800, ok);
    check(ok, "C: retransmission done");
    hrd(0, 5'h01, v); check(v[4], "C: node 0 saw an error");
    hrd(0, 5'h06, v); check(v == 8'd7, $sformatf("C: TEC of node 0 is %0d, expected 7", v));
    expect_rx(1, fc, "C node1");
    expect_rx(2, fc, "C node2");
    hwr(0, 5'h01, 8'h1C);

    // D: CRC error seen by node 1 only
    fd = '0; fd.id = 11'h3C3; fd.dlc = 4'd2; fd.data[0] = 8'h96; fd.data[1] = 8'h69;
    load_tx(0, fd);
    hwr(0, 5'h00, 8'h01);
    wait (g_node[1].u.u_fs.u_rx.state == RX_DATA);
    wait (g_node[1].u.u_fs.u_rx.cnt == 7'd3);
    @(posedge g_node[1].u.u_fs.sample_point);
    #80; flip[1] = 1; #(20 * 10 - 80 + 60); flip[1] = 0;
    wait_status(0, 2, 800, ok);
    check(ok, "D: retransmission done");
    expect_rx(1, fd, "D node1");
    expect_rx(2, fd, "D node2");
    hrd(0, 5'h06, v); check(v == 8'd14, $sformatf("D: TEC of node 0 is %0d, expected 14", v));
    hwr(0, 5'h01, 8'h1C);

    // E: bus stuck recessive while node 2 sends: passive, bus off, recovery
    fe = '0; fe.id = 11'h555; fe.dlc = 4'd1; fe.data[0] = 8'hE7;
    load_tx(2, fe);
    stuck_rec = 1;
    hwr(2, 5'h00, 8'h01);
    wait_status(2, 7, 2000, ok);
    check(ok, "E: node 2 bus off");
    stuck_rec = 0;
    hrd(2, 5'h06, v); check(v == 8'hFF, "E: TEC above 255");
    wait_status(2, 2, 2500, ok);
    check(ok, "E: node 2 sends after recovery");
    hrd(2, 5'h01, v); check(!v[7] && !v[6], "E: node 2 error active again");
    expect_rx(0, fe, "E node0");
    expect_rx(1, fe, "E node1");

    // F: bus held dominant after a bit error: 14/8 dominant bit rule
    hrd(0, 5'h06, v);
    et0 = v;
    fc.id = 11'h2D2;
    load_tx(0, fc);
    hwr(0, 5'h00, 8'h01);
    wait (g_node[0].u.u_fs.u_tx.state == TX_DATA);
    wait (g_node[0].u.can_tx == 1'b1);
    #20; inj_dom = 1; #(20 * 10 * 24); inj_dom = 0;
    wait_status(0, 2, 800, ok);
    check(ok, "F: retransmission done");
    hrd(0, 5'h06, v);
    check(v == et0 + 23, $sformatf("F: TEC of node 0 is %0d, expected %0d", v, et0 + 23));
    expect_rx(1, fc, "F node1");
    expect_rx(2, fc, "F node2");

    // G: random traffic
    void'($urandom(32'h0C0A_2026));
    for (int n = 0; n < N; n++) hwr(n, 5'h01, 8'h1C);
    for (int r = 0; r < 12; r++) begin
      can_frame_t g [N];
      bit snd [N];
      int s0, s1;
      s0 = $urandom_range(0, N - 1);
      s1 = (s0 + 1 + $urandom_range(0, N - 2)) % N;
      for (int n = 0; n < N; n++) begin
        snd[n] = (n == s0) || (n == s1 && r % 2 == 1);
        g[n] = '0;
        g[n].id = {8'($urandom), 3'(n)};
        g[n].rtr = ($urandom_range(0, 3) == 0);
        g[n].dlc = 4'($urandom);
        g[n].data = {$urandom, $urandom};
        if (snd[n]) load_tx(n, g[n]);
      end
      fork
        if (snd[0]) hwr(0, 5'h00, 8'h01);
        if (snd[1]) hwr(1, 5'h00, 8'h01);
        if (snd[2]) hwr(2, 5'h00, 8'h01);
      join
      for (int n = 0; n < N; n++) if (snd[n]) begin
        wait_status(n, 2, 800, ok);
        check(ok, $sformatf("G%0d: node %0d done", r, n));
      end
      for (int m = 0; m < N; m++) begin
        can_frame_t q [$];
        q.delete();
        for (int n = 0; n < N; n++) if (snd[n] && n != m) q.push_back(g[n]);
        expect_rx_any(m, q, $sformatf("G%0d node%0d", r, m));
      end
      for (int n = 0; n < N; n++) hwr(n, 5'h01, 8'h1C);
    end

    // H: longest and shortest bit time
    for (int c = 0; c < 2; c++) begin
      logic [7:0] t_brp, t_s1, t_s2, t_sjw;
      int clks;
      can_frame_t h0, h2;
      if (c == 0) begin t_brp = 0; t_s1 = 16; t_s2 = 9; t_sjw = 3; end
      else        begin t_brp = 1; t_s1 = 5;  t_s2 = 3; t_sjw = 1; end
      for (int n = 0; n < N; n++) begin
        hwr(n, 5'h02, t_brp); hwr(n, 5'h03, t_s1); hwr(n, 5'h04, t_s2); hwr(n, 5'h05, t_sjw);
      end
      repeat (3) @(posedge g_node[0].u.u_bs.tx_point);
      clks = 0;
      @(posedge clk[0]);
      while (!g_node[0].u.u_bs.tx_point) begin @(posedge clk[0]); end
      @(posedge clk[0]);
      while (!g_node[0].u.u_bs.tx_point) begin clks++; @(posedge clk[0]); end
      clks++;
      check(clks == (t_brp + 1) * (t_s1 + t_s2),
            $sformatf("H%0d: bit time %0d clocks, expected %0d", c, clks, (t_brp + 1) * (t_s1 + t_s2)));
      h0 = '0; h0.id = 11'h155 + 11'(c); h0.dlc = 4'd8; h0.data = {$urandom, $urandom};
      h2 = '0; h2.id = 11'h0F0 + 11'(c); h2.dlc = 4'd5; h2.data = {$urandom, $urandom};
      load_tx(0, h0); load_tx(2, h2);
      fork
        hwr(0, 5'h00, 8'h01);
        hwr(2, 5'h00, 8'h01);
      join
      wait_status(0, 2, 800, ok);
      check(ok, $sformatf("H%0d: node 0 done", c));
      wait_status(2, 2, 800, ok);
      check(ok, $sformatf("H%0d: node 2 done", c));
      expect_rx_any(1, '{h0, h2}, $sformatf("H%0d node1", c));
      expect_rx(0, h2, $sformatf("H%0d node0", c));
      expect_rx(2, h0, $sformatf("H%0d node2", c));
      for (int n = 0; n < N; n++) hwr(n, 5'h01, 8'h1C);
    end

    // mechanisms
    $display("stuff=%0d arb=%0d ack=%0d err=%0d bit_err=%0d crc_err=%0d ovl=%0d xfer=%0d",
             n_stuff, n_arb, n_ack, n_err, n_bit_err, n_crc_err, n_ovl, n_xfer);
    $display("hard_sync=%0d resync=%0d passive=%0d bus_off=%0d recover=%0d starts=%0d valid=%0d",
             n_hs, n_rs, n_passive, n_busoff, n_recover, n_start, n_valid);
    $display("passive_flags=%0d suspend_bits=%0d dom8=%0d flag_bit_err=%0d",
             n_pflag, n_susp, n_dom8, n_fbe);
    check(n_stuff > 0, "stuff bits sent");
    check(n_arb > 0, "arbitration lost");
    check(n_ack > 0, "acknowledge");
    check(n_err > 0, "error frames");
    check(n_bit_err > 0, "bit error");
    check(n_crc_err > 0, "CRC error");
    check(n_ovl > 0, "overload frames");
    check(n_xfer > 0, "hidden to visible transfer");
    check(n_hs > 0, "hard synchronization");
    check(n_rs > 0, "resynchronization");
    check(n_passive > 0, "error passive");
    check(n_pflag > 0, "passive error flag");
    check(n_susp > 0, "suspend transmission");
    check(n_busoff > 0, "bus off");
    check(n_dom8 > 0, "8 dominant bits after a flag");
    // TEC needs 16 steps of 8 to leave error active; passive flags are
    // recessive, so there can be at most 16 such errors
    check(n_fbe > 0 && n_fbe <= 16, $sformatf("%0d bit errors in error flags", n_fbe));
    check(n_recover > 0, "bus-off recovery");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
