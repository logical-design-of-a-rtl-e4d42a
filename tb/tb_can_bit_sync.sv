// tb_can_bit_sync: checks bit timing, hard synchronization and
// resynchronization of can_bit_sync.
//
// Settings: TQ = 2 clocks, seg1 = 7 TQ, seg2 = 3 TQ, so a bit is 20 clocks,
// the sample point 14 clocks after the transmission point.
//  1. idle bus: transmission points every 20 clocks, sample point 14 clocks
//     after each;
//  2. hard sync: a falling edge with hard_sync_en restarts the bit: the
//     edge TQ is the sync TQ, so the sample point follows 6 TQ (12 clocks)
//     after the hard_sync pulse and samples dominant;
// The input synchronizer delays an edge by about one TQ, so an edge put on
// the bus in TQ k is seen in TQ k+1.
//  3. resync, late edge (seen 4 TQ into seg1, SJW 1): that bit lasts 22
//     clocks;
//  4. resync, early edge (seen 2 TQ before the end of the bit, SJW 1): seg2
//     shortened by one TQ, bit of 18 clocks, the next one 20;
//  5. the same with SJW 2: the edge TQ becomes the sync TQ of the next bit,
//     which is therefore one TQ short of 20 clocks after the tx point;
//  6. no lengthening while the node itself sends dominant.
`timescale 1ns/1ps
module tb_can_bit_sync;
  logic clk = 0, rst_n = 0;
  logic can_rx = 1;
  logic [7:0] brp = 8'd1;
  logic [4:0] seg1 = 5'd7;
  logic [3:0] seg2 = 4'd3;
  logic [1:0] sjw = 2'd1;
  logic hard_sync_en = 0, tx_dominant = 0;
  logic tx_point, sample_point, rx_bit, bus_now, hard_sync, resync;
  int checks = 0, failures = 0;
  longint cyc = 0;

  can_bit_sync dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // cycle number of the next pulse of a signal
  task automatic next_tx(output longint c);
    do @(posedge clk); while (!tx_point);
    c = cyc;
  endtask
  task automatic next_smp(output longint c);
    do @(posedge clk); while (!sample_point);
    c = cyc;
  endtask

  // Put an edge on the bus 'tq' TQ after a transmission point (tq counted
  // in the TQ grid: the edge sits in the middle of that TQ), hold dominant
  // for 'len' clocks, then measure the length of the bit the edge is in.
  task automatic edge_at(int tq, int len, output longint bitlen, output longint nextlen);
    longint t0, t1, t2;
    next_tx(t0);
    fork
      begin
        repeat (tq * 2) @(posedge clk);
        #1 can_rx = 0;
        repeat (len) @(posedge clk);
        #1 can_rx = 1;
      end
      next_tx(t1);
    join
    bitlen = t1 - t0;
    next_tx(t2);
    nextlen = t2 - t1;
  endtask

  initial begin
    longint a, b, c, l, n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1
    next_tx(a);
    for (int i = 0; i < 5; i++) begin
      next_smp(c);
      check(c - a == 14, $sformatf("sample point %0d clocks after tx point", c - a));
      next_tx(b);
      check(b - a == 20, $sformatf("bit of %0d clocks", b - a));
      a = b;
    end
    check(rx_bit == 1'b1, "idle bus samples recessive");
    // 2
    repeat (7) @(posedge clk);
    hard_sync_en = 1;
    #1 can_rx = 0;
    do @(posedge clk); while (!hard_sync);
    a = cyc;
    hard_sync_en = 0;
    next_smp(c);
    check(c - a == 12, $sformatf("hard sync: sample point %0d clocks later", c - a));
    check(rx_bit == 1'b0, "hard sync: dominant sampled");
    #1 can_rx = 1;
    repeat (60) @(posedge clk);
    // 3: late edge, error 3 TQ, jump limited to 1 TQ
    edge_at(3, 6, l, n);
    check(l == 22, $sformatf("late edge: bit of %0d clocks", l));
    check(dut.synced == 1'b0, "one resync per bit");
    repeat (60) @(posedge clk);
    // 4: early edge two TQ before the end of the bit
    edge_at(7, 6, l, n);
    check(l == 18, $sformatf("early edge: bit of %0d clocks", l));
    check(n == 20, $sformatf("early edge: next bit of %0d clocks", n));
    repeat (60) @(posedge clk);
    // 5: same with SJW 2: the bit ends at the edge
    sjw = 2'd2;
    edge_at(7, 6, l, n);
    check(l == 18, $sformatf("early edge, SJW 2: bit of %0d clocks", l));
    check(n == 18, $sformatf("early edge, SJW 2: edge TQ is the sync TQ, next bit %0d clocks", n));
    sjw = 2'd1;
    repeat (60) @(posedge clk);
    // 6: own dominant bit: no lengthening
    tx_dominant = 1;
    edge_at(3, 6, l, n);
    check(l == 20, $sformatf("own dominant: bit of %0d clocks", l));
    tx_dominant = 0;
    repeat (60) @(posedge clk);
    // 7: late edge, error 5 TQ: jump of 3 TQ with SJW 3, 4 TQ with SJW 0
    sjw = 2'd3;
    edge_at(5, 6, l, n);
    check(l == 26, $sformatf("late edge, SJW 3: bit of %0d clocks", l));
    repeat (60) @(posedge clk);
    sjw = 2'd0;
    edge_at(5, 6, l, n);
    check(l == 28, $sformatf("late edge, SJW 0 = 4 TQ: bit of %0d clocks", l));
    sjw = 2'd1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
