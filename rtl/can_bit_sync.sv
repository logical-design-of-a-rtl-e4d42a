// can_bit_sync: bit timing and synchronization of a CAN node.
//
// A programmable prescaler divides the system clock into time quanta (TQ):
// one TQ lasts brp+1 clock cycles. Following the document, the bit time is
// built from two segments only: the synchronization, propagation and first
// phase segments of the CAN specification are merged into seg1 (seg1 TQ, the
// first of which is the synchronization TQ), and the second phase segment is
// seg2 (seg2 TQ). The node drives a new bit at the start of seg1 ('tx_point')
// and samples the bus at the end of seg1 ('sample_point'); the seg2 TQs after
// the sample point are the information processing time the transmitter uses
// to compute its next bit. The document asks for 8 to 25 TQ per bit; keeping
// seg1+seg2 in that range is left to the host.
//
// The bus is brought into the clock domain by two flip-flops and looked at
// once per TQ. A recessive-to-dominant edge either
//  * hard-synchronizes (hard_sync_en high, i.e. the bus is idle or in the
//    last intermission bit): the TQ holding the edge becomes the
//    synchronization TQ of a new bit, or
//  * resynchronizes, at most once per bit and only if the last sampled bit
//    was recessive: an edge late in seg1 lengthens seg1 by the phase error,
//    an edge in seg2 shortens seg2, both limited to sjw TQ; if the edge comes
//    no more than sjw TQ before the end of the bit, the bit ends there and
//    the edge TQ starts the next bit. A node that is itself sending a
//    dominant bit does not lengthen seg1 on its own edge.
// The sign conventions and the once-per-bit rule come from the CAN
// specification; the document only says that the sample point is moved by
// changing the segment lengths. 'tx_point', 'sample_point', 'hard_sync' and
// 'resync' are one-cycle pulses; 'rx_bit' is the value taken at the latest
// sample point and is valid from the cycle of the 'sample_point' pulse on.
module can_bit_sync (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       can_rx,        // bus input, asynchronous
  input  logic [7:0] brp,           // TQ = brp+1 clock cycles
  input  logic [4:0] seg1,          // TQ in seg1, sync TQ included
  input  logic [3:0] seg2,          // TQ in seg2
  input  logic [1:0] sjw,           // resynchronization jump width, 1..3 TQ; 0 means 4 TQ
  input  logic       hard_sync_en,  // the bus is idle: a falling edge starts a frame
  input  logic       tx_dominant,   // this node is driving a dominant bit
  output logic       tx_point,
  output logic       sample_point,
  output logic       rx_bit,        // sampled bus value (sample_point cycle on)
  output logic       bus_now,       // synchronized bus value
  output logic       hard_sync,
  output logic       resync
);

  logic [1:0] sync_ff;
  logic [7:0] presc;
  logic       tq_tick;
  logic [5:0] q;          // TQ index within the bit
  logic [5:0] s1_eff, s2_eff;
  logic       tq_bus;     // bus value at the previous TQ tick
  logic       last_smp;   // value at the previous sample point
  logic       synced;     // a synchronization already happened in this bit
  logic       sampled;

  logic [5:0] sjw_v;
  assign sjw_v = (sjw == 2'd0) ? 6'd4 : {4'd0, sjw};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_ff <= 2'b11;
    else        sync_ff <= {sync_ff[0], can_rx};
  end
  assign bus_now = sync_ff[1];

  assign tq_tick = (presc == brp);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       presc <= '0;
    else if (tq_tick) presc <= '0;
    else              presc <= presc + 8'd1;
  end

  // Timing decision for the TQ that ends at this tick.
  logic       edge_seen;
  logic [5:0] s1_n, s2_n, q_n, rem;
  logic       do_hs, do_rs, new_bit, smp_now;
  always_comb begin
    edge_seen = tq_bus & ~bus_now;
    s1_n    = s1_eff;
    s2_n    = s2_eff;
    do_hs   = 1'b0;
    do_rs   = 1'b0;
    new_bit = 1'b0;
    smp_now = 1'b0;
    q_n     = q + 6'd1;
    rem     = s1_eff + s2_eff - q;   // TQs left in the bit, this one included
    if (edge_seen && hard_sync_en) begin
      do_hs = 1'b1;
      q_n   = 6'd1;
      s1_n  = {1'b0, seg1};
      s2_n  = {2'b0, seg2};
    end else if (edge_seen && last_smp && !synced && q != 6'd0) begin
      if (q < s1_eff) begin
        // late edge: positive phase error of q TQ
        if (!tx_dominant) begin
          do_rs = 1'b1;
          s1_n  = s1_eff + ((q < sjw_v) ? q : sjw_v);
        end
      end else if (rem <= sjw_v) begin
        // early edge close to the end of the bit: start the next bit here
        do_rs   = 1'b1;
        new_bit = 1'b1;
        q_n     = 6'd1;
        s1_n    = {1'b0, seg1};
        s2_n    = {2'b0, seg2};
      end else begin
        do_rs = 1'b1;
        s2_n  = s2_eff - sjw_v;
      end
    end
    if (!do_hs && !new_bit) begin
      if (q_n == s1_n) smp_now = 1'b1;
      if (q_n == s1_n + s2_n) begin
        new_bit = 1'b1;
        q_n     = 6'd0;
        s1_n    = {1'b0, seg1};
        s2_n    = {2'b0, seg2};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; s1_eff <= 6'd7; s2_eff <= 6'd3;
      tq_bus <= 1'b1; last_smp <= 1'b1; synced <= 1'b0; sampled <= 1'b1;
      tx_point <= 1'b0; sample_point <= 1'b0; hard_sync <= 1'b0; resync <= 1'b0;
    end else begin
      tx_point     <= 1'b0;
      sample_point <= 1'b0;
      hard_sync    <= 1'b0;
      resync       <= 1'b0;
      if (tq_tick) begin
        tq_bus <= bus_now;
        q      <= q_n;
        s1_eff <= s1_n;
        s2_eff <= s2_n;
        if (do_hs || do_rs) synced <= 1'b1;
        if (new_bit && !do_rs && !do_hs) synced <= 1'b0;
        if (new_bit && do_rs) synced <= 1'b1;
        hard_sync <= do_hs;
        resync    <= do_rs;
        tx_point  <= new_bit;
        if (smp_now) begin
          sample_point <= 1'b1;
          sampled      <= bus_now;
          last_smp     <= bus_now;
        end
      end
    end
  end
  assign rx_bit = sampled;

endmodule
