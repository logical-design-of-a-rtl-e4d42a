// tb_can_err: checks the error counters and the error state.
//
// Event pulses are applied one per few cycles and the counters compared with
// values counted by the bench: transmitter errors +8 (ACK error of a passive
// transmitter excepted), receiver errors +1, dominant bit after the own
// error flag +8, each 8 dominant bits after a flag +8 to the counter of the
// node's role, no TEC change for a stuff error on a recessive stuff bit in
// arbitration, +8 for a bit error in the node's own flag, successful
// transmission -1, successful reception -1 or back
// to 120 from above 127; error passive above 127, bus off above 255; bus off
// ends after 128 sequences of 11 recessive bits, and a dominant bit restarts
// the current sequence.
`timescale 1ns/1ps
module tb_can_err;
  import can_pkg::*;
  logic clk = 0, rst_n = 0, sample_point = 0, rx_bit = 1;
  logic err_det = 0, tx_active = 0, dom_after_flag = 0, rx_valid = 0, tx_ok = 0;
  logic dom8 = 0, err_arb_stuff = 0, flag_bit_err = 0;
  logic [4:0] err_code = '0;
  logic [8:0] tec;
  logic [7:0] rec;
  err_state_t err_state;
  logic err_passive, bus_off, recovered;
  int checks = 0, failures = 0;

  can_err dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (tec %0d rec %0d)", what, tec, rec); end
  endtask

  task automatic ev_err(bit as_tx, logic [4:0] code);
    @(negedge clk); err_det = 1; tx_active = as_tx; err_code = code;
    @(negedge clk); err_det = 0; tx_active = 0; err_code = '0;
  endtask
  task automatic ev(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask
  task automatic smp(bit b);
    @(negedge clk); rx_bit = b; sample_point = 1; @(negedge clk); sample_point = 0;
  endtask

  int et, er, recov;
  always @(posedge clk) if (rst_n && recovered) recov++;

  initial begin
    et = 0; er = 0; recov = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(tec == 0 && rec == 0 && err_state == ERR_ACTIVE, "reset: active, counters 0");
    // receiver errors and the +8 rule
    for (int i = 0; i < 5; i++) begin ev_err(0, 5'b00010); er += 1; end
    ev(dom_after_flag); er += 8;
    check(rec == er, "REC +1 per error, +8 after own flag");
    ev(rx_valid); er -= 1;
    check(rec == er, "REC -1 per valid frame");
    // transmitter errors
    for (int i = 0; i < 3; i++) begin ev_err(1, 5'b00001); et += 8; end
    ev(tx_ok); et -= 1;
    check(tec == et && err_state == ERR_ACTIVE, "TEC +8 per error, -1 per frame");
    // dominant after flag does not count for a transmitter
    ev_err(1, 5'b00001); et += 8;
    ev(dom_after_flag);
    check(rec == er, "no REC +8 after a transmitter's flag");
    // 8 dominant bits after the flag: TEC of a transmitter
    ev(dom8); et += 8;
    check(tec == et && rec == er, "8 dominant bits after a transmitter's flag: TEC +8");
    // stuff error on a recessive stuff bit during arbitration: no TEC change
    @(negedge clk); err_det = 1; tx_active = 1; err_code = 5'b00010; err_arb_stuff = 1;
    @(negedge clk); err_det = 0; tx_active = 0; err_code = '0; err_arb_stuff = 0;
    check(tec == et, "stuff error in arbitration not counted");
    // 8 dominant bits after the flag: REC of a receiver
    ev_err(0, 5'b00010); er += 1;
    ev(dom8); er += 8;
    check(tec == et && rec == er, "8 dominant bits after a receiver's flag: REC +8");
    // bit error in the flag: +8 to the counter of the node's role
    @(negedge clk); err_det = 1; err_code = 5'b00001; flag_bit_err = 1;
    @(negedge clk); err_det = 0; err_code = '0; flag_bit_err = 0;
    er += 8;
    check(tec == et && rec == er, "bit error in a receiver's flag: REC +8");
    ev_err(1, 5'b00001); et += 8;
    @(negedge clk); err_det = 1; err_code = 5'b00001; flag_bit_err = 1;
    @(negedge clk); err_det = 0; err_code = '0; flag_bit_err = 0;
    et += 8;
    check(tec == et && rec == er, "bit error in a transmitter's flag: TEC +8");
    // error passive by receive errors
    while (er <= 127) begin ev_err(0, 5'b00100); er += 1; end
    check(rec == er && err_state == ERR_PASSIVE && err_passive, "error passive above 127");
    ev(rx_valid); er = 120;
    check(rec == 120 && err_state == ERR_ACTIVE, "valid frame sets REC to 120");
    // passive by TEC, ACK error exception
    while (et <= 127) begin ev_err(1, 5'b00001); et += 8; end
    check(err_passive, "error passive by TEC");
    ev_err(1, 5'b10000);
    check(tec == et, "ACK error of a passive transmitter not counted");
    while (et <= 255) begin ev_err(1, 5'b00001); et += 8; end
    check(bus_off && err_state == BUS_OFF && tec == et, "bus off above 255");
    ev_err(1, 5'b00001);
    check(tec == et, "no counting while bus off");
    // recovery: 127 sequences, then a broken one, then the last
    for (int s = 0; s < 127; s++) for (int i = 0; i < 11; i++) smp(1);
    for (int i = 0; i < 5; i++) smp(1);
    smp(0);
    check(bus_off, "still bus off after 127 sequences and a dominant bit");
    for (int i = 0; i < 10; i++) smp(1);
    check(bus_off, "still bus off one bit before the end");
    smp(1);
    @(negedge clk);
    check(!bus_off && tec == 0 && rec == 0 && err_state == ERR_ACTIVE && recov == 1,
          "recovered after 128 x 11 recessive bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
