// tb_can_crc15: checks the serial CRC-15 against a long division.
//
// Random messages of 1..83 bits are shifted in; the expected CRC is the
// remainder of message * x^15 divided by the 16-bit generator 0xC599,
// computed here by textbook polynomial long division. Also checks that
// 'clear' restarts the register and that a cycle without 'en' holds it.
`timescale 1ns/1ps
module tb_can_crc15;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, din = 0;
  logic [14:0] crc;
  int checks = 0, failures = 0;

  can_crc15 dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  initial begin
    bit msg[$];
    int len;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      msg.delete();
      len = 1 + $urandom_range(0, 82);
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      for (int i = 0; i < len; i++) begin
        msg.push_back(1'($urandom));
        din = msg[i]; en = 1; @(negedge clk);
        if ($urandom_range(0, 3) == 0) begin en = 0; din = ~din; @(negedge clk); end
      end
      en = 0;
      @(negedge clk);
      checks++;
      if (crc !== ref_crc(msg)) begin
        failures++;
        $display("FAIL len %0d crc %h expected %h", len, crc, ref_crc(msg));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
