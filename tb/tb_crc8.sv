// Self-checking testbench for crc8: feeds byte strings MSB first and compares
// the remainder with a bit-serial reference written from the polynomial, and
// with the published check value of CRC-8 (poly 0xD5, init 0) for the ASCII
// string "123456789", which is 0xBC.
`timescale 1ns/1ps
module tb_crc8;
  logic clk = 0, rst = 1, clear = 0, en = 0, din = 0;
  logic [7:0] crc;
  int checks = 0, failures = 0;

  crc8 dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_crc(input logic [7:0] msg[], input int n);
    logic [7:0] r = 8'h00;
    for (int i = 0; i < n; i++)
      for (int b = 7; b >= 0; b--) begin
        logic top = r[7] ^ msg[i][b];
        r = {r[6:0], 1'b0};
        if (top) r ^= 8'hD5;
      end
    return r;
  endfunction

  task automatic feed(input logic [7:0] msg[], input int n);
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int i = 0; i < n; i++)
      for (int b = 7; b >= 0; b--) begin
        en = 1; din = msg[i][b];
        @(negedge clk);
      end
    en = 0;
  endtask

  initial begin
    logic [7:0] msg[];
    repeat (3) @(negedge clk);
    rst = 0;
    msg = new[9];
    foreach (msg[i]) msg[i] = 8'h31 + 8'(i);
    feed(msg, 9);
    checks++;
    if (crc !== 8'hBC) begin failures++; $display("check value: got %h", crc); end
    for (int t = 0; t < 200; t++) begin
      int n = 1 + $urandom_range(0, 7);
      msg = new[n];
      foreach (msg[i]) msg[i] = 8'($urandom);
      feed(msg, n);
      checks++;
      if (crc !== ref_crc(msg, n)) begin
        failures++;
        $display("mismatch n=%0d got %h exp %h", n, crc, ref_crc(msg, n));
      end
      // holding en low keeps the remainder
      @(negedge clk);
      checks++;
      if (crc !== ref_crc(msg, n)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
