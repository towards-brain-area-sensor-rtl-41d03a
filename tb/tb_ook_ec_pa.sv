// Self-checking testbench for ook_ec_pa: random 21-phase patterns, checked
// against TX_OUT = TX_IN * sum(B_i * B_(i+1)) evaluated term by term.
`timescale 1ns/1ps
module tb_ook_ec_pa;
  localparam int N = 21;
  logic [N-1:0] ph;
  logic tx_in, tx_out;
  int checks = 0, failures = 0;

  ook_ec_pa #(.N(N)) dut (.*);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      bit exp;
      exp = 0;
      ph = N'({$urandom, $urandom});
      if (t % 4 == 1) ph = N'(1) << $urandom_range(0, N - 1);          // single stage high
      if (t % 4 == 2) ph = N'(3) << $urandom_range(0, N - 2);          // one adjacent pair
      if (t % 8 == 3) ph = {1'b1, {(N-2){1'b0}}, 1'b1};                // wrap-around pair BN*B1
      tx_in = t[4] | t[0];
      for (int i = 0; i < N; i++) exp |= ph[i] & ph[(i + 1) % N];
      exp &= tx_in;
      #1;
      checks++;
      if (tx_out !== exp) begin failures++; $display("ph=%b tx_in=%b got %b", ph, tx_in, tx_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
