// tb_siso_shift_register: the 32-bit SISO shift register at its default
// size. A random bit stream is shifted in; after cycle n every data latch Qj
// must hold the bit applied in cycle n-j+1, temporary latch Tm the bit of
// cycle n-4m, and the serial output (T8) the bit of cycle n-32: a latency of
// exactly N cycles, worked out from the input history alone.
module tb_siso_shift_register;
  timeunit 1ps;
  timeprecision 1ps;
  import pulsed_sr_pkg::*;

  localparam int unsigned N = 32;
  localparam int unsigned M = N / SUB_BITS;
  localparam int unsigned HALF = 2000;
  localparam int CYCLES = 400;

  logic clk = 1'b0;
  logic sin = 1'b0;
  logic [N-1:0] q;
  logic [M-1:0] t;
  logic sout;
  logic hist [int];
  int checks = 0, failures = 0;
  int first_out = -1;  // cycle in which the first 1 reached sout

  siso_shift_register dut (.clk, .sin, .q, .t, .sout);

  task automatic expect_bit(input logic got, input logic exp, input string what, input int n);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d %s=%0b expected %0b", n, what, got, exp);
    end
  endtask

  initial begin
    #(2 * HALF * (CYCLES + 10));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 * HALF);
    for (int n = 0; n < CYCLES; n++) begin
      // a lone 1 after a run of zeros measures the latency directly
      if (n < 2 * N + 10) sin = (n == N + 5);
      else sin = 1'($urandom);
      hist[n] = sin;
      clk = 1'b1; #(HALF);
      if (n >= N) begin
        for (int j = 0; j < N; j++) expect_bit(q[j], hist[n - j], $sformatf("Q%0d", j + 1), n);
        for (int m = 0; m < M; m++)
          expect_bit(t[m], hist[n - SUB_BITS * (m + 1)], $sformatf("T%0d", m + 1), n);
        expect_bit(sout, hist[n - N], "sout", n);
        if (n > N + 5 && n < 2 * N + 10 && sout && first_out < 0) first_out = n;
      end
      clk = 1'b0; #(HALF);
    end
    checks++;
    if (first_out - (N + 5) != N) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", first_out - (N + 5), N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
