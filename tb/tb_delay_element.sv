// tb_delay_element: checks that the delay model repeats its input exactly
// DELAY_PS later for pulses longer than the delay, and that it swallows a
// pulse shorter than the delay (inertial delay).
module tb_delay_element;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned D = pulsed_sr_pkg::DEF_DELAY_PS;
  localparam longint SPAN = 200000;

  logic a = 1'b0;
  logic y;
  int checks = 0, failures = 0;
  logic hist [longint];  // input history, sampled every picosecond

  delay_element dut (.a, .y);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus: toggles at random multiples of 10 ps, 110 ps to 400 ps apart,
  // always longer than the delay. Comparisons are made 5 ps away from any
  // toggle, so event order within a time step cannot matter.
  initial begin
    while ($time < SPAN - 1000) begin
      #(10 * $urandom_range(11, 40));
      a = ~a;
    end
  end

  initial begin
    logic y_before;
    for (longint t = 0; t < SPAN; t++) begin
      hist[t] = a;
      if (t >= D + 1 && (t % 10 == 5)) begin
        checks++;
        if (y !== hist[t - D]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d y=%0b expected %0b", t, y, hist[t - D]);
        end
      end
      #1;
    end
    // a pulse of 30 ps must not reach the output
    #1000;
    y_before = y;
    a = ~a; #30; a = ~a;
    for (int k = 0; k < 300; k += 10) begin
      #10;
      checks++;
      if (y !== y_before) begin
        failures++;
        $display("FAIL short pulse passed at +%0d ps", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
