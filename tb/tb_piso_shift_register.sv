// tb_piso_shift_register: the 8-bit PISO shift register at its default size.
// Part 1 loads random words and shifts each one out: the serial output must
// give pdata[N-1] right after the load and pdata[N-1-j] j shifts later.
// Part 2 mixes loads and shifts at random and compares all data latches with
// an N-bit reference shift register every cycle; the temporary latches are
// invisible at this level, so the reference has none.
module tb_piso_shift_register;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N = 8;
  localparam int unsigned HALF = 2000;
  localparam int WORDS = 40;
  localparam int MIXED = 400;

  logic clk = 1'b0;
  logic shift_load = 1'b0, sin = 1'b0;
  logic [N-1:0] pdata = '0;
  logic [N-1:0] q, q_ref;
  logic sout;
  int checks = 0, failures = 0;
  int loads = 0, shifts = 0;

  piso_shift_register dut (.clk, .shift_load, .pdata, .sin, .q, .sout);

  task automatic cycle();
    if (shift_load) begin
      q_ref = {q_ref[N-2:0], sin};
      shifts++;
    end else begin
      q_ref = pdata;
      loads++;
    end
    clk = 1'b1; #(HALF);
    checks++;
    if (q !== q_ref) begin
      failures++;
      if (failures < 20) $display("FAIL q=%b expected %b", q, q_ref);
    end
    clk = 1'b0; #(HALF);
  endtask

  initial begin
    #(2 * HALF * (WORDS * (N + 1) + MIXED + 10));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] word;
    #(2 * HALF);
    q_ref = '0;
    for (int w = 0; w < WORDS; w++) begin
      word = N'($urandom);
      pdata = word; shift_load = 1'b0; sin = 1'b0;
      cycle();
      for (int j = 0; j < N; j++) begin
        checks++;
        if (sout !== word[N-1-j]) begin
          failures++;
          if (failures < 20) $display("FAIL word %0d bit %0d: sout=%0b expected %0b", w, j, sout, word[N-1-j]);
        end
        if (j < N - 1) begin
          shift_load = 1'b1; pdata = N'($urandom); sin = 1'($urandom);
          cycle();
        end
      end
    end
    for (int n = 0; n < MIXED; n++) begin
      shift_load = ($urandom_range(0, 3) != 0);
      pdata = N'($urandom);
      sin = 1'($urandom);
      cycle();
    end
    $display("loads=%0d shifts=%0d", loads, shifts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
