// tb_pulsed_latch_shift_registers: end-to-end test of the top level at its
// default sizes (32-bit SISO, 8-bit PISO), the two registers running at the
// same time on clocks of different period.
//
// SISO: a random stream goes in; every cycle all 32 data latches, the 8
// temporary latches and the serial output are compared with the input
// history (serial output = input of 32 cycles earlier).
// PISO: random words are loaded and shifted out, then loads and shifts are
// mixed; the data latches and serial output are compared with a reference
// 8-bit shift register.
// Mechanisms counted, each must occur: complete non-overlapping pulse trains
// in both registers, SISO shifts, hand-offs of a changed bit through a
// temporary latch into the next sub shift register, PISO parallel loads,
// PISO shifts, and complete PISO words serialised.
module tb_pulsed_latch_shift_registers;
  timeunit 1ps;
  timeprecision 1ps;
  import pulsed_sr_pkg::*;

  localparam int unsigned SN = 32, PN = 8;
  localparam int unsigned SM = SN / SUB_BITS;
  localparam int unsigned SHALF = 2000, PHALF = 2500;
  localparam int SCYCLES = 300;
  localparam int PWORDS = 30, PMIXED = 100;

  logic siso_clk = 1'b0, siso_in = 1'b0;
  logic [SN-1:0] siso_q;
  logic [SM-1:0] siso_t;
  logic siso_out;
  logic piso_clk = 1'b0, piso_shift_load = 1'b0, piso_sin = 1'b0;
  logic [PN-1:0] piso_pdata = '0, piso_q;
  logic piso_out;

  int checks = 0, failures = 0;
  int n_siso_shift = 0, n_handoff = 0, n_siso_train = 0, n_piso_train = 0;
  int n_piso_load = 0, n_piso_shift = 0, n_piso_word = 0;
  bit siso_done = 0, piso_done = 0;

  pulsed_latch_shift_registers dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- pulse-train monitors: <T>,<4>,<3>,<2>,<1> once each, never two high
  function automatic logic [NUM_PULSES-1:0] train_of(input logic pt, input logic [SUB_BITS:1] p);
    logic [NUM_PULSES-1:0] r;
    r[0] = pt;
    for (int k = 1; k <= SUB_BITS; k++) r[SUB_BITS + 1 - k] = p[k];
    return r;
  endfunction

  logic [NUM_PULSES-1:0] s_train, p_train;
  assign s_train = train_of(dut.u_siso.clk_pulse_t, dut.u_siso.clk_pulse);
  assign p_train = train_of(dut.u_piso.clk_pulse_t, dut.u_piso.clk_pulse);

  int s_next = 0, p_next = 0;
  bit s_bad = 0, p_bad = 0;
  always @(posedge siso_clk) begin
    if (s_next == NUM_PULSES && !s_bad) n_siso_train++;
    s_next = 0; s_bad = 0;
  end
  always @(posedge piso_clk) begin
    if (p_next == NUM_PULSES && !p_bad) n_piso_train++;
    p_next = 0; p_bad = 0;
  end
  for (genvar i = 0; i < NUM_PULSES; i++) begin : g_mon
    always @(posedge s_train[i]) begin
      if (s_next != i) s_bad = 1;
      s_next++;
    end
    always @(posedge p_train[i]) begin
      if (p_next != i) p_bad = 1;
      p_next++;
    end
  end
  initial forever begin
    #5;
    if ($countones(s_train) > 1 || $countones(p_train) > 1) check(0, "overlapping pulses");
  end

  initial begin
    #(2 * PHALF * (PWORDS * (PN + 1) + PMIXED + 20) + 2 * SHALF * (SCYCLES + 20));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- SISO stream
  logic shist [int];
  initial begin
    logic [SM-1:0] t_prev;
    #(2 * SHALF);
    for (int n = 0; n < SCYCLES; n++) begin
      siso_in = 1'($urandom);
      shist[n] = siso_in;
      t_prev = siso_t;
      siso_clk = 1'b1; #(SHALF);
      n_siso_shift++;
      if (n >= SN) begin
        for (int j = 0; j < SN; j++) check(siso_q[j] === shist[n - j], $sformatf("SISO Q%0d", j + 1));
        for (int m = 0; m < SM; m++) begin
          check(siso_t[m] === shist[n - SUB_BITS * (m + 1)], $sformatf("SISO T%0d", m + 1));
          // a changed bit in T(m) has just been taken by the next group's first latch
          if (m < SM - 1 && t_prev[m] != siso_t[m]) n_handoff++;
        end
        check(siso_out === shist[n - SN], "SISO serial output");
      end
      siso_clk = 1'b0; #(SHALF);
    end
    siso_done = 1;
  end

  // ---- PISO words and mixed traffic
  logic [PN-1:0] p_ref;
  task automatic piso_cycle();
    if (piso_shift_load) begin
      p_ref = {p_ref[PN-2:0], piso_sin};
      n_piso_shift++;
    end else begin
      p_ref = piso_pdata;
      n_piso_load++;
    end
    piso_clk = 1'b1; #(PHALF);
    check(piso_q === p_ref, "PISO data latches");
    check(piso_out === p_ref[PN-1], "PISO serial output");
    piso_clk = 1'b0; #(PHALF);
  endtask

  initial begin
    logic [PN-1:0] word, got;
    #(2 * PHALF);
    p_ref = '0;
    for (int w = 0; w < PWORDS; w++) begin
      word = PN'($urandom);
      piso_pdata = word; piso_shift_load = 1'b0; piso_sin = 1'b0;
      piso_cycle();
      got = '0;
      for (int j = 0; j < PN; j++) begin
        got = {got[PN-2:0], piso_out};
        if (j < PN - 1) begin
          piso_shift_load = 1'b1; piso_pdata = PN'($urandom); piso_sin = 1'($urandom);
          piso_cycle();
        end
      end
      check(got === word, "PISO word serialised MSB first");
      if (got === word) n_piso_word++;
    end
    for (int n = 0; n < PMIXED; n++) begin
      piso_shift_load = ($urandom_range(0, 3) != 0);
      piso_pdata = PN'($urandom);
      piso_sin = 1'($urandom);
      piso_cycle();
    end
    piso_done = 1;
  end

  initial begin
    wait (siso_done && piso_done);
    #10;
    $display("SISO: shifts=%0d pulse_trains=%0d temp_handoffs=%0d", n_siso_shift, n_siso_train, n_handoff);
    $display("PISO: loads=%0d shifts=%0d words=%0d pulse_trains=%0d", n_piso_load, n_piso_shift, n_piso_word, n_piso_train);
    check(n_siso_shift > 0, "SISO shift happened");
    check(n_siso_train > 0, "SISO pulse train happened");
    check(n_handoff > 0, "temporary-latch hand-off happened");
    check(n_piso_load > 0, "PISO load happened");
    check(n_piso_shift > 0, "PISO shift happened");
    check(n_piso_word > 0, "PISO word serialised");
    check(n_piso_train > 0, "PISO pulse train happened");
    check(n_siso_train == SCYCLES - 1, "one pulse train per SISO clock (counted at the next edge)");
    check(n_piso_train == PWORDS * PN + PMIXED - 1, "one pulse train per PISO clock (counted at the next edge)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
