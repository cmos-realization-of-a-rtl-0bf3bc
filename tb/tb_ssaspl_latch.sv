// tb_ssaspl_latch: checks the pulsed latch model.
// While the pulse is high q must follow a complementary (d, db) pair; with
// d = db the cell must keep its value; after the pulse q must hold whatever
// d does. qb must always be the complement of q.
module tb_ssaspl_latch;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk_pulse = 1'b0;
  logic d = 1'b0, db = 1'b1;
  logic q, qb;
  int checks = 0, failures = 0;

  ssaspl_latch dut (.clk_pulse, .d, .db, .q, .qb);

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp || qb !== ~exp) begin
      failures++;
      $display("FAIL %s: q=%0b qb=%0b expected q=%0b", what, q, qb, exp);
    end
  endtask

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic stored, v;
    // write a known value
    d = 1'b1; db = 1'b0; #10; clk_pulse = 1'b1; #10; check(1'b1, "write 1");
    clk_pulse = 1'b0; #10; stored = 1'b1;
    for (int i = 0; i < 200; i++) begin
      v = 1'($urandom);
      case ($urandom_range(0, 2))
        0: begin  // pulse with valid data: write
          d = v; db = ~v; #10; clk_pulse = 1'b1; #10; check(v, "transparent");
          v = ~v; d = v; db = ~v; #10; check(v, "follows while pulse high");
          clk_pulse = 1'b0; #10; stored = v; check(stored, "kept after pulse");
        end
        1: begin  // data changes with no pulse: hold
          d = v; db = ~v; #10; check(stored, "hold without pulse");
        end
        default: begin  // d = db during the pulse: no write, then valid again
          d = v; db = v; #10; clk_pulse = 1'b1; #10; check(stored, "d equal db keeps value");
          d = stored; db = ~stored; #10; clk_pulse = 1'b0; #10; check(stored, "kept");
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
