// Self-checking testbench for sci, the simple configurable inverter.
//
// It checks the gated inverter function for every input combination. It
// checks that the output holds for just under one gate delay and settles
// after it. It then checks that sel = 0 makes a length-one ring oscillator,
// which toggles once per gate delay.
module sci_tb;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned D = 500;

  logic en, sel, prev;
  logic y;
  int   checks = 0, failures = 0;
  int   edges = 0;

  sci #(.GATE_DELAY(D)) dut (.en(en), .sel(sel), .prev_i(prev), .y(y));

  logic y1;
  sci #(.GATE_DELAY(D), .STOP_VAL(1'b1)) dut1 (.en(en), .sel(sel), .prev_i(prev), .y(y1));

  always @(y) edges++;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #(2_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; sel = 1; prev = 0;
    #(3*D);
    check(y, 1'b0, "disabled output low");
    check(y1, 1'b1, "disabled output at stop value 1");
    // Chained mode: y = NOT prev when enabled, 0 when disabled.
    for (int k = 0; k < 8; k++) begin
      logic e, p, old;
      e = k[0]; p = k[1];
      old = y;
      en = e; prev = p;
      #(D-1);
      check(y, old, "holds before one gate delay");
      #2;
      check(y, e & ~p, "chained inverter");
      #(2*D);
      check(y, e & ~p, "chained inverter stable");
    end
    // Self-feedback: a length-one ring toggling every gate delay.
    en = 0; #(2*D);
    sel = 0; prev = 0;
    en = 1;
    #(D/2);
    edges = 0;
    #(40*D);
    checks++;
    if (edges < 39 || edges > 41) begin
      failures++;
      $display("FAIL self ring: %0d edges in 40 gate delays", edges);
    end
    // prev_i must be ignored in self-feedback mode.
    prev = 1; edges = 0;
    #(40*D);
    checks++;
    if (edges < 39 || edges > 41) begin
      failures++;
      $display("FAIL self ring ignores prev: %0d edges", edges);
    end
    en = 0;
    #(2*D);
    check(y, 1'b0, "stopped ring low");
    check(y1, 1'b1, "stopped ring at stop value 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
