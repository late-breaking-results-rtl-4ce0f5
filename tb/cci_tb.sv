// Self-checking testbench for cci, the complex configurable inverter.
//
// It checks the three-way input selection and the enable gate for every
// input combination with sel = 1. It checks the one-gate-delay output timing,
// and that sel = 0 gives a length-one ring oscillator whatever c_sel is.
module cci_tb;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned D = 500;

  logic en, sel, c_sel, prev, prev_cci;
  logic y;
  int   checks = 0, failures = 0;
  int   edges = 0;

  cci #(.GATE_DELAY(D)) dut (.en(en), .sel(sel), .c_sel(c_sel), .prev_i(prev),
                             .prev_cci_i(prev_cci), .y(y));

  logic y1;
  cci #(.GATE_DELAY(D), .STOP_VAL(1'b1)) dut1 (.en(en), .sel(sel), .c_sel(c_sel), .prev_i(prev),
                                               .prev_cci_i(prev_cci), .y(y1));

  always @(y) edges++;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #(3_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; sel = 1; c_sel = 0; prev = 0; prev_cci = 0;
    #(3*D);
    check(y, 1'b0, "disabled output low");
    check(y1, 1'b1, "disabled output at stop value 1");
    for (int k = 0; k < 16; k++) begin
      logic e, cs, p, pc, exp, old;
      e = k[0]; cs = k[1]; p = k[2]; pc = k[3];
      exp = e & ~(cs ? pc : p);
      old = y;
      en = e; c_sel = cs; prev = p; prev_cci = pc;
      #(D-1);
      check(y, old, "holds before one gate delay");
      #2;
      check(y, exp, "selected input inverted");
      #(2*D);
      check(y, exp, "stable");
    end
    en = 0; #(2*D);
    sel = 0;
    for (int k = 0; k < 4; k++) begin
      c_sel = k[0]; prev = k[1]; prev_cci = ~k[1];
      en = 1;
      #(D/2);
      edges = 0;
      #(40*D);
      checks++;
      if (edges < 39 || edges > 41) begin
        failures++;
        $display("FAIL self ring c_sel=%0b: %0d edges", c_sel, edges);
      end
      en = 0;
      #(2*D);
      check(y, 1'b0, "stopped ring low");
    check(y1, 1'b1, "stopped ring at stop value 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
