// Simple configurable inverter (SCI), one stage of a runtime-configurable RO chain.
//
// The stage is a 2:1 multiplexer in front of an inverter. With sel = 0 the
// inverter is fed by its own output, so the stage is a ring oscillator of length
// one (detection mode). With sel = 1 it inverts prev_i, the output of the stage
// before it, and becomes one link of a longer ring (countermeasure mode).
// en = 0 stops the stage and holds y at STOP_VAL. On an FPGA the whole stage fits
// one LUT.
//
// Timing: y follows its inputs after GATE_DELAY time units (1 ps each); the
// value stands for one LUT plus routing. Synthesis ignores it, but simulation
// needs it: a ring of zero-delay gates cannot oscillate.
//
// The multiplexer, the sel behaviour and the shared en follow the published
// design. The stop value (y = STOP_VAL while en = 0) and the delay value are
// this design's own choices. The feedback from y to its own input is a
// combinational loop on purpose. It is the oscillator, and tools that look for
// loops will report it.
module sci
  #(parameter int unsigned GATE_DELAY = 500,
    parameter logic        STOP_VAL   = 1'b0)
  (input  logic en,
   input  logic sel,
   input  logic prev_i,
   output logic y);
  timeunit 1ps; timeprecision 1ps;

  logic x;    // multiplexer output, the inverter's input
  logic nxt;

  always_comb begin
    x   = sel ? prev_i : y;
    nxt = en ? ~x : STOP_VAL;
  end

  assign #(GATE_DELAY) y = nxt;
endmodule
