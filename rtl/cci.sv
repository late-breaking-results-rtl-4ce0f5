// Complex configurable inverter (CCI), the first stage of each group in a
// runtime-configurable RO chain.
//
// A 3:1 multiplexer selects the inverter input:
//   sel = 0              : own output y (length-one RO, detection mode)
//   sel = 1, c_sel = 0   : prev_i, the output of the stage just before it
//   sel = 1, c_sel = 1   : prev_cci_i, the output of the previous CCI. The
//                          SCIs between the two CCIs are bypassed.
// en = 0 stops the stage and holds y at STOP_VAL. The stage needs six inputs, which
// fit one FPGA LUT.
//
// Timing: y follows after GATE_DELAY time units (1 ps each). Synthesis drops
// the delay; simulation needs it for the ring to oscillate.
//
// The selection rules follow the published design. The stop value
// (y = STOP_VAL while en = 0) and the delay value are this design's own choices. The
// loop from y to its own input is the oscillator itself, so loop warnings from
// tools are expected.
module cci
  #(parameter int unsigned GATE_DELAY = 500,
    parameter logic        STOP_VAL   = 1'b0)
  (input  logic en,
   input  logic sel,
   input  logic c_sel,
   input  logic prev_i,
   input  logic prev_cci_i,
   output logic y);
  timeunit 1ps; timeprecision 1ps;

  logic x;
  logic nxt;

  always_comb begin
    unique case ({sel, c_sel})
      2'b10:   x = prev_i;
      2'b11:   x = prev_cci_i;
      default: x = y;          // sel = 0: c_sel is ignored
    endcase
    nxt = en ? ~x : STOP_VAL;
  end

  assign #(GATE_DELAY) y = nxt;
endmodule
