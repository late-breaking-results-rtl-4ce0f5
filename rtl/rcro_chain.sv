// Runtime-configurable ring-oscillator (RCRO) chain.
//
// The chain is N_CCI groups of one CCI and SCI_PER_GROUP SCIs, 65 configurable
// inverters (CIs) in total. Stage j = 5k is CCI k; stages 5k+1 .. 5k+4 are SCIs.
// Each stage's "previous" input is stage j-1. Stage 0 takes the last stage,
// which closes the ring. CCI k's "previous CCI" input is CCI k-1, and CCI 0
// takes CCI N_CCI-1.
//
// Detection (sel = 0): every CI feeds back on itself, giving 65 separate
//   length-one ROs. Their outputs ro_o are for a frequency monitor outside
//   this block.
// Countermeasure (sel = 1): the CIs form one ring. A set c_sel[k] makes CCI k
//   take CCI k-1's output, so the four SCIs in between drop out of the ring.
//   Ring length = 65 - 4 * popcount(c_sel), from 13 to 65 CIs in steps of 4.
//   The length is always odd, so the ring always oscillates. CCI 0 is in every
//   ring, so ring_o = ro_o[0] carries the ring frequency. Bypassed SCIs stay
//   enabled as an open branch behind the previous CCI.
// en = 0 stops every CI. CI j then holds j mod 2, so the stopped chain
//   carries the alternating pattern of a ring at rest. Only one place breaks
//   the alternation: stage 0 and the last stage both hold 0. When en rises, only
//   stage 0 sees a changed input. A single edge then travels round the ring,
//   which is the ring's fundamental mode. If every stage held the same value,
//   all of them would switch at once when started, and stay in lock-step.
//
// Timing: no clock. Each CI adds GATE_DELAY (1 ps units) in simulation, so a
// ring of L CIs has a period of 2 * L * GATE_DELAY. Changing c_sel while the
// ring runs takes effect at once.
//
// Group structure, counts, step and range follow the published design. The
// wrap-around of the ring to CCI 0 follows its block diagram, where lines return from
// the far end of the chain to the first CCI. The stop pattern is this
// design's own choice. The combinational loops are the
// oscillators themselves, so loop warnings from tools are expected.
module rcro_chain
  import ro_cm_pkg::*;
  #(parameter int unsigned GATE_DELAY = 500)
  (input  logic                 en,
   input  logic                 sel,
   input  logic [N_CCI-1:0]     c_sel,
   output logic [CHAIN_LEN-1:0] ro_o,
   output logic                 ring_o);
  timeunit 1ps; timeprecision 1ps;

  for (genvar j = 0; j < CHAIN_LEN; j++) begin : g_stage
    localparam int unsigned PREV     = (j + CHAIN_LEN - 1) % CHAIN_LEN;
    localparam logic        STOP_VAL = 1'(j % 2);
    if (j % GROUP_LEN == 0) begin : g_cci
      localparam int unsigned K      = j / GROUP_LEN;
      localparam int unsigned PREV_K = (K + N_CCI - 1) % N_CCI;
      cci #(.GATE_DELAY(GATE_DELAY), .STOP_VAL(STOP_VAL)) u_cci (
        .en        (en),
        .sel       (sel),
        .c_sel     (c_sel[K]),
        .prev_i    (ro_o[PREV]),
        .prev_cci_i(ro_o[PREV_K * GROUP_LEN]),
        .y         (ro_o[j]));
    end else begin : g_sci
      sci #(.GATE_DELAY(GATE_DELAY), .STOP_VAL(STOP_VAL)) u_sci (
        .en    (en),
        .sel   (sel),
        .prev_i(ro_o[PREV]),
        .y     (ro_o[j]));
    end
  end

  assign ring_o = ro_o[0];
endmodule
