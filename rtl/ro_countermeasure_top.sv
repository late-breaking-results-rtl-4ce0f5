// Ring-oscillator side-channel countermeasure: the RO array shared by attack
// detection and noise generation, with its control and random number source.
//
// N_CHAINS runtime-configurable RO chains (rcro_chain, 65 CIs each) form the
// array. In detection mode every CI runs as its own length-one RO.
// All N_CHAINS * 65 outputs leave on ro_o for an external frequency monitor
// and attack detector. That detector drives attack_i and det_en_i. When
// attack_i is high, cm_control switches the first N_CM_CHAINS chains into
// rings. It enables them for R cycles and disables them for R cycles, with R
// random, and gives each chain a random c_sel for every run. The ring lengths,
// and so the noise frequencies and power, therefore change from run to run.
// The other chains are stopped. prng supplies R and the c_sel bits.
//
// Defaults follow the published FPGA prototype: 256 chains (16640 CIs)
// for detection, 32 of them (2080 CIs) for the countermeasure. GATE_DELAY
// (simulation only) and SEED are this design's own choices.
//
// Interface: clk, rst_n (active low, asynchronous), attack_i, det_en_i;
// ro_o[c][j] is CI j of chain c. ring_o[c] is chain c's ring tap (CCI 0).
// mode_o and phase_o report the control state. Timing is that of cm_control:
// en changes one clock edge after the state that causes it.
module ro_countermeasure_top
  import ro_cm_pkg::*;
  #(parameter int unsigned N_CHAINS    = 256,
    parameter int unsigned N_CM_CHAINS = 32,
    parameter int unsigned GATE_DELAY  = 500,
    parameter logic [31:0] SEED        = 32'h1D87_2B41)
  (input  logic                               clk,
   input  logic                               rst_n,
   input  logic                               attack_i,
   input  logic                               det_en_i,
   output logic [N_CHAINS-1:0][CHAIN_LEN-1:0] ro_o,
   output logic [N_CHAINS-1:0]                ring_o,
   output mode_e                              mode_o,
   output phase_e                             phase_o);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned RND_W = R_W + N_CM_CHAINS * N_CCI;

  logic [RND_W-1:0]               rnd;
  logic                           rnd_next;
  logic                           sel;
  logic [N_CHAINS-1:0]            en;
  logic [N_CHAINS-1:0][N_CCI-1:0] c_sel;

  prng #(.OUT_W(RND_W), .SEED(SEED)) u_prng (
    .clk   (clk),
    .rst_n (rst_n),
    .next_i(rnd_next),
    .rnd_o (rnd));

  cm_control #(.N_CHAINS(N_CHAINS), .N_CM_CHAINS(N_CM_CHAINS), .RND_W(RND_W)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .attack_i  (attack_i),
    .det_en_i  (det_en_i),
    .rnd_i     (rnd),
    .rnd_next_o(rnd_next),
    .mode_o    (mode_o),
    .phase_o   (phase_o),
    .sel_o     (sel),
    .en_o      (en),
    .c_sel_o   (c_sel));

  for (genvar c = 0; c < N_CHAINS; c++) begin : g_chain
    rcro_chain #(.GATE_DELAY(GATE_DELAY)) u_chain (
      .en    (en[c]),
      .sel   (sel),
      .c_sel (c_sel[c]),
      .ro_o  (ro_o[c]),
      .ring_o(ring_o[c]));
  end
endmodule
