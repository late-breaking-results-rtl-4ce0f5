// Central control of the shared ring-oscillator array.
//
// The block switches the RO array between detection and countermeasure mode.
// attack_i, from an attack detector outside this block, selects
// countermeasure mode. While attack_i is high the block repeats this cycle:
//   1. draw a random R (R_W bits, 0 read as 1) and a random c_sel word for
//      every countermeasure chain;
//   2. enable the countermeasure chains for R clock cycles (phase ON);
//   3. disable them for R clock cycles (phase OFF);
// and then draws again. The new c_sel, and so the new ring lengths, start with
// the ON phase that the draw opens. Chains from N_CM_CHAINS up stay disabled in
// countermeasure mode. In detection mode sel is 0 and c_sel is 0, and every
// chain's enable follows det_en_i, so the detector can run its measurements.
//
// Interface: rnd_i is the random word, R in bits [R_W-1:0] and chain i's
// c_sel in bits [R_W + N_CCI*i +: N_CCI]. rnd_next_o is high in the cycle that
// consumes it, so the generator can step. Outputs come from registered state.
// With attack_i rising before edge t, en is high from t for R cycles, then low
// for R cycles. Dropping attack_i returns to detection at the next edge.
// rst_n is active low and asynchronous.
//
// The on/off scheme, the shared enable and the c_sel drawn per run follow the
// published design. R_W, reading R = 0 as 1, drawing at the start of each ON
// phase and the detection-mode behaviour are this design's own choices.
module cm_control
  import ro_cm_pkg::*;
  #(parameter int unsigned N_CHAINS    = 256,
    parameter int unsigned N_CM_CHAINS = 32,
    parameter int unsigned RND_W       = R_W + N_CM_CHAINS * N_CCI)
  (input  logic                           clk,
   input  logic                           rst_n,
   input  logic                           attack_i,
   input  logic                           det_en_i,
   input  logic [RND_W-1:0]               rnd_i,
   output logic                           rnd_next_o,
   output mode_e                          mode_o,
   output phase_e                         phase_o,
   output logic                           sel_o,
   output logic [N_CHAINS-1:0]            en_o,
   output logic [N_CHAINS-1:0][N_CCI-1:0] c_sel_o);
  timeunit 1ps; timeprecision 1ps;

  phase_e                            phase_q;
  logic [R_W-1:0]                    r_q;     // current R
  logic [R_W-1:0]                    cnt_q;   // cycles left in this phase
  logic [N_CM_CHAINS-1:0][N_CCI-1:0] csel_q;

  logic [R_W-1:0]                    r_new;
  logic [N_CM_CHAINS-1:0][N_CCI-1:0] csel_new;
  logic                              draw;
  logic                              last;

  always_comb begin
    r_new    = (rnd_i[R_W-1:0] == '0) ? R_W'(1) : rnd_i[R_W-1:0];
    csel_new = rnd_i[R_W +: N_CM_CHAINS*N_CCI];
    last     = (cnt_q == R_W'(1));
    draw     = attack_i && ((phase_q == PH_DETECT) || (phase_q == PH_OFF && last));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= PH_DETECT;
      r_q     <= '0;
      cnt_q   <= '0;
      csel_q  <= '0;
    end else if (!attack_i) begin
      phase_q <= PH_DETECT;
    end else if (draw) begin
      phase_q <= PH_ON;
      r_q     <= r_new;
      cnt_q   <= r_new;
      csel_q  <= csel_new;
    end else if (phase_q == PH_ON && last) begin
      phase_q <= PH_OFF;
      cnt_q   <= r_q;
    end else begin
      cnt_q   <= cnt_q - R_W'(1);
    end
  end

  always_comb begin
    rnd_next_o = draw;
    phase_o    = phase_q;
    mode_o     = (phase_q == PH_DETECT) ? MODE_DETECT : MODE_CM;
    sel_o      = (mode_o == MODE_CM);
    for (int i = 0; i < N_CHAINS; i++) begin
      if (mode_o == MODE_DETECT) begin
        en_o[i]    = det_en_i;
        c_sel_o[i] = '0;
      end else if (i < N_CM_CHAINS) begin
        en_o[i]    = (phase_q == PH_ON);
        c_sel_o[i] = csel_q[i];
      end else begin
        en_o[i]    = 1'b0;
        c_sel_o[i] = '0;
      end
    end
  end

  // A countermeasure phase always has between 1 and 2^R_W - 1 cycles left.
  a_cnt_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    (phase_q != PH_DETECT) |-> (cnt_q != '0));
  // Only the countermeasure subset of chains may run in countermeasure mode.
  a_subset: assert property (@(posedge clk) disable iff (!rst_n)
    (phase_q != PH_DETECT) |-> (en_o >> N_CM_CHAINS) == '0);
endmodule
