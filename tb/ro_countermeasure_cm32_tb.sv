// Countermeasure-size testbench for ro_countermeasure_top: 32 chains, all of
// them countermeasure chains. That is the full noise source of the reference
// prototype, 32 x 65 = 2080 configurable inverters. The gate delay (500 ps) and
// clock (10 ns) are the defaults.
//
// The scenario and checks are those of ro_countermeasure_top_tb. Detection runs
// on every CI. Then come two stretches of 4 random countermeasure runs: one
// entered from stopped ROs, one entered while the detection ROs are running.
// Each ON and OFF phase must last R cycles, and every chain's ring rate must
// match its own c_sel (L = 65 - 4 * popcount, period 2 * L * 500 ps). The 224
// chains that only serve detection are left out to keep the build short.
module ro_countermeasure_cm32_tb;
  timeunit 1ps; timeprecision 1ps;
  import ro_cm_pkg::*;

  localparam int unsigned N     = 32;
  localparam int unsigned N_CM  = 32;
  localparam int unsigned D     = 500;
  localparam int unsigned TCLK  = 10_000;
  localparam int unsigned RUNS  = 8;

  logic                            clk = 0, rst_n = 0, attack = 0, det_en = 0;
  logic [N-1:0][CHAIN_LEN-1:0]     ro;
  logic [N-1:0]                    ring;
  mode_e                           mode;
  phase_e                          phase;

  int checks = 0, failures = 0, cycles = 0;
  int n_hot = 0;
  int n_detect = 0, n_enter = 0, n_exit = 0, n_on = 0, n_off = 0, n_draw = 0;
  int edges [N][CHAIN_LEN];
  int rises [N];
  int off_rises [N];       // ring tap rises while the control is in OFF
  bit seen_len [int];

  ro_countermeasure_top #(.N_CHAINS(N), .N_CM_CHAINS(N_CM), .GATE_DELAY(D)) dut (
    .clk(clk), .rst_n(rst_n), .attack_i(attack), .det_en_i(det_en),
    .ro_o(ro), .ring_o(ring), .mode_o(mode), .phase_o(phase));

  always #(TCLK/2) clk = ~clk;
  always @(posedge clk) cycles++;
  always @(posedge clk) if (dut.rnd_next) n_draw++;

  for (genvar c = 0; c < N; c++) begin : g_mon
    for (genvar j = 0; j < CHAIN_LEN; j++) begin : g_ci
      always @(ro[c][j]) edges[c][j]++;
    end
    always @(posedge ring[c]) begin
      rises[c]++;
      if (phase == PH_OFF) off_rises[c]++;
    end
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string what);
    failures++;
    if (failures < 20) $display("FAIL cycle %0d: %s", cycles, what);
  endtask

  task automatic clear_counts();
    for (int c = 0; c < N; c++) begin
      rises[c] = 0;
      off_rises[c] = 0;
      for (int j = 0; j < CHAIN_LEN; j++) edges[c][j] = 0;
    end
  endtask

  // Detection: every CI a length-one ring, for W clock cycles.
  task automatic detection_window(input int w);
    int exp;
    det_en = 1;
    @(negedge clk);
    checks++;
    if (mode != MODE_DETECT) fail("not in detection mode");
    clear_counts();
    repeat (w) @(negedge clk);
    exp = w * TCLK / D;
    for (int c = 0; c < N; c++)
      for (int j = 0; j < CHAIN_LEN; j++) begin
        checks++;
        if (edges[c][j] < exp - 2 || edges[c][j] > exp + 2)
          fail($sformatf("detection chain %0d CI %0d: %0d edges, expected %0d", c, j, edges[c][j], exp));
      end
    n_detect++;
    det_en = 0;
    repeat (2) @(negedge clk);
    clear_counts();
    repeat (3) @(negedge clk);
    for (int c = 0; c < N; c++) begin
      checks++;
      if (rises[c] != 0) fail($sformatf("chain %0d runs with det_en low", c));
    end
  endtask

  // Countermeasure runs: ON and OFF lengths, ring rates, quiet chains.
  task automatic cm_runs(input int nruns);
    for (int run = 0; run < nruns; run++) begin
      int r, on_cycles, off_cycles;
      int len [N_CM];
      // wait for the ON phase to begin
      while (phase != PH_ON) @(negedge clk);
      r = int'(dut.u_ctrl.r_q);
      for (int c = 0; c < N_CM; c++) begin
        len[c] = CHAIN_LEN - 4 * $countones(dut.c_sel[c]);
        seen_len[len[c]] = 1;
      end
      clear_counts();
      on_cycles = 0;
      while (phase == PH_ON) begin on_cycles++; @(negedge clk); end
      n_on++;
      checks++;
      if (on_cycles != r) fail($sformatf("ON phase %0d cycles, R = %0d", on_cycles, r));
      for (int c = 0; c < N; c++) begin
        int exp;
        exp = (c < N_CM) ? (r * TCLK) / (2 * len[c] * D) : 0;
        checks++;
        if (rises[c] < exp - 2 || rises[c] > exp + 2)
          fail($sformatf("run %0d chain %0d: %0d ring periods, expected %0d (R=%0d L=%0d)",
                         run, c, rises[c], exp, r, (c < N_CM) ? len[c] : 0));
      end
      // OFF phase: the rings stop within a few gate delays of the edge
      checks++;
      if (phase != PH_OFF) fail("no OFF phase after ON");
      clear_counts();
      off_cycles = 0;
      while (phase == PH_OFF) begin off_cycles++; @(negedge clk); end
      n_off++;
      checks++;
      if (off_cycles != r) fail($sformatf("OFF phase %0d cycles, R = %0d", off_cycles, r));
      for (int c = 0; c < N; c++) begin
        checks++;
        if (off_rises[c] != 0) fail($sformatf("chain %0d toggles %0d times while OFF", c, off_rises[c]));
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    detection_window(8);

    // Countermeasure entered from stopped detection ROs.
    attack = 1;
    n_enter++;
    cm_runs(RUNS / 2);
    attack = 0;
    @(negedge clk);
    n_exit++;
    detection_window(8);

    // Countermeasure entered while the detection ROs are running.
    det_en = 1;
    repeat (3) @(negedge clk);
    attack = 1;
    n_enter++;
    n_hot++;
    cm_runs(RUNS / 2);
    attack = 0;
    @(negedge clk);
    n_exit++;
    detection_window(8);

    checks++; if (n_detect < 3)        fail("detection ran too rarely");
    checks++; if (n_enter < 2 || n_exit < 2) fail("too few mode switches");
    checks++; if (n_hot == 0)          fail("no switch from running detection");
    checks++; if (n_on < RUNS || n_off < RUNS) fail("too few ON/OFF phases");
    checks++; if (n_draw < RUNS)       fail("too few random draws");
    checks++; if (seen_len.num() < 2)  fail("ring length never changed");
    $display("detect=%0d enter=%0d exit=%0d hot=%0d on=%0d off=%0d draws=%0d lengths=%0d cycles=%0d",
             n_detect, n_enter, n_exit, n_hot, n_on, n_off, n_draw, seen_len.num(), cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
