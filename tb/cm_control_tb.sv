// Self-checking testbench for cm_control.
//
// The testbench plays both the attack detector (attack_i, det_en_i) and the
// random number generator. It drives its own random word and replaces it
// after every cycle in which rnd_next_o shows that the word was used. A
// reference model predicts, cycle by cycle, which enable each chain must see:
//   detection      : every chain follows det_en_i, sel = 0, c_sel = 0
//   countermeasure : the first N_CM chains are on for R cycles, then off for R
//                    cycles, with R the low R_W bits of the word drawn (0 read
//                    as 1), and hold that draw's c_sel; the other chains are
//                    off.
// A new draw is expected exactly when the previous off phase ends. The
// testbench counts the mechanisms it has seen: draws, R = 0, ON/OFF phases,
// mode entries and exits. It fails if one of them never happened.
module cm_control_tb;
  timeunit 1ps; timeprecision 1ps;
  import ro_cm_pkg::*;

  localparam int unsigned N      = 4;
  localparam int unsigned N_CM   = 2;
  localparam int unsigned RND_W  = R_W + N_CM * N_CCI;

  logic                    clk = 0, rst_n = 0;
  logic                    attack = 0, det_en = 0;
  logic [RND_W-1:0]        rnd;
  logic                    rnd_next;
  mode_e                   mode;
  phase_e                  phase;
  logic                    sel;
  logic [N-1:0]            en;
  logic [N-1:0][N_CCI-1:0] c_sel;

  int checks = 0, failures = 0, cycles = 0;
  int n_draw = 0, n_r0 = 0, n_on = 0, n_off = 0, n_enter = 0, n_exit = 0, n_det_on = 0;

  // Reference model
  bit                         exp_q[$];      // expected enable of CM chains, one per cycle
  logic [N_CM-1:0][N_CCI-1:0] exp_csel;
  bit                         in_cm = 0;

  cm_control #(.N_CHAINS(N), .N_CM_CHAINS(N_CM)) dut (
    .clk(clk), .rst_n(rst_n), .attack_i(attack), .det_en_i(det_en),
    .rnd_i(rnd), .rnd_next_o(rnd_next), .mode_o(mode), .phase_o(phase),
    .sel_o(sel), .en_o(en), .c_sel_o(c_sel));

  always #5000 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 60000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string what);
    failures++;
    if (failures < 20) $display("FAIL cycle %0d: %s", cycles, what);
  endtask

  function automatic logic [RND_W-1:0] new_word(input int k);
    logic [RND_W-1:0] w;
    for (int b = 0; b < RND_W; b += 32) w[b +: 32] = $urandom;
    if (k % 7 == 3) w[R_W-1:0] = '0;              // exercise R = 0
    else            w[R_W-1:0] = R_W'(1 + $urandom % 12);
    return w;
  endfunction

  // Check outputs against the model, then set the inputs for the next edge.
  task automatic step(input bit att, input bit den);
    bit exp_en;
    bit used;
    // outputs after the last edge
    checks++;
    if (!in_cm) begin
      if (mode != MODE_DETECT || sel !== 1'b0) fail("detection mode/sel");
      if (en !== {N{det_en}}) fail("detection enables");
      if (c_sel !== '0) fail("detection c_sel");
      if (det_en && en[0]) n_det_on++;
    end else begin
      exp_en = exp_q.pop_front();
      if (mode != MODE_CM || sel !== 1'b1) fail("countermeasure mode/sel");
      for (int i = 0; i < N; i++) begin
        if (i < N_CM) begin
          if (en[i] !== exp_en) fail($sformatf("chain %0d enable %0b expected %0b", i, en[i], exp_en));
          if (c_sel[i] !== exp_csel[i]) fail($sformatf("chain %0d c_sel %h expected %h", i, c_sel[i], exp_csel[i]));
        end else begin
          if (en[i] !== 1'b0) fail($sformatf("chain %0d outside subset enabled", i));
          if (c_sel[i] !== '0) fail($sformatf("chain %0d outside subset c_sel", i));
        end
      end
      if (exp_en) n_on++; else n_off++;
    end
    // inputs for the next edge
    attack = att;
    det_en = den;
    #1;
    used = rnd_next;
    checks++;
    if (!att) begin
      if (rnd_next) fail("draw without attack");
      if (in_cm) n_exit++;
      in_cm = 0;
      exp_q.delete();
    end else if (exp_q.size() == 0) begin
      int r;
      if (!rnd_next) fail("expected a draw");
      r = int'(rnd[R_W-1:0]);
      if (r == 0) begin r = 1; n_r0++; end
      for (int k = 0; k < r; k++) exp_q.push_back(1'b1);
      for (int k = 0; k < r; k++) exp_q.push_back(1'b0);
      exp_csel = rnd[R_W +: N_CM*N_CCI];
      if (!in_cm) n_enter++;
      in_cm = 1;
      n_draw++;
    end else begin
      if (rnd_next) fail("unexpected draw");
    end
    @(posedge clk);
    @(negedge clk);
    if (used) rnd = new_word(n_draw);   // replace the word the edge consumed
  endtask

  initial begin
    rnd = new_word(0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // detection, with and without enable
    for (int k = 0; k < 10; k++) step(0, k[1]);
    // a long countermeasure stretch
    for (int k = 0; k < 600; k++) step(1, 0);
    // back to detection and in again
    for (int k = 0; k < 5; k++) step(0, 1);
    for (int k = 0; k < 300; k++) step(1, 1);
    for (int k = 0; k < 3; k++) step(0, 0);
    // a short countermeasure burst that ends mid-phase
    for (int k = 0; k < 3; k++) step(1, 0);
    for (int k = 0; k < 3; k++) step(0, 1);

    checks++; if (n_draw < 10) fail("too few draws");
    checks++; if (n_r0 == 0)   fail("R = 0 never drawn");
    checks++; if (n_on == 0)   fail("no ON cycle");
    checks++; if (n_off == 0)  fail("no OFF cycle");
    checks++; if (n_enter < 3) fail("countermeasure mode entered too rarely");
    checks++; if (n_exit < 3)  fail("countermeasure mode left too rarely");
    checks++; if (n_det_on == 0) fail("detection enable never seen");
    $display("draws=%0d r0=%0d on=%0d off=%0d enter=%0d exit=%0d", n_draw, n_r0, n_on, n_off, n_enter, n_exit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
