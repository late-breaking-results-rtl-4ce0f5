// Self-checking testbench for rcro_chain, one runtime-configurable RO chain.
//
// Detection mode (sel = 0): every one of the 65 CIs must toggle once per gate
// delay, as its own length-one ring.
// Countermeasure mode (sel = 1): for a set of c_sel words, including none
// and all bypasses, the ring tap must oscillate with a period of
// 2 * L * GATE_DELAY. Here L = 65 - 4 * (number of set c_sel bits) is worked out
// in the testbench. Every CI inside the ring must toggle at the ring rate.
// en = 0 must stop every CI at the alternating stop pattern (CI j at j mod 2).
module rcro_chain_tb;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned D     = 500;
  localparam int unsigned NCI   = 65;
  localparam int unsigned NCCI  = 13;
  localparam int unsigned RINGS = 20;    // ring periods per measurement

  logic             en, sel;
  logic [NCCI-1:0]  c_sel;
  logic [NCI-1:0]   ro;
  logic             ring;
  int               checks = 0, failures = 0;
  int               edges [NCI];
  int               ring_rise = 0;

  // Stage j holds j mod 2 while the chain is stopped.
  function automatic logic [NCI-1:0] stop_pattern();
    logic [NCI-1:0] v;
    for (int j = 0; j < NCI; j++) v[j] = 1'(j % 2);
    return v;
  endfunction
  localparam logic [NCI-1:0] STOPPED = stop_pattern();

  rcro_chain #(.GATE_DELAY(D)) dut (.en(en), .sel(sel), .c_sel(c_sel), .ro_o(ro), .ring_o(ring));

  for (genvar j = 0; j < NCI; j++) begin : g_mon
    always @(ro[j]) edges[j]++;
  end
  always @(posedge ring) ring_rise++;

  task automatic clear_counts();
    for (int j = 0; j < NCI; j++) edges[j] = 0;
    ring_rise = 0;
  endtask

  // Is CI j inside the ring for this c_sel? SCIs in front of a bypassing CCI
  // are not; a CCI always is.
  function automatic bit in_ring(input int j, input logic [NCCI-1:0] cs);
    int g, nxt;
    if (j % 5 == 0) return 1;
    g   = j / 5;
    nxt = (g + 1) % NCCI;
    return !cs[nxt];
  endfunction

  task automatic measure_ring(input logic [NCCI-1:0] cs);
    int L;
    L = NCI - 4 * $countones(cs);
    en = 0;
    #(2*D);
    checks++;
    if (ro !== STOPPED) begin failures++; $display("FAIL stop pattern %h", ro); end
    c_sel = cs;
    en = 1;
    repeat (2 * L) #(D);                        // one period to start up
    clear_counts();
    repeat (RINGS * 2 * L) #(D);
    checks++;
    if (ring_rise < RINGS - 1 || ring_rise > RINGS + 1) begin
      failures++;
      $display("FAIL c_sel=%h L=%0d: %0d ring periods, expected %0d", cs, L, ring_rise, RINGS);
    end
    for (int j = 0; j < NCI; j++) if (in_ring(j, cs)) begin
      checks++;
      if (edges[j] < 2*RINGS - 2 || edges[j] > 2*RINGS + 2) begin
        failures++;
        $display("FAIL c_sel=%h CI %0d: %0d edges, expected %0d", cs, j, edges[j], 2*RINGS);
      end
    end
  endtask

  initial begin
    #(50_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NCCI-1:0] cs;
    en = 0; sel = 0; c_sel = '0;
    #(4*D);
    checks++;
    if (ro !== STOPPED) begin failures++; $display("FAIL disabled chain not at stop pattern"); end

    // Detection: 65 independent length-one rings.
    c_sel = '1;                               // must not matter with sel = 0
    en = 1;
    #(D/2);
    clear_counts();
    #(100*D);
    for (int j = 0; j < NCI; j++) begin
      checks++;
      if (edges[j] < 99 || edges[j] > 101) begin
        failures++;
        $display("FAIL detection CI %0d: %0d edges in 100 gate delays", j, edges[j]);
      end
    end

    // Countermeasure rings.
    en = 0; #(4*D);
    sel = 1; c_sel = '0;
    measure_ring('0);                         // 65 CIs
    measure_ring('1);                         // 13 CIs
    measure_ring(13'h0001);
    measure_ring(13'h1000);
    for (int k = 0; k < 6; k++) begin
      cs = NCCI'($urandom);
      measure_ring(cs);
    end

    en = 0;
    #(2*D);
    checks++;
    if (ro !== STOPPED) begin failures++; $display("FAIL stopped chain: %h", ro); end
    #(10*D);
    clear_counts();
    #(20*D);
    checks++;
    if (ring_rise != 0) begin failures++; $display("FAIL stopped ring still running"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
