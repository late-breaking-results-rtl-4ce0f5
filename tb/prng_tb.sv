// Self-checking testbench for prng.
//
// A reference model in the testbench steps its own copy of every xorshift32
// lane (x ^= x << 13; x ^= x >> 17; x ^= x << 5) from the documented seeds.
// Each cycle the testbench compares the generator's output with the model. It
// also checks that the output holds while next_i is low, and that no two lanes
// repeat each other.
module prng_tb;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned OUT_W = 424;
  localparam int unsigned LANES = (OUT_W + 31) / 32;
  localparam logic [31:0] SEED  = 32'h1D87_2B41;

  logic             clk = 0, rst_n = 0, next = 0;
  logic [OUT_W-1:0] rnd;
  logic [31:0]      model [LANES];
  int               checks = 0, failures = 0;
  int               cycles = 0;

  prng #(.OUT_W(OUT_W), .SEED(SEED)) dut (.clk(clk), .rst_n(rst_n), .next_i(next), .rnd_o(rnd));

  always #5000 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    logic [LANES*32-1:0] flat;
    for (int i = 0; i < LANES; i++) flat[i*32 +: 32] = model[i];
    checks++;
    if (rnd !== flat[OUT_W-1:0]) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  initial begin
    for (int i = 0; i < LANES; i++) begin
      model[i] = SEED ^ ((i + 1) * 32'h9E37_79B9);
      if (model[i] == 0) model[i] = 1;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    compare("seed");
    for (int n = 0; n < 500; n++) begin
      next = ($urandom % 4) != 0;
      @(posedge clk);
      if (next)
        for (int i = 0; i < LANES; i++) begin
          model[i] = model[i] ^ (model[i] << 13);
          model[i] = model[i] ^ (model[i] >> 17);
          model[i] = model[i] ^ (model[i] << 5);
        end
      @(negedge clk);
      compare(next ? "step" : "hold");
    end
    for (int i = 0; i < LANES - 1; i++) begin
      checks++;
      if (rnd[i*32 +: 32] == rnd[(i+1)*32 +: 32]) begin
        failures++;
        $display("FAIL lanes %0d and %0d equal", i, i + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
