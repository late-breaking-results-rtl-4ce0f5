// Pseudo random number generator for the countermeasure control.
//
// The design needs OUT_W fresh random bits per draw: one on/off duration R
// and one c_sel bit per CCI of every countermeasure chain. The generator is
// a row of LANES = ceil(OUT_W / 32) independent xorshift32 generators. Each
// uses the shifts 13, 17, 5, whose period is 2^32 - 1. Lane i starts from the seed
// SEED XOR (i + 1) * 0x9E3779B9, and a zero seed is replaced by 1.
// rnd_o shows the current state of all lanes, truncated to OUT_W bits.
//
// Interface and timing: rnd_o is valid from reset on. With next_i high at a
// rising clk edge every lane steps once, so rnd_o holds a new value in the
// next cycle. rst_n is active low and asynchronous.
//
// The published design calls only for a pseudo RNG in the prototype, and
// for a true RNG in a product. The xorshift generator, the lane structure
// and the seeds are this design's own choices. A true RNG with the same
// interface can replace this block.
module prng
  #(parameter int unsigned OUT_W = 424,
    parameter logic [31:0] SEED  = 32'h1D87_2B41)
  (input  logic             clk,
   input  logic             rst_n,
   input  logic             next_i,
   output logic [OUT_W-1:0] rnd_o);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned LANES = (OUT_W + 31) / 32;

  function automatic logic [31:0] lane_seed(input int unsigned i);
    logic [31:0] s;
    s = SEED ^ (32'(i + 1) * 32'h9E37_79B9);
    return (s == '0) ? 32'd1 : s;
  endfunction

  function automatic logic [31:0] xorshift32(input logic [31:0] s);
    logic [31:0] t;
    t = s ^ (s << 13);
    t = t ^ (t >> 17);
    t = t ^ (t << 5);
    return t;
  endfunction

  logic [LANES-1:0][31:0] state_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LANES; i++) state_q[i] <= lane_seed(i);
    end else if (next_i) begin
      for (int i = 0; i < LANES; i++) state_q[i] <= xorshift32(state_q[i]);
    end
  end

  logic [LANES*32-1:0] flat;
  assign flat  = state_q;
  assign rnd_o = flat[OUT_W-1:0];   // the top LANES*32 - OUT_W bits go unused
endmodule
