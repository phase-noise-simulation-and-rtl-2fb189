// mt19937: Mersenne-Twister MT19937 uniform 32-bit random number generator.
//
// The standard generator (624-word state, period 2^19937-1), computed one
// word per clock. After reset the state is seeded sequentially, one word per
// clock, by the standard recurrence
//   mt[0] = seed,  mt[k] = 1812433253 * (mt[k-1] ^ (mt[k-1] >> 30)) + k,
// which takes 624 clocks; then `ready` rises. From then on every clock with
// `en` high twists one state word in place and emits it tempered, so the
// output sequence is bit-identical to the reference software generator
// (seed 5489 gives 3499211612, 581869302, ...). The twist of word i reads
// words i, i+1 and i+397 (mod 624) and writes word i.
//
// Interface: clk, rst_n (async, active low), seed (sampled during seeding),
// en; rnd is valid (and `valid` high) in the clock after an accepted en.
module mt19937 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] seed,
  input  logic        en,
  output logic        ready,
  output logic        valid,
  output logic [31:0] rnd
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned N = 624;
  localparam int unsigned M = 397;
  localparam logic [31:0] MATRIX_A = 32'h9908_B0DF;
  localparam logic [31:0] UPPER    = 32'h8000_0000;
  localparam logic [31:0] LOWER    = 32'h7FFF_FFFF;

  logic [31:0] mt [N];
  logic [9:0]  i0, i1, im;      // i, i+1, i+M (mod N)
  logic [31:0] prev;            // last word written while seeding
  logic        seeding;

  logic [31:0] y, twisted, seed_word, t;
  logic        we;
  logic [9:0]  waddr;
  logic [31:0] wdata;

  function automatic logic [9:0] inc(logic [9:0] a);
    return (a == 10'(N - 1)) ? 10'd0 : a + 10'd1;
  endfunction

  always_comb begin
    y         = (mt[i0] & UPPER) | (mt[i1] & LOWER);
    twisted   = mt[im] ^ (y >> 1) ^ (y[0] ? MATRIX_A : 32'h0);
    seed_word = (i0 == '0) ? seed
              : 32'd1812433253 * (prev ^ (prev >> 30)) + 32'(i0);
    // tempering of the freshly twisted word
    t = twisted;
    t = t ^ (t >> 11);
    t = t ^ ((t << 7)  & 32'h9D2C_5680);
    t = t ^ ((t << 15) & 32'hEFC6_0000);
    t = t ^ (t >> 18);
    we    = seeding | en;
    waddr = i0;
    wdata = seeding ? seed_word : twisted;
  end

  always_ff @(posedge clk) begin
    if (we) mt[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seeding <= 1'b1;
      ready   <= 1'b0;
      valid   <= 1'b0;
      rnd     <= '0;
      prev    <= '0;
      i0      <= 10'd0;
      i1      <= 10'd1;
      im      <= 10'(M);
    end else if (seeding) begin
      prev <= seed_word;
      valid <= 1'b0;
      if (i0 == 10'(N - 1)) begin
        seeding <= 1'b0;
        ready   <= 1'b1;
        i0      <= 10'd0;
      end else begin
        i0 <= i0 + 10'd1;
      end
    end else begin
      valid <= en;
      if (en) begin
        rnd <= t;
        i0  <= i1;
        i1  <= inc(i1);
        im  <= inc(im);
      end
    end
  end
endmodule
