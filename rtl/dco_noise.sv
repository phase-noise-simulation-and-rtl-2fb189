// dco_noise: per-period time perturbations that give the DCO its phase noise
// (behavioural model: real arithmetic, simulation only).
//
// Four noise classes, each from its own Mersenne-Twister stream:
//   jitter  (white phase noise, flat)    e = sj * g,  term = e[n] - e[n-1]
//   flicker (pink phase noise, -10 dB/dec) e = sf * p, term = e[n] - e[n-1]
//   wander  (red phase noise, -20 dB/dec)  term = sw * g
//   saunter (infrared, -30 dB/dec)         term = ss * p
// g is a unit Gaussian (Box-Muller), p a unit-variance pink sample
// (Voss-McCartney). Jitter and flicker displace edges without accumulating,
// so the period sees their first difference; wander and saunter perturb the
// period itself and accumulate in phase through the oscillator, which
// supplies the extra -10 dB/dec. The sigmas come from the phase-noise levels
// by the adpll_pkg conversion functions. NOISE_EN selects classes
// (bit 0 jitter, 1 flicker, 2 wander, 3 saunter).
//
// Interface: clk is the DCO output; each rising edge produces the
// perturbation for a coming period in `dperiod` (seconds). All terms are 0
// until the generators are seeded (624 clocks after reset).
module dco_noise
  import adpll_pkg::*;
#(
  parameter real         F0        = F0DCO,
  parameter real         W_PN      = WHITE_PN,
  parameter real         P_CORNER  = PINK_CORNER,
  parameter real         P_PN      = PINK_PN,
  parameter real         R_CORNER  = RED_CORNER,
  parameter real         R_PN      = RED_PN,
  parameter real         IR_CORNER = INFRARED_CORNER,
  parameter real         IR_PN     = INFRARED_PN,
  parameter logic [3:0]  NOISE_EN  = 4'b1111,
  parameter logic [31:0] SEED      = 32'd5489,
  parameter int unsigned VM_ROWS   = 16
) (
  input  logic clk,
  input  logic rst_n,
  output logic active,
  output real  jit,
  output real  flk,
  output real  wnd,
  output real  sau,
  output real  dperiod
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned VM_IN  = 16;
  localparam int unsigned VM_OUT = VM_IN + $clog2(VM_ROWS + 2);
  // standard deviation of a full pink sum: sqrt(ROWS+1) uniform 16-bit values
  localparam real PINK_NORM = $sqrt(real'(VM_ROWS + 1)) * 65536.0 / $sqrt(12.0);

  localparam real SJ = white2stddev(F0, W_PN);
  localparam real SF = pink2stddev(F0, P_CORNER, P_PN);
  localparam real SW = red2stddev(F0, R_CORNER, R_PN);
  localparam real SS = infrared2stddev(F0, IR_CORNER, IR_PN);

  logic [3:0]  rdy, vld;
  logic [31:0] rnd [4];
  real         g_j, g_w;
  logic signed [VM_OUT-1:0] p_f, p_s;
  real         pj, pf;    // previous edge displacements

  for (genvar k = 0; k < 4; k++) begin : g_rng
    mt19937 u_mt (
      .clk, .rst_n,
      .seed (SEED + 32'(k) * 32'h9E37_79B9),
      .en   (rdy[k]),
      .ready(rdy[k]),
      .valid(vld[k]),
      .rnd  (rnd[k])
    );
  end

  box_muller u_bm_jit (.clk, .rst_n, .en(vld[0]), .u(rnd[0]), .z(g_j));
  box_muller u_bm_wnd (.clk, .rst_n, .en(vld[2]), .u(rnd[2]), .z(g_w));

  voss_mccartney #(.ROWS(VM_ROWS), .IN_W(VM_IN)) u_vm_flk (
    .clk, .rst_n, .en(vld[1]), .rnd(rnd[1]), .pink(p_f));
  voss_mccartney #(.ROWS(VM_ROWS), .IN_W(VM_IN)) u_vm_sau (
    .clk, .rst_n, .en(vld[3]), .rnd(rnd[3]), .pink(p_s));

  real ej, ef;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      pj      <= 0.0;
      pf      <= 0.0;
      jit     <= 0.0;
      flk     <= 0.0;
      wnd     <= 0.0;
      sau     <= 0.0;
      dperiod <= 0.0;
    end else begin
      active <= &vld;
      if (&vld) begin
        ej   = NOISE_EN[NZ_JITTER]  ? SJ * g_j : 0.0;
        ef   = NOISE_EN[NZ_FLICKER] ? SF * real'(p_f) / PINK_NORM : 0.0;
        pj  <= ej;
        pf  <= ef;
        jit <= ej - pj;
        flk <= ef - pf;
        wnd <= NOISE_EN[NZ_WANDER]  ? SW * g_w : 0.0;
        sau <= NOISE_EN[NZ_SAUNTER] ? SS * real'(p_s) / PINK_NORM : 0.0;
        dperiod <= (ej - pj) + (ef - pf)
                 + (NOISE_EN[NZ_WANDER]  ? SW * g_w : 0.0)
                 + (NOISE_EN[NZ_SAUNTER] ? SS * real'(p_s) / PINK_NORM : 0.0);
      end
    end
  end
endmodule
