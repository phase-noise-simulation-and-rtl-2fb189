// adpll_pkg: shared types, loop constants and noise-to-jitter conversions for
// the all-digital PLL (ADPLL) whose loop filter lives inside the DCO.
//
// The loop constants are the ones of the reference configuration: a 24 MHz
// reference, a 2.2 GHz free-running DCO with 100 kHz per varactor unit, a
// proportional gain of 10 units, an integral gain of 1 unit and a divide
// ratio of 100 (locks at 2.4 GHz). The noise constants give, per noise
// class, the phase-noise level (dBc/Hz) at a corner offset (Hz).
//
// The four conversion functions turn a phase-noise level into the standard
// deviation (seconds) of a per-period time perturbation:
//   white    (flat)       -> edge jitter     sigma = sqrt(L/f0) / (2 pi)
//   pink     (-10 dB/dec) -> flicker         sigma = (df/f0) sqrt(L/(2 pi f0))
//   red      (-20 dB/dec) -> wander          sigma = (df/f0) sqrt(L/f0)
//   infrared (-30 dB/dec) -> saunter         sigma = df/(2 pi^2 f0) sqrt(L/(2 pi f0))
// with L = 10^(dBc/10). These are simulation-only (real) functions.
package adpll_pkg;
  timeunit 1ps; timeprecision 1fs;

  // Integral-path varactor coding (binary counter, thermometer, one-hot).
  typedef enum logic [1:0] {
    CODING_BINARY = 2'd0,
    CODING_UNARY  = 2'd1,
    CODING_ONEHOT = 2'd2
  } coding_e;

  // Noise enable mask bit positions.
  localparam int NZ_JITTER  = 0;
  localparam int NZ_FLICKER = 1;
  localparam int NZ_WANDER  = 2;
  localparam int NZ_SAUNTER = 3;

  // Loop design constants.
  localparam real F0REF     = 24.0e6;   // reference frequency, Hz
  localparam real F0DCO     = 2200.0e6; // intrinsic DCO frequency, Hz
  localparam real KDCO      = 100.0e3;  // DCO gain, Hz per varactor unit
  localparam real KP        = 10.0;     // proportional-path weight, units
  localparam real KI        = 1.0;      // integral-path weight, units
  localparam int  DIV_RATIO = 100;      // feedback divide ratio

  // Noise constants: levels in dBc/Hz, corners in Hz.
  localparam real REF_WHITE_PN    = -130.0;
  localparam real WHITE_PN        = -150.0;
  localparam real PINK_CORNER     = 1.0e8;
  localparam real PINK_PN         = -150.0;
  localparam real RED_CORNER      = 1.0e7;
  localparam real RED_PN          = -140.0;
  localparam real INFRARED_CORNER = 1.0e6;
  localparam real INFRARED_PN     = -120.0;

  localparam real PI = 3.14159265358979323846;

  function automatic real dbc2lin(real dbc);
    return 10.0 ** (dbc / 10.0);
  endfunction

  function automatic real white2stddev(real f0, real pn);
    return $sqrt(dbc2lin(pn) / f0) / (2.0 * PI);
  endfunction

  function automatic real pink2stddev(real f0, real corner, real pn);
    return (corner / f0) * $sqrt(dbc2lin(pn) / (2.0 * PI * f0));
  endfunction

  function automatic real red2stddev(real f0, real corner, real pn);
    return (corner / f0) * $sqrt(dbc2lin(pn) / f0);
  endfunction

  function automatic real infrared2stddev(real f0, real corner, real pn);
    return (corner / (2.0 * PI * PI * f0)) * $sqrt(dbc2lin(pn) / (2.0 * PI * f0));
  endfunction

endpackage
