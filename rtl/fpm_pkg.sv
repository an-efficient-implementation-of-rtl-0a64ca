// Shared constants and types of the single-precision floating-point multiplier.
//
// The operand format is IEEE 754 binary32: sign in bit 31, an 8-bit biased
// exponent in bits 30:23 and a 23-bit fraction in bits 22:0, with an implied
// leading one (significand = 1.M, 24 bits). The bias is 127.
//
// exp_class_e names the four ranges of the intermediate exponent
// E = E1 + E2 - 127 before normalisation:
//   EC_UNDERFLOW  E < 0            can never be brought back into range
//   EC_ZERO       E = 0            becomes 1 if normalisation shifts, else underflow
//   EC_NORMAL     1 <= E <= 254    may still overflow if normalisation shifts
//   EC_OVERFLOW   E >= 255         can never be brought back into range
package fpm_pkg;

  localparam int unsigned EXP_W  = 8;            // stored exponent width
  localparam int unsigned FRAC_W = 23;           // stored fraction width
  localparam int unsigned SIG_W  = FRAC_W + 1;   // significand incl. hidden one
  localparam int unsigned BIAS   = 127;
  localparam int unsigned EMAX   = 254;          // largest exponent of a normal number

  typedef enum logic [1:0] {
    EC_UNDERFLOW = 2'd0,
    EC_ZERO      = 2'd1,
    EC_NORMAL    = 2'd2,
    EC_OVERFLOW  = 2'd3
  } exp_class_e;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exponent;
    logic [FRAC_W-1:0] fraction;
  } fp32_t;

endpackage
