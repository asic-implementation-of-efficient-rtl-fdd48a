// Shared types and constants of the single-precision error-detecting adder.
// IEEE 754 binary32: 1 sign bit, 8 exponent bits (bias 127), 23 fraction bits.
// The significand datapath carries the hidden bit, the 23 fraction bits and
// guard, round and sticky bits: SIG_W = 27 bits. The binary32 format is the
// source design's; the extra bits and the flag set are this design's choice.
package fp_add_pkg;
  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned MANT_W = FRAC_W + 1;   // with hidden bit
  localparam int unsigned SIG_W  = MANT_W + 3;   // with guard, round, sticky
  localparam int unsigned SH_W   = $clog2(SIG_W + 1);
  localparam logic [31:0] QNAN   = 32'h7FC0_0000;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

  typedef struct packed {
    logic nan;        // result is NaN
    logic overflow;   // exponent overflow, result is infinity
    logic underflow;  // exponent underflow, result flushed to zero
    logic inexact;    // result was rounded
    logic zero;       // result is zero
  } fp_flags_t;
endpackage
