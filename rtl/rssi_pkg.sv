// rssi_pkg: constants and types shared by the DFT-based received-signal-strength
// detector.
//
// The detector correlates the single-bit I/Q stream of a delta-sigma ADC with
// a complex exponential taken from a quarter-wave cosine table, accumulates the
// result (S_k) next to the plain sum of the samples (S_0), and reports
// log2|S_0| - avg(log2|S_k|) as the RSSI.
//
// From the source design: a 192-entry cosine period (96 MHz sample clock divided by the
// lowest IF of 0.5 MHz), stored as a 48-entry quarter period; a 32-entry
// mantissa table in the logarithm; a moving average of length four.
// Own choices: 8-bit table magnitudes, 6 fractional bits in the log domain,
// 20-bit run-length counter.
package rssi_pkg;

  // Full cosine period in samples (f_s / lowest f_IF = 96 MHz / 0.5 MHz).
  localparam int unsigned LutPeriod  = 192;
  // Stored entries: one quarter period.
  localparam int unsigned LutQuarter = LutPeriod / 4;
  // Width of a stored cosine magnitude; 1.0 is represented as 2**LutW - 1.
  localparam int unsigned LutW       = 8;
  // Width of the phase index 0 .. LutPeriod-1.
  localparam int unsigned PhaseW     = $clog2(LutPeriod);

  // Logarithm format: unsigned fixed point, LogFracW fractional bits.
  localparam int unsigned LogFracW   = 6;
  // Mantissa bits that address the log2 table (2**MantW = 32 entries).
  localparam int unsigned MantW      = 5;

  // Magnitude plus sign, as delivered by the cosine table.
  typedef struct packed {
    logic            neg;
    logic [LutW-1:0] mag;
  } lut_val_t;

  // Controller state.
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,
    ST_RUN  = 2'd1,
    ST_DONE = 2'd2
  } run_state_t;

endpackage
