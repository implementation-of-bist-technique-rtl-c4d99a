// bist_pkg: constants and types shared by the ADC built-in self-test.
//
// The ADC under test is 12 bits wide (its resolution in the test case).
// Results leave the engines as signed fixed-point numbers with 16
// fractional bits ("Q.16"); gain is carried with 30 fractional bits.
// The arctangent table is the CORDIC rotation angle for step i, given in
// units of 2^-32 of a full turn: round(atan(2^-i) / (2*pi) * 2^32).
package bist_pkg;

  localparam int ADC_BITS   = 12;   // ADC resolution
  localparam int RES_FRAC   = 16;   // fractional bits of every reported metric
  localparam int GAIN_FRAC  = 30;   // fractional bits of the best-fit gain

  typedef logic signed [31:0] q16_t;

  // Static test results, all Q.16 except gain (Q.30).
  typedef struct packed {
    logic signed [31:0] gain;         // best-fit gain G, Q2.30
    q16_t               gain_err_pct; // (G - 1) * 100
    q16_t               offset_lsb;   // best-fit offset Vos in LSB
    q16_t               dnl_min;
    q16_t               dnl_max;
    q16_t               inl_min;
    q16_t               inl_max;
  } static_result_t;

  // Dynamic test results, all Q.16 (dB, or bits for ENOB).
  typedef struct packed {
    logic [15:0] fund_bin;            // FFT bin of the fundamental
    q16_t        thd_db;              // signal power over harmonic power
    q16_t        snr_db;              // signal over noise (harmonics excluded)
    q16_t        sinad_db;            // signal over noise plus harmonics
    q16_t        sfdr_db;             // signal over the largest spur
    q16_t        enob;                // (SINAD - 1.76) / 6.02
  } dynamic_result_t;

  // CORDIC arctangent table, full turn = 2^32.
  function automatic logic [31:0] cordic_atan(input int i);
    case (i)
      0:  return 32'd536870912;
      1:  return 32'd316933406;
      2:  return 32'd167458907;
      3:  return 32'd85004756;
      4:  return 32'd42667331;
      5:  return 32'd21354465;
      6:  return 32'd10679838;
      7:  return 32'd5340245;
      8:  return 32'd2670163;
      9:  return 32'd1335087;
      10: return 32'd667544;
      11: return 32'd333772;
      12: return 32'd166886;
      13: return 32'd83443;
      14: return 32'd41722;
      15: return 32'd20861;
      16: return 32'd10430;
      17: return 32'd5215;
      18: return 32'd2608;
      19: return 32'd1304;
      20: return 32'd652;
      21: return 32'd326;
      22: return 32'd163;
      23: return 32'd81;
      24: return 32'd41;
      default: return 32'd20;
    endcase
  endfunction

  // 1 / prod(sqrt(1 + 2^-2i)), the CORDIC gain compensation, in Q.24.
  localparam logic [31:0] CORDIC_K_Q24 = 32'd10188014;

endpackage
