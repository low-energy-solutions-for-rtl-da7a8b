// nvm_pkg: shared types, cell-state energy tables and TLC PCM resistance
// targets for the MLC/TLC low-energy write blocks.
//
// Cell energies are the mean write energies of the two reference cells the
// encoders are tuned for: a 2-bit MLC PCM (states 00, 01, 10, 11 cost 36,
// 307, 547 and 20 pJ) and a 3-bit TLC RRAM (states 000..111 cost 2, 6.7,
// 19.3, 35.1, 35.6, 19.6, 8.5 and 1.5 pJ). The MLC flip-n-write selector uses
// a cheaper version of the MLC table: each energy divided by 10, rounded, and
// then rounded to a power of two (4, 32, 64, 2), so that its weighted sums
// are shift-adds. TLC energies are kept in tenths of a pJ so they are integers.
//
// TLC PCM resistance targets: the full-SET bound R7 = 15 kOhm and the
// full-RESET bound R0 = 4670 kOhm split the range into six equal intervals;
// intermediate state i (1..6) lies between lower bound R_i = R7 + (6-i)*D and
// upper bound R_{i-1}, with D = (R0-R7)/6, and its midpoint is their mean.
// All resistances are integer kOhm, all voltages integer mV.
package nvm_pkg;

  // Energy model selected by the encoders.
  typedef enum logic [1:0] {
    TECH_MLC_PCM_SHIFT = 2'd0,  // MLC PCM, power-of-two weights (4,32,64,2)
    TECH_MLC_PCM       = 2'd1,  // MLC PCM, pJ (36,307,547,20)
    TECH_TLC_RRAM      = 2'd2   // TLC RRAM, 0.1 pJ (20,67,193,351,356,196,85,15)
  } tech_e;

  // Write energy of one cell programmed to `state` under model `tech`.
  function automatic int unsigned state_energy(tech_e tech, int unsigned state);
    int unsigned e;
    e = 0;
    case (tech)
      TECH_MLC_PCM_SHIFT:
        case (state & 3)
          0: e = 4;  1: e = 32;  2: e = 64;  default: e = 2;
        endcase
      TECH_MLC_PCM:
        case (state & 3)
          0: e = 36; 1: e = 307; 2: e = 547; default: e = 20;
        endcase
      default:
        case (state & 7)
          0: e = 20;  1: e = 67;  2: e = 193; 3: e = 351;
          4: e = 356; 5: e = 196; 6: e = 85;  default: e = 15;
        endcase
    endcase
    return e;
  endfunction

  // ---------------------------------------------------------------------
  // TLC PCM program-and-verify constants
  // ---------------------------------------------------------------------
  localparam int unsigned R7_KOHM = 15;     // upper bound of full crystalline state
  localparam int unsigned R0_KOHM = 4670;   // lower bound of full amorphous state

  // Lower resistance bound of TLC state i (kOhm); i = 0 gives R0, i = 7 gives R7.
  function automatic int unsigned tlc_lower_kohm(int unsigned i);
    if (i >= 6) return R7_KOHM;
    return R7_KOHM + ((6 - i) * (R0_KOHM - R7_KOHM) + 3) / 6;
  endfunction

  // Midpoint resistance of intermediate TLC state i (1..6), kOhm.
  function automatic int unsigned tlc_mid_kohm(int unsigned i);
    return (tlc_lower_kohm(i) + tlc_lower_kohm(i - 1)) / 2;
  endfunction

  // Programming pulse kinds driven towards the write driver.
  typedef enum logic [1:0] {
    PULSE_AMORPH  = 2'd0,  // partial amorphization (RESET-like) pulse
    PULSE_CRYST   = 2'd1,  // crystallization (SET-like) pulse
    PULSE_FULL_RESET = 2'd2,
    PULSE_FULL_SET   = 2'd3
  } pulse_e;

endpackage
