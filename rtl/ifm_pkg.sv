// ifm_pkg: constants and types shared by the macrocell/femtocell
// interference-mitigation receiver (macro UE) and the femto BS allocation path.
//
// The numbers follow the 20 MHz extended-CP LTE frame the design targets:
// 2048-point FFT, 512-sample cyclic prefix (a quarter of the symbol), hence
// 2560 baseband samples per OFDM symbol at 30.72 MHz, 1200 active
// subcarriers grouped in 100 PRBs of 12. The CP correlation window is the
// 512-sample CP minus 45 samples lost to the channel delay spread (467) on
// the whole-band branch and 51 samples fewer again (416) on the filtered
// half-band branches. The two-bit feedback encoding is the one of the
// decision table; the allocation scheme names are this design's own.
package ifm_pkg;

  localparam int unsigned N_FFT    = 2048;  // FFT size / correlation lag
  localparam int unsigned CP_LEN   = 512;   // extended cyclic prefix
  localparam int unsigned SYM_LEN  = N_FFT + CP_LEN;  // 2560 samples
  localparam int unsigned L_WB     = 467;   // whole-band correlation window
  localparam int unsigned L_HB     = 416;   // half-band correlation window
  localparam int unsigned N_PRB    = 100;   // PRBs in 20 MHz
  localparam int unsigned SC_PER_PRB = 12;
  localparam int unsigned N_SC     = N_PRB * SC_PER_PRB;  // 1200
  localparam int unsigned PROFILE_SYMS = 20; // State_0 duration in symbols

  // Two-bit feedback sent by the macro UE to the femto BS.
  typedef enum logic [1:0] {
    FB_NONE  = 2'b00,   // no interference
    FB_LOW   = 2'b01,   // interference in the low 10 MHz band
    FB_HIGH  = 2'b10,   // interference in the high 10 MHz band
    FB_WHOLE = 2'b11    // interference over the whole 20 MHz
  } feedback_t;

  // Femto BS PRB allocation schemes (four predefined cases).
  typedef enum logic [1:0] {
    ALLOC_WHOLE = 2'd0,  // whole 20 MHz
    ALLOC_LOW   = 2'd1,  // only the low 10 MHz band
    ALLOC_HIGH  = 2'd2,  // only the high 10 MHz band
    ALLOC_QUIET = 2'd3   // femto BS stays quiet
  } alloc_t;

  // Which allocation the femto BS must use for a given feedback: the femto
  // moves away from the band where the macro UE sees interference.
  function automatic alloc_t alloc_from_feedback(feedback_t fb);
    case (fb)
      FB_NONE:  return ALLOC_WHOLE;
      FB_LOW:   return ALLOC_HIGH;
      FB_HIGH:  return ALLOC_LOW;
      default:  return ALLOC_QUIET;
    endcase
  endfunction

endpackage
