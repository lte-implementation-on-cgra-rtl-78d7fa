// lte_pkg: types and constants shared by the PDSCH transmit chain.
//
// All complex samples are carried as a pair of signed 16-bit words (real
// part I, imaginary part Q), matching the 16-bit data words of the target
// fabric. The fixed-point format is Q1.14: 16384 represents 1.0, so the
// largest 64QAM level 7/sqrt(42) = 1.08 still fits. The format itself is a
// choice of this design; the 16-bit word width follows the platform.
package lte_pkg;

  localparam int unsigned DW   = 16;   // data word width (I or Q)
  localparam int unsigned FRAC = 14;   // fractional bits of the Q1.14 format
  localparam int unsigned NC   = 1600; // Gold sequence offset N_c
  localparam int unsigned NLAYERS = 4; // layers of spatial multiplexing case 7
  localparam int unsigned NPORTS  = 4; // antenna ports

  typedef logic signed [DW-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // Modulation order selected by the mapper's sequencer.
  typedef enum logic [1:0] {
    MOD_QPSK  = 2'd0,
    MOD_16QAM = 2'd1,
    MOD_64QAM = 2'd2
  } mod_t;

  // Channel type for the second m-sequence initialisation.
  typedef enum logic {
    CH_PDSCH = 1'b0,
    CH_PMCH  = 1'b1
  } chan_t;

  // Bits per modulation symbol, Q_m.
  function automatic int unsigned bits_per_sym(mod_t m);
    case (m)
      MOD_QPSK:  return 2;
      MOD_16QAM: return 4;
      default:   return 6;
    endcase
  endfunction

  // Saturate a wide signed value to one 16-bit sample.
  function automatic sample_t sat16(input logic signed [39:0] v);
    if (v > 40'sd32767)       return 16'sh7fff;
    else if (v < -40'sd32768) return 16'sh8000;
    else                      return sample_t'(v);
  endfunction

endpackage
