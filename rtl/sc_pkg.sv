// sc_pkg: types, constants and elaboration-time helpers shared by the
// stochastic inner-product and mean circuits.
//
// Numbers are carried as K-bit unsigned binaries. A binary B turns into a
// bitstream of probability B/2^K; a threshold that must be able to express
// 1.0 exactly (2^K) is K+1 bits wide. The filter kernels of the image
// applications are kept here as integer weights; the circuits consume their
// running sums scaled to 2^K (see scaled_thr).
package sc_pkg;

  // Default width of the random number source and of the binary inputs.
  localparam int unsigned K_DEFAULT = 8;
  // Default number of inputs of an inner-product or mean circuit (3x3 window).
  localparam int unsigned N_DEFAULT = 9;

  // Kind of random number source shared by all SNGs of one circuit.
  typedef enum logic {
    RNS_LFSR  = 1'b0,
    RNS_SOBOL = 1'b1
  } rns_kind_e;

  // 3x3 kernels, row-major, window index 0 is the top-left pixel.
  typedef int kernel_t [9];
  localparam kernel_t GAUSS_KERNEL = '{1, 2, 1, 2, 4, 2, 1, 2, 1};   // / 16
  localparam kernel_t SOBEL_X      = '{-1, 0, 1, -2, 0, 2, -1, 0, 1}; // / 8
  localparam kernel_t SOBEL_Y      = '{-1, -2, -1, 0, 0, 0, 1, 2, 1}; // / 8

  // Feedback taps (bit mask, bit t-1 set for tap t) of a maximal-length
  // Fibonacci LFSR of width k.
  function automatic int unsigned lfsr_taps(int unsigned k);
    case (k)
      3:       return 32'h0000_0006; // x^3+x^2+1
      4:       return 32'h0000_000C; // x^4+x^3+1
      5:       return 32'h0000_0014; // x^5+x^3+1
      6:       return 32'h0000_0030; // x^6+x^5+1
      7:       return 32'h0000_0060; // x^7+x^6+1
      8:       return 32'h0000_00B8; // x^8+x^6+x^5+x^4+1
      9:       return 32'h0000_0110; // x^9+x^5+1
      10:      return 32'h0000_0240; // x^10+x^7+1
      11:      return 32'h0000_0500; // x^11+x^9+1
      12:      return 32'h0000_0829; // x^12+x^6+x^4+x+1
      13:      return 32'h0000_100D; // x^13+x^4+x^3+x+1
      14:      return 32'h0000_2015; // x^14+x^5+x^3+x+1
      15:      return 32'h0000_6000; // x^15+x^14+1
      16:      return 32'h0000_D008; // x^16+x^15+x^13+x^4+1
      default: return 32'h0000_00B8;
    endcase
  endfunction

  // Threshold of a running sum: round(cum * 2^k / total), so that the SNG
  // fed with it emits a stream of probability cum/total.
  function automatic int unsigned scaled_thr(int unsigned cum, int unsigned total,
                                          int unsigned k);
    longint unsigned num;
    num = (longint'(cum) << k) + (longint'(total) >> 1);
    return int'(num / longint'(total));
  endfunction

  // Sum of |w[0..i]| of a kernel (running sum of magnitudes up to entry i).
  function automatic int unsigned kernel_prefix_abs(kernel_t w, int i);
    int unsigned s;
    s = 0;
    for (int j = 0; j <= i; j++) s += (w[j] < 0) ? -w[j] : w[j];
    return s;
  endfunction

endpackage
