// sa_pkg: number formats and shared types of the spectrum analyzer.
//
// All samples, FFT results and spectrum outputs are 32-bit signed fixed-point
// numbers with 16 fraction bits (Q16.16). The 32-bit bus width follows the
// data buses of the reference design; the fixed-point format itself is this
// design's choice. Twiddle factors use Q2.30. Bin indices are 6 bits wide,
// matching the index outputs of the reference design, which allows frames of
// up to 64 bins.
package sa_pkg;
  parameter int DATA_W  = 32;  // sample word width
  parameter int FRAC_W  = 16;  // fraction bits of a sample word
  parameter int TW_W    = 32;  // twiddle word width
  parameter int TW_FRAC = 30;  // fraction bits of a twiddle word
  parameter int IDX_W   = 6;   // bin index width

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [TW_W-1:0]   tw_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  typedef struct packed {
    tw_t re;
    tw_t im;
  } tw_cplx_t;

  // One result of the spectrum extractor: value, bin index and end-of-frame.
  typedef struct packed {
    sample_t           data;
    logic [IDX_W-1:0]  idx;
    logic              last;
  } result_t;

  // Q16.16 conversion helpers, for elaboration-time tables and testbenches.
  function automatic sample_t to_q(real r);
    return sample_t'($rtoi(r * (2.0 ** FRAC_W) + ((r >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic real from_q(sample_t v);
    return real'(v) / (2.0 ** FRAC_W);
  endfunction
endpackage
