// fft_pkg: types and constants shared by the radix-64 FFT engine.
//
// Complex samples are two 32-bit two's-complement integers (real, imaginary),
// 64 bits per complex word as in the engine's 64-bit complex numbers. Twiddle
// factors use the same 32-bit words with 30 fraction bits (1.0 = 2^30). The
// fixed-point format is this design's choice: the source architecture only says
// the arithmetic units are 32 bits wide. Nothing is scaled inside the FFT, so a
// 64-point transform grows values by up to 64x; callers keep inputs below 2^24.
package fft_pkg;

  localparam int unsigned CW      = 32;  // width of one real component
  localparam int unsigned TW_FRAC = 30;  // fraction bits of twiddle factors
  localparam int unsigned NPT     = 64;  // points per engine transform (radix 64)
  localparam int unsigned R8      = 8;   // points per radix-8 unit

  // cos(pi/4) in the twiddle format, used by the third radix-8 stage.
  localparam logic signed [CW-1:0] C45 = 32'sd759250125;

  typedef struct packed {
    logic signed [CW-1:0] re;
    logic signed [CW-1:0] im;
  } cplx_t;

  // Bookkeeping that travels with each 64-point transform through the pipeline.
  typedef struct packed {
    logic [19:0] fft;   // transform number within the pass (selects write address)
    logic [19:0] tw_m;  // multiplier of the output twiddle exponent
    logic [5:0]  rot;   // lane rotation applied when the data was read
  } meta_t;

  // DDR SDRAM address of one 16-bit beat: 4 banks x 4096 rows x 256 columns.
  typedef struct packed {
    logic [1:0]  bank;
    logic [11:0] row;
    logic [7:0]  col;
  } dram_addr_t;

  function automatic cplx_t c_add(cplx_t a, cplx_t b);
    c_add.re = a.re + b.re;
    c_add.im = a.im + b.im;
  endfunction

  function automatic cplx_t c_sub(cplx_t a, cplx_t b);
    c_sub.re = a.re - b.re;
    c_sub.im = a.im - b.im;
  endfunction

  // a * (-j)
  function automatic cplx_t c_mnj(cplx_t a);
    c_mnj.re = a.im;
    c_mnj.im = -a.re;
  endfunction

  // Fixed-point product of a 32-bit value and a twiddle-format coefficient,
  // rounded to nearest.
  function automatic logic signed [CW-1:0] q_mul(logic signed [CW-1:0] a,
                                                 logic signed [CW-1:0] c);
    logic signed [2*CW-1:0] p;
    p = (2*CW)'(a) * (2*CW)'(c) + (64'sd1 <<< (TW_FRAC-1));
    q_mul = CW'(p >>> TW_FRAC);
  endfunction

endpackage
