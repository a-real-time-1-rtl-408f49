// Shared constants and types of the FFAST sparse spectrum analyzer.
//
// The analyzer computes a 21600-point spectrum from three subsampled copies of
// the input (factors 25, 27 and 32, giving 864-, 800- and 675-point sub-FFTs),
// each taken with six sample delays (0, 1, 6, 9, 12, 19).  These numbers, the
// 20-bit FFT word per real/imaginary part, the 15-bit frequency index and the
// 9-bit ADC codes follow the published design.  The angle width, energy width
// and the fixed-point scalings are this implementation's choices.
package ffast_pkg;

  localparam int N_FFT   = 21600;          // full spectrum length n
  localparam int NSTAGES = 3;              // subsampling stages d
  localparam int LANES   = 6;              // delay chains D per stage
  localparam int NCLUST  = 3;              // delay clusters C (D = 2C)
  localparam int DW      = 20;             // bits per real/imag FFT word
  localparam int ADCW    = 9;              // ADC raw code / calibrated code width
  localparam int ANGW    = 24;             // angle width, full circle = 2**ANGW
  localparam int EW      = 2*DW + 4;       // |Y|^2 summed over six lanes
  localparam int JW      = 15;             // frequency index j width
  localparam int BINW    = 10;             // sub-FFT bin index width
  localparam int DLYW    = 5;              // sample delay width
  localparam int TAUW    = 4;              // delay delta width

  localparam int NI   [NSTAGES] = '{864, 800, 675};
  localparam int SUBF [NSTAGES] = '{25, 27, 32};
  localparam int DELAY_DEF [LANES]  = '{0, 1, 6, 9, 12, 19};
  localparam int TAU_DEF   [NCLUST] = '{1, 3, 7};

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // Output FIFO entry: recovered frequency location and its value.
  typedef struct packed {
    logic [JW-1:0] j;
    cplx_t         v;
  } peel_out_t;

  // Runtime configuration held in the status/control registers.
  typedef struct packed {
    logic [EW-1:0]   t_noise;
    logic [7:0]      max_iter;
    logic [LANES-1:0][DLYW-1:0]  delay;
    logic [NCLUST-1:0][TAUW-1:0] tau;
  } peel_cfg_t;

  // x mod n for 0 <= x < 2n (one compare-and-subtract).
  function automatic logic [31:0] mod_sub(input logic [31:0] x, input logic [31:0] n);
    return (x >= n) ? x - n : x;
  endfunction

endpackage
