// Shared types and constants of the OFDM UWB synchronizer.
//
// The preamble symbol is N = 165 samples long (128-point FFT plus a
// 37-sample guard interval). The synchronizer runs four parallel lanes
// (LANES), so one 4-lane vector corresponds to one cycle of the 132 MHz
// datapath at 528 MS/s. With the data-partition reduction factor
// OMEGA = 4 only floor(N/OMEGA) = 41 samples per symbol are stored and
// correlated. These numbers are the design's own figures; the phase and
// table widths further down are choices of this implementation.
package sync_pkg;

  localparam int N      = 165;        // samples per repeated preamble symbol
  localparam int GI     = 37;         // guard-interval samples in a symbol (N - 128)
  localparam int OMEGA  = 4;          // data-partition reduction factor
  localparam int LANES  = 4;          // parallel signal paths
  localparam int NSEL   = N / OMEGA;  // stored samples / MF taps = 41

  // Widths of the I/Q sample formats used along the datapath.
  localparam int ADC_W  = 5;          // ADC output
  localparam int COMP_W = 6;          // CFO-compensator output (to FFT)
  localparam int PART_W = 4;          // MSBs kept by the data-partition controller
  localparam int AC_W   = 8;          // auto-correlator output (MSBs)

  localparam int PHASE_W = 24;        // NCO phase word, 2^PHASE_W = 2*pi
  localparam int ANGLE_W = 16;        // CORDIC angle word, 2^ANGLE_W = 2*pi

  typedef struct packed {
    logic signed [ADC_W-1:0] re;
    logic signed [ADC_W-1:0] im;
  } adc_sample_t;

  typedef struct packed {
    logic signed [COMP_W-1:0] re;
    logic signed [COMP_W-1:0] im;
  } comp_sample_t;

  typedef struct packed {
    logic signed [PART_W-1:0] re;
    logic signed [PART_W-1:0] im;
  } part_sample_t;

  typedef struct packed {
    logic signed [AC_W-1:0] re;
    logic signed [AC_W-1:0] im;
  } ac_result_t;

  // Synchronizer phases, in the order the preamble is processed.
  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,  // waiting for sync_en
    ST_PD      = 3'd1,  // packet detection on raw samples
    ST_CFO     = 3'd2,  // CFO estimation from the next AC result
    ST_MF_WAIT = 3'd3,  // registers switched to compensated samples, wait for symbol start
    ST_MF_CAP  = 3'd4,  // capture 41 samples of one symbol
    ST_MF_RUN  = 3'd5,  // matched filter sweeps all N timings
    ST_PTD     = 3'd6,  // preamble-timing detection on realigned AC results
    ST_DONE    = 3'd7   // locked: FFT window and PS/FS boundary known
  } sync_state_t;

endpackage
