`timescale 1ps / 1fs
// Shared constants and types of the FPGA slope ADC.
//
// The ADC compares the analog input with an RC slope made by an output buffer,
// measures the times of the comparator's two edges in every 600 MHz period
// with four tapped-delay-line TDCs, and corrects the measured times with a
// chain of calibrations (bin-by-bin code density, ring-oscillator based online
// correction, clock edge alignment, voltage lookup). The sizes below are the
// main configuration: 60 CARRY8 per chain (480 elements, 960 samples with
// double sampling), groups of 8 samples in the encoder, four chains,
// 1024-entry calibration tables and 1,024,000 samples per code density test.
// Widths of codes and counters are this design's own choices. A module
// that imports the package for phase_e alone leaves the other constants
// unused, which lint reports as unused parameters.
package slope_adc_pkg;

  localparam int unsigned N_CHAINS    = 4;        // parallel delay lines
  localparam int unsigned N_CARRY8    = 60;       // CARRY8 per delay line
  localparam int unsigned N_ELEM      = 8 * N_CARRY8;   // 480 MUX stages
  localparam int unsigned N_TAPS      = 2 * N_ELEM;     // 960 samples (O and C)
  localparam int unsigned GROUP       = 8;        // samples per encoder group
  localparam int unsigned N_GROUPS    = N_TAPS / GROUP; // 120 groups
  localparam int unsigned CODE_W      = 10;       // TDC position / table address
  localparam int unsigned VCODE_W     = 10;       // voltage code width
  localparam int unsigned TAP_W       = 9;        // IDELAYE3 / ODELAYE3 setting
  localparam int unsigned FCNT_W      = 16;       // ring oscillator count
  localparam int unsigned FRAC_W      = 14;       // fraction bits of f_off/f_on
  localparam int unsigned RATIO_W     = FRAC_W + 2;
  localparam int unsigned N_CAL       = 1024000;  // samples per code density test
  localparam int unsigned GATE_CYCLES = 16384;    // frequency counter window

  // Start-up phases of the converter.
  typedef enum logic [2:0] {
    PH_RESET   = 3'd0,   // waiting after reset
    PH_TDC_CAL = 3'd1,   // ring oscillator into the TDC, bin-by-bin calibration
    PH_SWITCH  = 3'd2,   // MUX switched to the comparator, pipeline drains
    PH_ALIGN   = 3'd3,   // clock edge alignment
    PH_VCAL    = 3'd4,   // voltage calibration with a triangular input
    PH_MEASURE = 3'd5    // measurement with online calibration
  } phase_e;

endpackage
