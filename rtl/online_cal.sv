`timescale 1ps / 1fs
// Online (temperature) calibration.
//
// A delay line slows down as the chip warms up, and so does a ring oscillator
// placed next to it. The oscillator count taken when calibration starts is
// stored as f_off; every later count f_on gives the factor f_off/f_on by which
// all bin widths, and therefore every delay measured with them, have grown:
//   delay' = delay * f_off / f_on
// A shared restoring divider computes f_off/f_on and, for the clock edge
// alignment, f_on/f_off, both with FRAC_W fraction bits, after every new count
// (2*(CNT_W+FRAC_W)+2 cycles). Until f_off is stored both ratios are 1.0.
// While enable is high the rising and falling times are multiplied by
// f_off/f_on; otherwise they pass unchanged. The outputs follow the inputs
// by one cycle. The times arrive counted from the earliest instant of the
// delay-line window, i.e. from the far end of the line, so the quantity that
// is scaled is the delay the hit has travelled from the line input,
// 2^T_W - t:  t' = 2^T_W - (2^T_W - t) * f_off/f_on, clamped to 0..2^T_W-1.
// Equation and principle follow the document; the fixed-point format, the
// divider and applying the factor to the calibrated time rather than to each
// bin are this design's choices.
module online_cal #(
  parameter int unsigned CNT_W  = 16,
  parameter int unsigned FRAC_W = 14,
  parameter int unsigned T_W    = 10
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                capture_ref,
  input  logic [CNT_W-1:0]    count,
  input  logic                count_valid,
  input  logic                enable,
  output logic [FRAC_W+1:0]   ratio_off_on,
  output logic [FRAC_W+1:0]   ratio_on_off,
  output logic [CNT_W-1:0]    f_off,
  output logic                ref_ok,
  input  logic                rise_valid,
  input  logic [T_W-1:0]      rise_t,
  input  logic                fall_valid,
  input  logic [T_W-1:0]      fall_t,
  output logic                rise_c_valid,
  output logic [T_W-1:0]      rise_c,
  output logic                fall_c_valid,
  output logic [T_W-1:0]      fall_c
);

  localparam int unsigned DW = CNT_W + FRAC_W;      // dividend width
  localparam int unsigned RW = FRAC_W + 2;          // ratio width
  localparam logic [RW-1:0] ONE = RW'(1) << FRAC_W;
  localparam logic [RW-1:0] RMAX = '1;

  typedef enum logic [1:0] {D_IDLE, D_OFF_ON, D_ON_OFF} div_e;
  div_e div_st;

  logic              armed;
  logic [CNT_W-1:0]  f_on;
  logic [DW-1:0]     dvd;       // dividend, shifted out MSB first
  logic [CNT_W-1:0]  dvs;       // divisor
  logic [CNT_W-1:0]  rem;
  logic [DW-1:0]     quo;
  logic [$clog2(DW+1)-1:0] step;

  logic [CNT_W:0] rem_sh;
  assign rem_sh = {rem, dvd[DW-1]};

  function automatic logic [RW-1:0] sat_ratio(input logic [DW-1:0] q);
    return (q > DW'(RMAX)) ? RMAX : q[RW-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed        <= 1'b0;
      ref_ok       <= 1'b0;
      f_off        <= '0;
      f_on         <= '0;
      div_st       <= D_IDLE;
      dvd          <= '0;
      dvs          <= '0;
      rem          <= '0;
      quo          <= '0;
      step         <= '0;
      ratio_off_on <= ONE;
      ratio_on_off <= ONE;
    end else begin
      if (capture_ref) armed <= 1'b1;
      if (count_valid && armed) begin
        f_off  <= count;
        ref_ok <= 1'b1;
        armed  <= 1'b0;
      end
      unique case (div_st)
        D_IDLE: begin
          if (count_valid && ref_ok && !armed && count != '0 && f_off != '0) begin
            f_on   <= count;
            dvd    <= {f_off, FRAC_W'(0)};
            dvs    <= count;
            rem    <= '0;
            quo    <= '0;
            step   <= '0;
            div_st <= D_OFF_ON;
          end
        end
        D_OFF_ON, D_ON_OFF: begin
          if (step == $bits(step)'(DW)) begin
            if (div_st == D_OFF_ON) begin
              ratio_off_on <= sat_ratio(quo);
              dvd    <= {f_on, FRAC_W'(0)};
              dvs    <= f_off;
              rem    <= '0;
              quo    <= '0;
              step   <= '0;
              div_st <= D_ON_OFF;
            end else begin
              ratio_on_off <= sat_ratio(quo);
              div_st <= D_IDLE;
            end
          end else begin
            step <= step + 1'b1;
            dvd  <= dvd << 1;
            if (rem_sh >= {1'b0, dvs}) begin
              rem <= CNT_W'(rem_sh - {1'b0, dvs});
              quo <= {quo[DW-2:0], 1'b1};
            end else begin
              rem <= rem_sh[CNT_W-1:0];
              quo <= {quo[DW-2:0], 1'b0};
            end
          end
        end
        default: div_st <= D_IDLE;
      endcase
    end
  end

  // Times count from the earliest instant of the delay-line window, which is
  // the far end of the line; the delay the hit has travelled is FULL - t.
  // That delay is scaled: t' = FULL - (FULL - t) * ratio, clamped.
  localparam int unsigned FULL = 1 << T_W;
  function automatic logic [T_W-1:0] correct(input logic [T_W-1:0] t,
                                             input logic [RW-1:0] r);
    logic [T_W+RW:0] d, p;
    d = (T_W+RW+1)'(FULL) - (T_W+RW+1)'(t);
    p = (d * (T_W+RW+1)'(r)) >> FRAC_W;
    if (p >= (T_W+RW+1)'(FULL)) return '0;
    else if (p == '0) return '1;
    else return T_W'((T_W+RW+1)'(FULL) - p);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rise_c_valid <= 1'b0;
      fall_c_valid <= 1'b0;
      rise_c       <= '0;
      fall_c       <= '0;
    end else begin
      rise_c_valid <= rise_valid;
      fall_c_valid <= fall_valid;
      rise_c       <= enable ? correct(rise_t, ratio_off_on) : rise_t;
      fall_c       <= enable ? correct(fall_t, ratio_off_on) : fall_t;
    end
  end

endmodule
