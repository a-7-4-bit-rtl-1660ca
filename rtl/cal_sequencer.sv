`timescale 1ps / 1fs
// Start-up sequencer of the converter.
//
// After reset it steps through the calibrations in order:
//   PH_RESET   : RESET_WAIT cycles;
//   PH_TDC_CAL : sel_ro = 1 (the ring oscillator drives the TDC), pulses
//                bbb_start and capture_ref (the oscillator count of this
//                moment becomes the online-calibration reference), waits for
//                bbb_done;
//   PH_SWITCH  : sel_ro = 0 (comparator), SWITCH_CYCLES cycles for the TDC
//                pipeline to drain;
//   PH_ALIGN   : pulses align_start, waits for align_done or align_fail
//                (a failure is kept in align_failed and the sequence goes on);
//   PH_VCAL    : pulses vcal_start, waits for vcal_done (a triangular wave
//                must be applied during this phase);
//   PH_MEASURE : measure = 1, online tracking active.
// online_en is high from PH_ALIGN on, so that the voltage tables are built
// from times that already carry the online correction.
// The order of the TDC and voltage calibrations and the MUX switching follow
// the document; placing the alignment between them and the wait times are
// this design's choices.
module cal_sequencer
  import slope_adc_pkg::*;
#(
  parameter int unsigned RESET_WAIT    = 16,
  parameter int unsigned SWITCH_CYCLES = 32
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   bbb_done,
  input  logic   align_done,
  input  logic   align_fail,
  input  logic   vcal_done,
  output logic   sel_ro,
  output logic   bbb_start,
  output logic   capture_ref,
  output logic   align_start,
  output logic   vcal_start,
  output logic   online_en,
  output logic   measure,
  output logic   align_failed,
  output phase_e phase
);

  logic [7:0] timer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase        <= PH_RESET;
      timer        <= '0;
      bbb_start    <= 1'b0;
      capture_ref  <= 1'b0;
      align_start  <= 1'b0;
      vcal_start   <= 1'b0;
      align_failed <= 1'b0;
    end else begin
      bbb_start   <= 1'b0;
      capture_ref <= 1'b0;
      align_start <= 1'b0;
      vcal_start  <= 1'b0;
      unique case (phase)
        PH_RESET: begin
          timer <= timer + 1'b1;
          if (timer == 8'(RESET_WAIT - 1)) begin
            phase       <= PH_TDC_CAL;
            bbb_start   <= 1'b1;
            capture_ref <= 1'b1;
            timer       <= '0;
          end
        end
        PH_TDC_CAL: if (bbb_done && !bbb_start) phase <= PH_SWITCH;
        PH_SWITCH: begin
          timer <= timer + 1'b1;
          if (timer == 8'(SWITCH_CYCLES - 1)) begin
            phase       <= PH_ALIGN;
            align_start <= 1'b1;
            timer       <= '0;
          end
        end
        PH_ALIGN: begin
          if (!align_start && (align_done || align_fail)) begin
            align_failed <= align_fail;
            phase        <= PH_VCAL;
            vcal_start   <= 1'b1;
          end
        end
        PH_VCAL:    if (vcal_done && !vcal_start) phase <= PH_MEASURE;
        PH_MEASURE: ;
        default:    phase <= PH_RESET;
      endcase
    end
  end

  assign sel_ro    = (phase == PH_RESET) || (phase == PH_TDC_CAL);
  assign online_en = (phase == PH_ALIGN) || (phase == PH_VCAL) || (phase == PH_MEASURE);
  assign measure   = (phase == PH_MEASURE);

endmodule
