`timescale 1ps / 1fs
// Clock edge alignment calibration.
//
// Both comparator edges of one period must fall inside the same delay-line
// window, and the pulse between them should sit in the middle of the line.
// The launching clock of the slope passes through a programmable output delay
// (odelay_tap) and the comparator output through a programmable input delay
// (idelay_tap) before the delay lines.
// Foreground alignment, after a start pulse: wait SETTLE cycles, then average
// the pulse centre (rise+fall)/2 over 2^AVG_LOG2 samples that show a rising
// edge before a falling edge. A centre above TARGET+TOL moves odelay_tap one
// tap down, one below TARGET-TOL one tap up; inside the band the alignment is
// done. If no such pulse shows within TIMEOUT cycles the output delay jumps by
// SEARCH_STEP taps; after a full sweep of the tap range without success, or
// 2^TAP_W servo steps, fail is raised.
// Tracking, while track is high:
//   idelay_tap = round((odelay_tap + IDELAY_INIT) * f_on/f_off) - odelay_tap
// (f_on/f_off is the ratio from the online calibration), so that the sum of
// both programmable delays keeps its length in time when their taps slow down
// with temperature like the ring oscillator does; otherwise the slope would
// drift against the sampling clock. Otherwise idelay_tap = IDELAY_INIT.
// Alignment to the middle of the line, using the two programmable delays and
// tracking with the online-calibration ratio follow the document; the search,
// the servo and which delay serves which purpose are this design's choices.
module align_cal #(
  parameter int unsigned CODE_W      = 10,
  parameter int unsigned TAP_W       = 9,
  parameter int unsigned FRAC_W      = 14,
  parameter int unsigned TARGET      = 480,
  parameter int unsigned TOL         = 8,
  parameter int unsigned AVG_LOG2    = 4,
  parameter int unsigned SETTLE      = 32,
  parameter int unsigned TIMEOUT     = 256,
  parameter int unsigned SEARCH_STEP = 8,
  parameter int unsigned IDELAY_INIT = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              rise_valid,
  input  logic [CODE_W-1:0] rise_code,
  input  logic              fall_valid,
  input  logic [CODE_W-1:0] fall_code,
  input  logic [FRAC_W+1:0] ratio_on_off,
  input  logic              track,
  output logic [TAP_W-1:0]  odelay_tap,
  output logic [TAP_W-1:0]  idelay_tap,
  output logic              done,
  output logic              fail
);

  localparam int unsigned ACC_W = CODE_W + 1 + AVG_LOG2;
  localparam int unsigned CNT_W = $clog2(TIMEOUT + SETTLE + 1) + 1;
  localparam int unsigned HI2   = 2 * (TARGET + TOL);   // limits on rise+fall
  localparam int unsigned LO2   = 2 * (TARGET - TOL);

  typedef enum logic [2:0] {A_IDLE, A_SETTLE, A_ACC, A_DONE, A_FAIL} state_e;
  state_e state;

  logic [CNT_W-1:0]    timer;
  logic [AVG_LOG2:0]   n_acc;
  logic [ACC_W-1:0]    acc;
  logic [TAP_W:0]      searched;   // taps swept without a pulse
  logic [TAP_W:0]      servo_steps;

  logic              pulse_ok;
  logic [CODE_W:0]   centre2;      // rise + fall
  logic [CODE_W:0]   avg2;
  assign pulse_ok = rise_valid && fall_valid && (rise_code < fall_code);
  assign centre2  = {1'b0, rise_code} + {1'b0, fall_code};
  assign avg2     = (CODE_W+1)'(acc >> AVG_LOG2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= A_IDLE;
      odelay_tap  <= '0;
      timer       <= '0;
      n_acc       <= '0;
      acc         <= '0;
      searched    <= '0;
      servo_steps <= '0;
    end else begin
      unique case (state)
        A_IDLE: ;
        A_SETTLE: begin
          timer <= timer + 1'b1;
          if (timer == CNT_W'(SETTLE - 1)) begin
            state <= A_ACC;
            timer <= '0;
            n_acc <= '0;
            acc   <= '0;
          end
        end
        A_ACC: begin
          timer <= timer + 1'b1;
          if (n_acc == (AVG_LOG2+1)'(1 << AVG_LOG2)) begin
            searched <= '0;
            timer    <= '0;
            if (avg2 > (CODE_W+1)'(HI2)) begin
              odelay_tap  <= odelay_tap - 1'b1;
              servo_steps <= servo_steps + 1'b1;
              state       <= A_SETTLE;
            end else if (avg2 < (CODE_W+1)'(LO2)) begin
              odelay_tap  <= odelay_tap + 1'b1;
              servo_steps <= servo_steps + 1'b1;
              state       <= A_SETTLE;
            end else begin
              state <= A_DONE;
            end
            if (servo_steps == (TAP_W+1)'(1 << TAP_W)) state <= A_FAIL;
          end else if (timer == CNT_W'(TIMEOUT)) begin
            odelay_tap <= odelay_tap + TAP_W'(SEARCH_STEP);
            searched   <= searched + (TAP_W+1)'(SEARCH_STEP);
            timer      <= '0;
            state      <= (searched >= (TAP_W+1)'(1 << TAP_W)) ? A_FAIL : A_SETTLE;
          end else if (pulse_ok) begin
            acc   <= acc + ACC_W'(centre2);
            n_acc <= n_acc + 1'b1;
          end
        end
        A_DONE: ;
        A_FAIL: ;
        default: state <= A_IDLE;
      endcase
      if (start) begin
        state       <= A_SETTLE;
        timer       <= '0;
        searched    <= '0;
        servo_steps <= '0;
      end
    end
  end

  assign done = (state == A_DONE);
  assign fail = (state == A_FAIL);

  // input delay tracking
  localparam int unsigned SW = TAP_W + FRAC_W + 3;
  logic [SW-1:0] tot_scaled;   // (odelay + IDELAY_INIT) * f_on/f_off, rounded
  logic [SW-1:0] id_scaled;
  assign tot_scaled = ((SW'(odelay_tap) + SW'(IDELAY_INIT)) * SW'(ratio_on_off)
                       + SW'(1 << (FRAC_W - 1))) >> FRAC_W;
  assign id_scaled  = tot_scaled - SW'(odelay_tap);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) idelay_tap <= TAP_W'(IDELAY_INIT);
    else if (track) begin
      if (tot_scaled <= SW'(odelay_tap))          idelay_tap <= '0;
      else if (id_scaled > SW'({TAP_W{1'b1}}))    idelay_tap <= '1;
      else                                        idelay_tap <= id_scaled[TAP_W-1:0];
    end
    else
      idelay_tap <= TAP_W'(IDELAY_INIT);
  end

endmodule
