`timescale 1ps / 1fs
// Four-chain TDC core.
//
// The hit drives N_CHAINS tapped delay lines in parallel. For each line the
// 960 captured samples are put in time order (tap_reorder), counted in groups
// of 8 (therm_adder_tree) and searched for the first rising and first falling
// transition (edge_detector). The positions of the chains are then averaged,
// which lowers the quantisation noise; an edge is reported only if every
// chain found it. Positions count delay-line samples from the earliest
// instant of the window, about 1.8 ps each.
// Timing: rise_*/fall_* are updated by the 6th clock edge after the edge at
// which the DFF banks capture the lines (3 adder tree, 2 edge detector,
// 1 average), one result per cycle. The delay lines are behavioural models (tdl_model); everything
// after their DFF banks is synthesizable. Four chains, 60 CARRY8 per chain and
// averaging follow the document; the all-chains rule is this design's choice.
module tdc_core #(
  parameter int unsigned N_CHAINS = 4,
  parameter int unsigned N_CARRY8 = 60,
  parameter int unsigned CODE_W   = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              hit,
  output logic              rise_valid,
  output logic [CODE_W-1:0] rise_code,
  output logic              fall_valid,
  output logic [CODE_W-1:0] fall_code
);

  localparam int unsigned NE = 8 * N_CARRY8;
  localparam int unsigned NT = 2 * NE;
  localparam int unsigned NG = NT / 8;
  localparam int unsigned SUM_W = CODE_W + $clog2(N_CHAINS);

  logic [N_CHAINS-1:0]             c_rv, c_fv, c_ev;
  logic [N_CHAINS-1:0][CODE_W-1:0] c_rp, c_fp;

  for (genvar c = 0; c < int'(N_CHAINS); c++) begin : g_chain
    logic [NE-1:0]        o_q, c_q;
    logic [NT-1:0]        therm;
    logic                 t_valid;
    logic [NG-1:0][3:0]   sums;

    tdl_model #(.N_CARRY8(N_CARRY8), .SEED(c + 1)) u_tdl (
      .clk, .hit, .o_q, .c_q
    );

    tap_reorder #(.N_ELEM(NE)) u_reorder (.o_q, .c_q, .therm);

    therm_adder_tree #(.N_BITS(NT)) u_tree (
      .clk, .rst_n, .in_valid(1'b1), .therm,
      .out_valid(t_valid), .sums
    );

    edge_detector #(.N_GROUPS(NG), .POS_W(CODE_W)) u_edge (
      .clk, .rst_n, .in_valid(t_valid), .sums,
      .out_valid(c_ev[c]),
      .rise_valid(c_rv[c]), .rise_pos(c_rp[c]),
      .fall_valid(c_fv[c]), .fall_pos(c_fp[c])
    );
  end

  logic [SUM_W-1:0] r_sum, f_sum;
  always_comb begin
    r_sum = '0;
    f_sum = '0;
    for (int c = 0; c < int'(N_CHAINS); c++) begin
      r_sum = r_sum + SUM_W'(c_rp[c]);
      f_sum = f_sum + SUM_W'(c_fp[c]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rise_valid <= 1'b0;
      fall_valid <= 1'b0;
      rise_code  <= '0;
      fall_code  <= '0;
    end else begin
      rise_valid <= &c_ev & &c_rv;
      fall_valid <= &c_ev & &c_fv;
      rise_code  <= CODE_W'(r_sum / N_CHAINS);
      fall_code  <= CODE_W'(f_sum / N_CHAINS);
    end
  end

endmodule
