`timescale 1ps / 1fs
// Code density table: histogram, cumulative build and lookup.
//
// This is the engine of both the TDC bin-by-bin calibration and the voltage
// calibration. After a start pulse it
//   1. CLEAR:   writes 0 into all 2^ADDR_W entries of Table A (one per cycle);
//   2. COLLECT: counts N_SAMPLES codes into Table A by read-modify-write
//               (read, add one, write back); a code repeated in the next cycle
//               is taken from the write stage instead of the stale read;
//   3. BUILD:   walks Table A once (2^ADDR_W + 2 cycles), keeping the running
//               sum F of the counts before entry i, and writes
//                 Table B[i] = (F(i-1) + h(i)/2) * 2^OUT_W / N_SAMPLES,
//               the centre of bin i on a scale where 2^OUT_W is the whole
//               range covered by the samples (one clock period for the TDC,
//               the span of the triangular test wave for the voltage tables);
//               with INVERT = 1 the value is mirrored (2^OUT_W - 1 - value);
//   4. READY:   looks up Table B for every valid sample_code: out_value and
//               out_valid follow sample_code/sample_valid by one cycle.
// The division by N_SAMPLES is a multiplication by a constant reciprocal.
// The method and the sizes (1024 entries, 1,024,000 samples, Table A and
// Table B on the two ports of a dual-port memory) follow the document; the
// forwarding, the half-bin centre, the output scale and INVERT are this
// design's choices. rst_n returns to IDLE; the tables themselves are never
// reset (they are memories), which is why CLEAR exists.
module code_density_table #(
  parameter int unsigned ADDR_W    = 10,
  parameter int unsigned COUNT_W   = 20,
  parameter int unsigned OUT_W     = 10,
  parameter int unsigned N_SAMPLES = 1024000,
  parameter bit          INVERT    = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              sample_valid,
  input  logic [ADDR_W-1:0] sample_code,
  output logic              busy,
  output logic              ready,
  output logic              out_valid,
  output logic [OUT_W-1:0]  out_value
);

  localparam int unsigned DEPTH = 1 << ADDR_W;
  localparam int unsigned SHIFT = 32;
  localparam int unsigned ACC_W = COUNT_W + 2;
  // round(2^(SHIFT+OUT_W) / (2*N_SAMPLES))
  localparam longint unsigned MULT =
    ((64'd1 << (SHIFT + OUT_W)) + 64'(N_SAMPLES)) / (64'd2 * 64'(N_SAMPLES));
  localparam logic [OUT_W-1:0] OUT_MAX = '1;

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_COLLECT, S_FLUSH, S_BUILD, S_READY} state_e;
  state_e state;

  logic [COUNT_W-1:0] tab_a [DEPTH];   // histogram (port A)
  logic [OUT_W-1:0]   tab_b [DEPTH];   // calibrated values (port B)

  logic [ADDR_W:0]    idx;             // clear / build index, one extra bit
  logic [COUNT_W-1:0] n_seen;          // samples accepted so far

  // collect pipeline
  logic               p1_v;
  logic [ADDR_W-1:0]  p1_addr;
  logic [COUNT_W-1:0] a_rd;            // Table A read data
  logic               w_v;
  logic [ADDR_W-1:0]  w_addr;
  logic [COUNT_W-1:0] w_data;

  // build pipeline
  logic               b_v;
  logic [ADDR_W-1:0]  b_addr;
  logic [ACC_W-1:0]   cum;             // F: sum of counts before b_addr

  logic take;
  assign take = (state == S_COLLECT) && sample_valid && (n_seen < COUNT_W'(N_SAMPLES));

  // Table A port: one read and one write per cycle
  logic [ADDR_W-1:0]  a_raddr;
  logic               a_we;
  logic [ADDR_W-1:0]  a_waddr;
  logic [COUNT_W-1:0] a_wdata;
  logic [COUNT_W-1:0] inc_val;

  always_comb begin
    inc_val = ((w_v && w_addr == p1_addr) ? w_data : a_rd) + 1'b1;
    a_raddr = (state == S_BUILD) ? idx[ADDR_W-1:0] : sample_code;
    a_we    = 1'b0;
    a_waddr = p1_addr;
    a_wdata = inc_val;
    if (state == S_CLEAR) begin
      a_we    = 1'b1;
      a_waddr = idx[ADDR_W-1:0];
      a_wdata = '0;
    end else if (p1_v) begin
      a_we    = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    a_rd <= tab_a[a_raddr];
    if (a_we) tab_a[a_waddr] <= a_wdata;
  end

  // Table B value of the entry being built
  logic [63:0]        scaled;
  logic [OUT_W-1:0]   b_val;
  always_comb begin
    scaled = ((64'(cum) << 1) + 64'(a_rd)) * MULT >> SHIFT;
    b_val  = (scaled > 64'(OUT_MAX)) ? OUT_MAX : scaled[OUT_W-1:0];
    if (INVERT) b_val = OUT_MAX - b_val;
  end

  always_ff @(posedge clk) begin
    if (b_v) tab_b[b_addr] <= b_val;
    out_value <= tab_b[sample_code];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      idx       <= '0;
      n_seen    <= '0;
      p1_v      <= 1'b0;
      p1_addr   <= '0;
      w_v       <= 1'b0;
      w_addr    <= '0;
      w_data    <= '0;
      b_v       <= 1'b0;
      b_addr    <= '0;
      cum       <= '0;
      out_valid <= 1'b0;
    end else begin
      // collect pipeline registers
      p1_v    <= take;
      p1_addr <= sample_code;
      w_v     <= p1_v;
      w_addr  <= p1_addr;
      w_data  <= inc_val;
      b_v     <= 1'b0;
      out_valid <= (state == S_READY) && sample_valid;

      unique case (state)
        S_IDLE: ;
        S_CLEAR: begin
          idx <= idx + 1'b1;
          if (idx == (ADDR_W+1)'(DEPTH - 1)) begin
            state  <= S_COLLECT;
            n_seen <= '0;
          end
        end
        S_COLLECT: begin
          if (take) n_seen <= n_seen + 1'b1;
          if (n_seen == COUNT_W'(N_SAMPLES)) state <= S_FLUSH;
        end
        S_FLUSH: begin
          // last write of the collect pipeline lands this cycle
          if (!p1_v) begin
            state <= S_BUILD;
            idx   <= '0;
            cum   <= '0;
          end
        end
        S_BUILD: begin
          // cycle k reads entry k; cycle k+1 writes Table B entry k
          if (idx <= (ADDR_W+1)'(DEPTH - 1)) idx <= idx + 1'b1;
          b_v    <= (idx <= (ADDR_W+1)'(DEPTH - 1));
          b_addr <= idx[ADDR_W-1:0];
          if (b_v) cum <= cum + ACC_W'(a_rd);
          if (!b_v && idx == (ADDR_W+1)'(DEPTH)) state <= S_READY;
        end
        S_READY: ;
        default: state <= S_IDLE;
      endcase

      if (start) begin
        state <= S_CLEAR;
        idx   <= '0;
      end
    end
  end

  assign busy  = (state != S_IDLE) && (state != S_READY);
  assign ready = (state == S_READY);

endmodule
