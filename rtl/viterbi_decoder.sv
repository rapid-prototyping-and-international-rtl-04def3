// viterbi_decoder: block soft-decision Viterbi decoder for the zero-
// terminated K=7 (64-state) convolutional code of conv_encoder.
//
// Forward pass: for every trellis step, all 64 add-compare-select (ACS)
// operations are done in the same clock. For next state n (input bit
// u = n[5]) the two predecessors are {n[4:0], 0} and {n[4:0], 1}; each
// candidate is the predecessor's path metric plus the branch metric
//   bm = d(x, X) + d(y, Y),  d(s, 1) = SOFT_MAX - s, d(s, 0) = SOFT_MAX + s,
// where X, Y are the branch's coded bits and x, y the received soft values
// (an erasure, 0, costs the same on both branches). The smaller candidate
// survives; its decision bit (which predecessor) is kept. The 64 decision
// bits of a step are written as ONE 64-bit word of the path memory, which is
// therefore split across all states rather than stored as an array that
// only allows two accesses per clock. This is the arrangement the document
// credits with cutting the decoder latency by a factor of about 32. Path
// metrics are PMW-bit unsigned numbers compared modulo 2^PMW, so they never
// need normalising.
//
// Traceback: the encoder ends in state 0 after its six tail bits, so the
// traceback starts from state 0 at the last step and walks back one step per
// clock: the decoded bit of step k is bit 5 of the state, the predecessor is
// {state[4:0], decision}. Decoded bits are packed into bytes on the way back
// and written to an output buffer; tail bits are dropped. The bytes are then
// streamed out in order.
//
// The document gives the algorithm (ACS for all states, path memory stored
// for traceback, 64 parallel accesses after partitioning); the soft metric,
// metric width and the full-block traceback are this design's choice.
//
// Interface: one soft pair per trellis step in, decoded bytes out, both
// valid/ready. Timing per block: NSTEPS clocks of ACS (one step per clock
// while input is valid), NSTEPS clocks of traceback, then NSTEPS/8 bytes.
module viterbi_decoder
  import ldacs_pkg::*;
#(
  parameter int unsigned NSTEPS = 4086,
  parameter int unsigned PMW    = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  soft_t      in_x,
  input  soft_t      in_y,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_data,
  output logic       busy_tb               // high during the traceback
);

  localparam int unsigned NBITS  = NSTEPS - CC_M;
  localparam int unsigned NBYTES = NBITS / 8;
  localparam int unsigned SW     = $clog2(NSTEPS + 1);
  localparam int unsigned BW     = $clog2(NBYTES + 1);
  localparam logic [PMW-1:0] PM_BIAS = PMW'(1 << (PMW - 3));

  typedef enum logic [1:0] {S_ACS, S_TB, S_OUT} state_e;

  state_e                 state_q;
  logic [PMW-1:0]         pm_q [CC_STATES];
  logic [PMW-1:0]         pm_d [CC_STATES];
  logic [CC_STATES-1:0]   dec;
  logic [CC_STATES-1:0]   pmem [NSTEPS];   // one word = all decisions of a step
  logic [7:0]             obuf [NBYTES];
  logic [SW-1:0]          step_q;
  logic [CC_M-1:0]        st_q;
  logic [7:0]             sh_q;
  logic [BW-1:0]          oidx_q;
  logic                   can_load;

  function automatic logic [PMW-1:0] bdist(input soft_t s, input logic b);
    int v;
    v = b ? (SOFT_MAX - int'(s)) : (SOFT_MAX + int'(s));
    return PMW'(v);
  endfunction

  // All 64 add-compare-select units.
  always_comb begin
    for (int n = 0; n < CC_STATES; n++) begin
      logic [CC_M-1:0] p0, p1;
      logic [1:0]      e0, e1;
      logic [PMW-1:0]  c0, c1, diff;
      logic            u;
      u    = n[CC_M-1];
      p0   = {n[CC_M-2:0], 1'b0};
      p1   = {n[CC_M-2:0], 1'b1};
      e0   = cc_out({u, p0});
      e1   = cc_out({u, p1});
      c0   = pm_q[p0] + bdist(in_x, e0[1]) + bdist(in_y, e0[0]);
      c1   = pm_q[p1] + bdist(in_x, e1[1]) + bdist(in_y, e1[0]);
      diff = c1 - c0;
      dec[n]  = diff[PMW-1];               // c1 < c0 (modulo compare)
      pm_d[n] = dec[n] ? c1 : c0;
    end
  end

  assign in_ready = (state_q == S_ACS);
  assign busy_tb  = (state_q == S_TB);
  assign can_load = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) pmem[step_q] <= dec;
  end

  always_ff @(posedge clk) begin
    if (state_q == S_TB && step_q < SW'(NBITS) && step_q[2:0] == 3'd0)
      obuf[(BW)'(step_q >> 3)] <= {st_q[CC_M-1], sh_q[7:1]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q   <= S_ACS;
      for (int n = 0; n < CC_STATES; n++) pm_q[n] <= (n == 0) ? '0 : PM_BIAS;
      step_q    <= '0;
      st_q      <= '0;
      sh_q      <= '0;
      oidx_q    <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      case (state_q)
        S_ACS: if (in_valid) begin
          pm_q <= pm_d;
          if (step_q == SW'(NSTEPS - 1)) begin
            state_q <= S_TB;
            st_q    <= '0;
          end else begin
            step_q <= step_q + 1'b1;
          end
        end
        S_TB: begin
          sh_q <= {st_q[CC_M-1], sh_q[7:1]};
          st_q <= {st_q[CC_M-2:0], pmem[step_q][st_q]};
          if (step_q == '0) begin
            state_q <= S_OUT;
            oidx_q  <= '0;
          end else begin
            step_q <= step_q - 1'b1;
          end
        end
        default: if (can_load) begin
          out_valid <= 1'b1;
          out_data  <= obuf[oidx_q];
          if (oidx_q == BW'(NBYTES - 1)) begin
            state_q <= S_ACS;
            step_q  <= '0;
            for (int n = 0; n < CC_STATES; n++) pm_q[n] <= (n == 0) ? '0 : PM_BIAS;
          end else begin
            oidx_q <= oidx_q + 1'b1;
          end
        end
      endcase
    end
  end

endmodule
