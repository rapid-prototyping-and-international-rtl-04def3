// qam_demapper: soft-decision demapper for the Gray-coded QPSK, 16-QAM and
// 64-QAM constellations of qam_mapper, the first step of the demodulation
// chain after the OFDM stage.
//
// For a received axis value y (levels are odd multiples of SCALE) the soft
// value of each bit is the max-log approximation, which for a Gray-coded
// PAM axis reduces to piecewise-linear terms:
//   sign bit            : -y
//   16-QAM  magnitude   : |y| - 2*SCALE
//   64-QAM  magnitude 1 : |y| - 4*SCALE
//   64-QAM  magnitude 2 : ||y| - 4*SCALE| - 2*SCALE
// Positive means "bit is 1". Each value is saturated to the signed SW-bit
// soft range used by the Viterbi decoder. The terms are not scaled by the
// noise variance, which does not change the decisions of a Viterbi decoder
// with a common noise level across the block.
//
// The document only names the demodulation module; the approximation, the
// sign convention and the soft width are this design's choice.
//
// Interface: (I, Q) input and soft-value output with valid/ready. `mod` is
// sampled with each symbol. A symbol yields 2, 4 or 6 soft values on
// consecutive clocks, in the bit order of the mapper.
module qam_demapper
  import ldacs_pkg::*;
#(
  parameter int unsigned SCALE = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mod_e              mod,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic signed [7:0] in_i,
  input  logic signed [7:0] in_q,
  output logic              out_valid,
  input  logic              out_ready,
  output soft_t             out_soft
);

  localparam int S = int'(SCALE);

  soft_t soft_q [6];
  logic [2:0] idx_q;
  logic [2:0] n_q;                         // soft values left in this symbol

  // Soft values of one axis: index 0 sign, 1 and 2 magnitude bits.
  function automatic void axis_soft(input mod_e m, input logic signed [7:0] y,
                                    output soft_t s0, output soft_t s1, output soft_t s2);
    int v, a;
    v  = int'(y);
    a  = (v < 0) ? -v : v;
    s0 = soft_sat(-v);
    s1 = soft_sat(a - ((m == MOD_64QAM) ? 4 * S : 2 * S));
    s2 = soft_sat((((a - 4 * S) < 0) ? (4 * S - a) : (a - 4 * S)) - 2 * S);
  endfunction

  assign in_ready  = (n_q == 0) || (n_q == 1 && out_ready);
  assign out_valid = (n_q != 0);
  assign out_soft  = soft_q[idx_q];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx_q <= '0;
      n_q   <= '0;
      for (int k = 0; k < 6; k++) soft_q[k] <= '0;
    end else begin
      if (out_valid && out_ready) begin
        idx_q <= idx_q + 1'b1;
        n_q   <= n_q - 1'b1;
      end
      if (in_valid && in_ready) begin
        soft_t i0, i1, i2, q0, q1, q2;
        axis_soft(mod, in_i, i0, i1, i2);
        axis_soft(mod, in_q, q0, q1, q2);
        idx_q <= '0;
        n_q   <= bits_per_symbol(mod);
        case (mod)
          MOD_16QAM: begin
            soft_q[0] <= i0; soft_q[1] <= i1; soft_q[2] <= q0; soft_q[3] <= q1;
            soft_q[4] <= '0; soft_q[5] <= '0;
          end
          MOD_64QAM: begin
            soft_q[0] <= i0; soft_q[1] <= i1; soft_q[2] <= i2;
            soft_q[3] <= q0; soft_q[4] <= q1; soft_q[5] <= q2;
          end
          default: begin
            soft_q[0] <= i0; soft_q[1] <= q0;
            for (int k = 2; k < 6; k++) soft_q[k] <= '0;
          end
        endcase
      end
    end
  end

endmodule
