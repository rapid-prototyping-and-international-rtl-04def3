// depuncturer: turns the de-interleaved stream of soft values back into one
// soft pair {X, Y} per trellis step for the Viterbi decoder.
//
// For each step the puncturing pattern of the block's code rate says which
// of X and Y were sent (see ldacs_pkg::punct_keep). Sent values are taken
// from the input in order; punctured ones are filled with 0, the erasure,
// which adds the same cost to both branches of the decoder. After NSTEPS
// pairs (data plus tail) the remaining input values of the CAP-value block,
// the zero padding added by the encoder, are consumed and dropped.
//
// The document only says the inner code is variable-rate; the patterns and
// the erasure value are this design's choice and mirror conv_encoder.
//
// Interface: soft-value input and soft-pair output with valid/ready. `rate`
// is sampled at the first step of each block. A step costs one clock per
// sent value (1 or 2); the output register is loaded in the clock that takes
// the last sent value of the step.
module depuncturer
  import ldacs_pkg::*;
#(
  parameter int unsigned NSTEPS = 4086,
  parameter int unsigned CAP    = 8172
) (
  input  logic       clk,
  input  logic       rst_n,
  input  code_rate_e rate,
  input  logic       in_valid,
  output logic       in_ready,
  input  soft_t      in_soft,
  output logic       out_valid,
  input  logic       out_ready,
  output soft_t      out_x,
  output soft_t      out_y
);

  localparam int unsigned SW = $clog2(NSTEPS + 1);
  localparam int unsigned EW = $clog2(CAP + 1);

  logic          drop_q;                   // in the padding part of the block
  code_rate_e    rate_q;
  code_rate_e    rate_cur;
  logic [SW-1:0] step_q;
  logic [EW-1:0] taken_q;
  logic [1:0]    phase_q;
  logic          sub_q;                    // X of this step already taken
  soft_t         x_q;
  logic [1:0]    keep;
  logic          can_load;
  logic          take;
  logic          last_of_step;

  assign rate_cur     = (step_q == '0 && !sub_q) ? rate : rate_q;
  assign keep         = punct_keep(rate_cur, phase_q);
  assign can_load     = !out_valid || out_ready;
  assign last_of_step = sub_q || !keep[0] || !keep[1];
  assign in_ready     = drop_q || (can_load || !last_of_step);
  assign take         = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      drop_q    <= 1'b0;
      rate_q    <= RATE_1_2;
      step_q    <= '0;
      taken_q   <= '0;
      phase_q   <= '0;
      sub_q     <= 1'b0;
      x_q       <= '0;
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        taken_q <= taken_q + 1'b1;
        if (!drop_q) begin
          if (step_q == '0 && !sub_q) rate_q <= rate;
          if (!last_of_step) begin
            x_q   <= in_soft;
            sub_q <= 1'b1;
          end else begin
            out_valid <= 1'b1;
            if (sub_q) begin
              out_x <= x_q;
              out_y <= in_soft;
            end else if (keep[1]) begin
              out_x <= in_soft;
              out_y <= '0;
            end else begin
              out_x <= '0;
              out_y <= in_soft;
            end
            sub_q   <= 1'b0;
            phase_q <= (phase_q == punct_period(rate_cur) - 1'b1) ? 2'd0 : phase_q + 1'b1;
            step_q  <= step_q + 1'b1;
            if (step_q == SW'(NSTEPS - 1)) drop_q <= 1'b1;
          end
        end
        if (taken_q == EW'(CAP - 1)) begin
          // end of block: restart
          drop_q  <= 1'b0;
          taken_q <= '0;
          step_q  <= '0;
          phase_q <= '0;
          sub_q   <= 1'b0;
        end
      end
    end
  end

endmodule
