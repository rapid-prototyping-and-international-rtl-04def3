// conv_encoder: zero-terminated, punctured convolutional encoder, the inner
// code of the LDACS FEC.
//
// A block is NBYTES bytes (the interleaved RS codewords), taken MSB first.
// Each bit u enters a rate-1/2, constraint-length-7 encoder (generators 171
// and 133 octal) whose state is the last six input bits; after the data, six
// zero tail bits drive the encoder back to state 0 so the decoder can start
// its traceback there. The two coded bits {X, Y} of each trellis step are
// punctured according to the rate selected for the block (1/2: XY,
// 2/3: X1 Y1 Y2, 3/4: X1 Y1 Y2 X3). The coded stream is then padded with
// zeros up to CAP bits, the size of the following helical interleaver.
//
// The document states that the convolutional code is variable-rate and
// zero-terminated; the generators, the puncturing patterns and the zero
// padding to a fixed block size are this design's choice.
//
// Interface: byte input and bit output, valid/ready. `rate` is sampled at
// the start of each block. Timing: one coded bit per clock when the output
// is ready, plus one idle clock per input byte; a block takes about
// CAP + NBYTES clocks.
module conv_encoder
  import ldacs_pkg::*;
#(
  parameter int unsigned NBYTES = 510,
  parameter int unsigned CAP    = 8172
) (
  input  logic       clk,
  input  logic       rst_n,
  input  code_rate_e rate,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       out_bit
);

  localparam int unsigned NBITS  = NBYTES * 8;
  localparam int unsigned NSTEPS = NBITS + CC_M;
  localparam int unsigned SW     = $clog2(NSTEPS + 1);
  localparam int unsigned EW     = $clog2(CAP + 1);

  typedef enum logic {S_CODE, S_PAD} state_e;

  state_e          state_q;
  code_rate_e      rate_q;
  logic [7:0]      byte_q;
  logic [3:0]      bits_left_q;
  logic [CC_M-1:0] sr_q;                   // sr_q[5] = most recent input bit
  logic [SW-1:0]   step_q;
  logic [EW-1:0]   emitted_q;
  logic [1:0]      phase_q;
  logic            sub_q;                  // 1: X of this step already sent

  logic       in_data_phase;
  logic       have_bit;
  logic       u;
  logic [1:0] xy;
  logic [1:0] keep;
  logic       last_of_step;
  logic       fire;
  code_rate_e rate_cur;

  // At the first step of a block the live `rate` input applies.
  assign rate_cur      = (step_q == '0 && !sub_q) ? rate : rate_q;
  assign in_data_phase = step_q < SW'(NBITS);
  assign have_bit      = !in_data_phase || (bits_left_q != 0);
  assign u             = in_data_phase ? byte_q[7] : 1'b0;
  assign xy            = cc_out({u, sr_q});
  assign keep          = punct_keep(rate_cur, phase_q);
  assign last_of_step  = sub_q || !keep[0] || !keep[1];

  assign in_ready  = (state_q == S_CODE) && in_data_phase && (bits_left_q == 0);
  assign out_valid = (state_q == S_PAD) || have_bit;
  assign out_bit   = (state_q == S_PAD) ? 1'b0
                   : (!sub_q && keep[1]) ? xy[1] : xy[0];
  assign fire      = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q     <= S_CODE;
      rate_q      <= RATE_1_2;
      byte_q      <= '0;
      bits_left_q <= '0;
      sr_q        <= '0;
      step_q      <= '0;
      emitted_q   <= '0;
      phase_q     <= '0;
      sub_q       <= 1'b0;
    end else begin
      if (in_valid && in_ready) begin
        byte_q      <= in_data;
        bits_left_q <= 4'd8;
      end
      if (fire) begin
        emitted_q <= emitted_q + 1'b1;
        if (state_q == S_PAD) begin
          if (emitted_q == EW'(CAP - 1)) begin
            state_q   <= S_CODE;
            emitted_q <= '0;
            step_q    <= '0;
            sr_q      <= '0;
            phase_q   <= '0;
          end
        end else begin
          if (step_q == '0 && !sub_q) rate_q <= rate;
          if (last_of_step) begin
            sub_q   <= 1'b0;
            sr_q    <= {u, sr_q[CC_M-1:1]};
            phase_q <= (phase_q == punct_period(rate_cur) - 1'b1) ? 2'd0 : phase_q + 1'b1;
            step_q  <= step_q + 1'b1;
            if (in_data_phase) begin
              byte_q      <= {byte_q[6:0], 1'b0};
              bits_left_q <= bits_left_q - 1'b1;
            end
            if (step_q == SW'(NSTEPS - 1)) begin
              if (emitted_q == EW'(CAP - 1)) begin
                // coded bits fill the block exactly: no padding
                emitted_q <= '0;
                step_q    <= '0;
                sr_q      <= '0;
                phase_q   <= '0;
              end else begin
                state_q <= S_PAD;
              end
            end
          end else begin
            sub_q <= 1'b1;
          end
        end
      end
    end
  end

endmodule
