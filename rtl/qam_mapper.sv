// qam_mapper: maps coded bits onto Gray-coded QPSK, 16-QAM or 64-QAM
// symbols, the last step of the modulation chain before the OFDM stage.
//
// Bits arrive one per clock. 2, 4 or 6 of them form a symbol: the first half
// select the in-phase level, the second half the quadrature level. Per axis
// the first bit is the sign (0: positive) and the remaining bits pick the
// magnitude along a Gray sequence:
//   16-QAM  b1: 0 -> 1, 1 -> 3
//   64-QAM  b1 b2: 01 -> 1, 00 -> 3, 10 -> 5, 11 -> 7
// so neighbouring levels differ in exactly one bit. Levels are output as
// signed integers scaled by SCALE (odd multiples of SCALE); normalisation of
// the average power is left to the analog front end.
//
// The document names QPSK and 64-QAM among the coding and modulation
// schemes; the bit-to-level map, the scaling and 16-QAM support are this
// design's choice.
//
// Interface: bit input and (I, Q) output with valid/ready. `mod` is sampled
// with the first bit of each symbol. A symbol is emitted one clock after its
// last bit; one extra clock per symbol.
module qam_mapper
  import ldacs_pkg::*;
#(
  parameter int unsigned SCALE = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mod_e              mod,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic              in_bit,
  output logic              out_valid,
  input  logic              out_ready,
  output logic signed [7:0] out_i,
  output logic signed [7:0] out_q
);

  mod_e       mod_q;
  mod_e       mod_cur;
  logic [5:0] bits_q;                      // bits_q[k] = k-th bit of the symbol
  logic [2:0] cnt_q;
  logic [2:0] bps;
  logic       full;
  logic       can_load;

  assign mod_cur  = (cnt_q == 0) ? mod : mod_q;
  assign bps      = bits_per_symbol(mod_cur);
  assign full     = (cnt_q == bps);
  assign can_load = !out_valid || out_ready;
  assign in_ready = !full;

  // Level of one axis from its bits (a[0] first).
  function automatic logic signed [7:0] axis_level(input mod_e m, input logic [2:0] a);
    int mag;
    case (m)
      MOD_16QAM: mag = a[1] ? 3 : 1;
      MOD_64QAM: case ({a[1], a[2]})
                   2'b01:   mag = 1;
                   2'b00:   mag = 3;
                   2'b10:   mag = 5;
                   default: mag = 7;
                 endcase
      default:   mag = 1;
    endcase
    mag = mag * int'(SCALE);
    return 8'(a[0] ? -mag : mag);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mod_q     <= MOD_QPSK;
      bits_q    <= '0;
      cnt_q     <= '0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (cnt_q == 0) mod_q <= mod;
        bits_q[cnt_q] <= in_bit;
        cnt_q         <= cnt_q + 1'b1;
      end
      if (full && can_load) begin
        out_valid <= 1'b1;
        case (mod_q)
          MOD_16QAM: begin
            out_i <= axis_level(mod_q, {1'b0, bits_q[1], bits_q[0]});
            out_q <= axis_level(mod_q, {1'b0, bits_q[3], bits_q[2]});
          end
          MOD_64QAM: begin
            out_i <= axis_level(mod_q, {bits_q[2], bits_q[1], bits_q[0]});
            out_q <= axis_level(mod_q, {bits_q[5], bits_q[4], bits_q[3]});
          end
          default: begin
            out_i <= axis_level(mod_q, {2'b00, bits_q[0]});
            out_q <= axis_level(mod_q, {2'b00, bits_q[1]});
          end
        endcase
        cnt_q <= '0;
      end
    end
  end

endmodule
