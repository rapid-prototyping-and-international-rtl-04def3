// rs_encoder: systematic Reed-Solomon encoder over GF(2^8), the outer code
// of the LDACS concatenated FEC.
//
// A codeword is RS_K data bytes followed by 2*RS_T parity bytes
// (RS_N = RS_K + 2*RS_T <= 255, i.e. a shortened RS(255, 255-2T) code). The
// parity is the remainder of m(x)*x^(2T) divided by the generator
// g(x) = (x + a^0)(x + a^1)...(x + a^(2T-1)), computed by the usual LFSR of
// 2T byte registers with constant GF multipliers. The first byte of the
// stream is the highest-degree coefficient.
//
// The document gives the structure of the chain (outer RS code ahead of the
// block interleaver) but not the code parameters; RS_K = 239, RS_T = 8 and
// the field/generator conventions are this design's choice.
//
// Interface: valid/ready byte streams. Data bytes pass through with one
// register of latency while the parity is updated; after the RS_K-th data
// byte the input is held off for 2*RS_T cycles while the parity bytes are
// shifted out. Throughput: RS_N output bytes per RS_N clocks.
module rs_encoder
  import ldacs_pkg::*;
#(
  parameter int unsigned RS_K = 239,
  parameter int unsigned RS_T = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_data
);

  localparam int unsigned NR = 2 * RS_T;

  gf_t gcoef [NR];
  for (genvar i = 0; i < NR; i++) begin : g_coef
    assign gcoef[i] = rs_gen_coef(NR, i);
  end

  gf_t par_q [NR];
  logic [$clog2(RS_K+1)-1:0] dcnt_q;
  logic [$clog2(NR+1)-1:0]   pcnt_q;
  logic                      parity_phase_q;
  logic                      can_load;

  assign can_load = !out_valid || out_ready;
  assign in_ready = !parity_phase_q && can_load;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NR; i++) par_q[i] <= '0;
      dcnt_q         <= '0;
      pcnt_q         <= '0;
      parity_phase_q <= 1'b0;
      out_valid      <= 1'b0;
      out_data       <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (!parity_phase_q) begin
        if (in_valid && can_load) begin
          gf_t fb;
          fb = in_data ^ par_q[NR-1];
          for (int i = NR - 1; i >= 1; i--) par_q[i] <= par_q[i-1] ^ gf_mul(fb, gcoef[i]);
          par_q[0]  <= gf_mul(fb, gcoef[0]);
          out_valid <= 1'b1;
          out_data  <= in_data;
          if (dcnt_q == $bits(dcnt_q)'(RS_K - 1)) begin
            dcnt_q         <= '0;
            parity_phase_q <= 1'b1;
          end else begin
            dcnt_q <= dcnt_q + 1'b1;
          end
        end
      end else if (can_load) begin
        out_valid <= 1'b1;
        out_data  <= par_q[NR-1];
        for (int i = NR - 1; i >= 1; i--) par_q[i] <= par_q[i-1];
        par_q[0] <= '0;
        if (pcnt_q == $bits(pcnt_q)'(NR - 1)) begin
          pcnt_q         <= '0;
          parity_phase_q <= 1'b0;
        end else begin
          pcnt_q <= pcnt_q + 1'b1;
        end
      end
    end
  end

endmodule
