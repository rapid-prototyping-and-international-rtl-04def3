// rs_decoder: receive-side Reed-Solomon decoder for the codewords of
// rs_encoder. It corrects up to RS_T byte errors per codeword, forwards the
// RS_K data bytes and drops the parity.
//
// Phases, one codeword at a time (single codeword buffer):
//   S_IN   RS_N clocks (one per accepted byte). Bytes are stored, and the 2T
//          syndromes S_j = c(alpha^j), j = 0 .. 2T-1, are accumulated by
//          Horner's rule (S_j <- S_j * alpha^j + byte).
//   S_BM   2T clocks of Berlekamp-Massey, one iteration per clock, giving the
//          error-locator polynomial Lambda(x) (degree L). The correction
//          polynomial is kept pre-multiplied by x^m, so an iteration is a
//          discrepancy sum, one inverse and one multiply-add per coefficient.
//   S_OM   1 clock: error evaluator Omega(x) = S(x) Lambda(x) mod x^T.
//   S_CNT  RS_N clocks of Chien search. The byte at buffer index p is the
//          coefficient of x^(N-1-p), so its location is X = alpha^(N-1-p).
//          The terms lambda_j X^-j are stepped by alpha^j each clock. Roots
//          are counted, and the codeword is decodable if the count equals L
//          and L <= T.
//   S_OUT  RS_K output bytes. The Chien search runs again. At a root the error
//          value is e = Omega(X^-1) / sum_{j odd} lambda_j X^-j (Forney, for
//          first root alpha^0), and e is added to the byte. Nothing is
//          changed in a codeword that cannot be decoded.
// err_valid pulses once per codeword, in the clock S_OUT begins. err = 1
// means the codeword could not be decoded, and its bytes are passed on as
// received. nfix gives the number of corrected bytes (data and parity).
//
// The document says only that the receive side undoes the transmit chain
// in reverse order. The decoding algorithm (BM, Chien, Forney) and the
// phase structure are this design's choice.
//
// Interface: valid/ready byte streams. in_ready is high only in S_IN.
// A codeword costs RS_N + 2T + 1 + RS_N clocks plus RS_K output clocks
// (at the defaults 255 + 16 + 1 + 255 + 239 = 766).
module rs_decoder
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
  output logic [7:0] out_data,
  output logic       err_valid,
  output logic       err,
  output logic [$clog2(RS_T+1)-1:0] nfix
);

  localparam int unsigned NR   = 2 * RS_T;
  localparam int unsigned RS_N = RS_K + NR;
  localparam int unsigned CW   = $clog2(RS_N + 1);
  localparam int unsigned LW   = $clog2(NR + 1);
  localparam int unsigned NW   = $clog2(NR);
  localparam int unsigned FW   = $clog2(RS_T + 1);

  typedef enum logic [2:0] {S_IN, S_BM, S_OM, S_CNT, S_OUT} state_e;

  // alpha^j (syndrome roots, Chien steps) and alpha^(-j(N-1)) (Chien start).
  gf_t root   [NR];
  gf_t cstart [RS_T+1];
  for (genvar j = 0; j < NR; j++) begin : g_root
    assign root[j] = gf_pow_alpha(j);
  end
  for (genvar j = 0; j <= RS_T; j++) begin : g_cstart
    assign cstart[j] = gf_pow_alpha((j * (255 - ((RS_N - 1) % 255))) % 255);
  end

  state_e          state_q;
  gf_t             buf_q [RS_N];
  gf_t             syn_q [NR];
  gf_t             lam_q [RS_T+1];       // Lambda(x), lam_q[0] = 1
  gf_t             bx_q  [RS_T+1];       // x^m * B(x)
  gf_t             binv_q;               // 1 / last non-zero discrepancy
  logic [LW-1:0]   len_q;                // L
  logic [NW-1:0]   n_q;                  // BM iteration
  gf_t             om_q  [RS_T];         // Omega(x)
  gf_t             lt_q  [RS_T+1];       // Chien terms lambda_j X^-j
  gf_t             ot_q  [RS_T];         // Chien terms omega_j X^-j
  logic [CW-1:0]   cnt_q;
  logic [LW-1:0]   roots_q;
  logic            ok_q;

  // ---- Berlekamp-Massey step (combinational) ----
  gf_t disc;
  gf_t coef;
  gf_t lam_d [RS_T+1];
  always_comb begin
    disc = '0;
    for (int i = 0; i <= RS_T; i++)
      if (i <= int'(n_q)) disc = disc ^ gf_mul(lam_q[i], syn_q[int'(n_q) - i]);
    coef = gf_mul(disc, binv_q);
    for (int i = 0; i <= RS_T; i++) lam_d[i] = lam_q[i] ^ gf_mul(coef, bx_q[i]);
  end

  // ---- Chien search and Forney error value (combinational) ----
  gf_t  lsum, lodd, osum, evalue;
  logic is_root;
  always_comb begin
    lsum = '0;
    lodd = '0;
    osum = '0;
    for (int j = 0; j <= RS_T; j++) begin
      lsum = lsum ^ lt_q[j];
      if (j % 2 == 1) lodd = lodd ^ lt_q[j];
    end
    for (int j = 0; j < RS_T; j++) osum = osum ^ ot_q[j];
    is_root = (lsum == '0);
    evalue  = gf_mul(osum, gf_inv(lodd));
  end

  logic can_load;
  logic decodable;
  assign can_load  = !out_valid || out_ready;
  assign in_ready  = (state_q == S_IN);
  assign decodable = (roots_q + LW'(is_root) == len_q) && (len_q <= LW'(RS_T));

  always_ff @(posedge clk) begin
    if (state_q == S_IN && in_valid) buf_q[cnt_q] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q   <= S_IN;
      for (int j = 0; j < NR; j++) syn_q[j] <= '0;
      for (int i = 0; i <= RS_T; i++) begin
        lam_q[i] <= '0;
        bx_q[i]  <= '0;
        lt_q[i]  <= '0;
      end
      for (int i = 0; i < RS_T; i++) begin
        om_q[i] <= '0;
        ot_q[i] <= '0;
      end
      binv_q    <= 8'h01;
      len_q     <= '0;
      n_q       <= '0;
      cnt_q     <= '0;
      roots_q   <= '0;
      ok_q      <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      err_valid <= 1'b0;
      err       <= 1'b0;
      nfix      <= '0;
    end else begin
      err_valid <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      case (state_q)
        S_IN: if (in_valid) begin
          for (int j = 0; j < NR; j++) syn_q[j] <= gf_mul(syn_q[j], root[j]) ^ in_data;
          if (cnt_q == CW'(RS_N - 1)) begin
            cnt_q   <= '0;
            state_q <= S_BM;
            n_q     <= '0;
            len_q   <= '0;
            binv_q  <= 8'h01;
            for (int i = 0; i <= RS_T; i++) begin
              lam_q[i] <= (i == 0) ? 8'h01 : 8'h00;
              bx_q[i]  <= (i == 1) ? 8'h01 : 8'h00;
            end
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        S_BM: begin
          if (disc != '0) begin
            for (int i = 0; i <= RS_T; i++) lam_q[i] <= lam_d[i];
          end
          if (disc != '0 && 2 * int'(len_q) <= int'(n_q)) begin
            // length change: B <- old Lambda, remembered with one shift
            for (int i = 0; i <= RS_T; i++) bx_q[i] <= (i == 0) ? 8'h00 : lam_q[i-1];
            len_q  <= LW'(int'(n_q) + 1 - int'(len_q));
            binv_q <= gf_inv(disc);
          end else begin
            for (int i = 0; i <= RS_T; i++) bx_q[i] <= (i == 0) ? 8'h00 : bx_q[i-1];
          end
          if (n_q == NW'(NR - 1)) state_q <= S_OM;
          else                    n_q <= n_q + 1'b1;
        end
        S_OM: begin
          for (int k = 0; k < RS_T; k++) begin
            gf_t acc;
            acc = '0;
            for (int i = 0; i <= k; i++) acc = acc ^ gf_mul(lam_q[i], syn_q[k - i]);
            om_q[k] <= acc;
            ot_q[k] <= gf_mul(acc, cstart[k]);
          end
          for (int j = 0; j <= RS_T; j++) lt_q[j] <= gf_mul(lam_q[j], cstart[j]);
          roots_q <= '0;
          cnt_q   <= '0;
          state_q <= S_CNT;
        end
        S_CNT: begin
          if (is_root) roots_q <= roots_q + 1'b1;
          for (int j = 0; j <= RS_T; j++) lt_q[j] <= gf_mul(lt_q[j], gf_pow_alpha(j));
          if (cnt_q == CW'(RS_N - 1)) begin
            ok_q      <= decodable;
            err_valid <= 1'b1;
            err       <= !decodable;
            nfix      <= decodable ? FW'(len_q) : '0;
            cnt_q     <= '0;
            state_q   <= S_OUT;
            for (int j = 0; j <= RS_T; j++) lt_q[j] <= gf_mul(lam_q[j], cstart[j]);
            for (int k = 0; k < RS_T; k++)  ot_q[k] <= gf_mul(om_q[k], cstart[k]);
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        default: if (can_load) begin       // S_OUT
          out_valid <= 1'b1;
          out_data  <= buf_q[cnt_q] ^ ((ok_q && is_root) ? evalue : 8'h00);
          for (int j = 0; j <= RS_T; j++) lt_q[j] <= gf_mul(lt_q[j], gf_pow_alpha(j));
          for (int k = 0; k < RS_T; k++)  ot_q[k] <= gf_mul(ot_q[k], gf_pow_alpha(k));
          if (cnt_q == CW'(RS_K - 1)) begin
            cnt_q   <= '0;
            state_q <= S_IN;
            for (int j = 0; j < NR; j++) syn_q[j] <= '0;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
      endcase
    end
  end

endmodule
