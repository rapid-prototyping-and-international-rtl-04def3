// ldacs_phy_top: physical-layer coding and modulation data path of an LDACS
// station, as offloaded to the programmable logic: the modulation (TX) chain
// and the demodulation (RX) chain side by side.
//
// TX: user bytes -> randomizer -> RS encoder -> block interleaver ->
//     zero-terminated punctured convolutional encoder -> helical interleaver
//     -> QAM mapper -> (I, Q) symbols.
// RX: (I, Q) symbols -> soft QAM demapper -> helical de-interleaver ->
//     de-puncturer -> Viterbi decoder -> block de-interleaver -> RS decoder
//     -> de-randomizer -> user bytes. Per RS codeword the receiver reports
//     rx_cw_err (could not be corrected) and rx_cw_nfix (bytes corrected).
//
// One coding block is NW Reed-Solomon codewords: NW*RS_K user bytes in,
// NW*(RS_K+2*RS_T) coded bytes, 8 bits each plus 6 tail bits through the
// convolutional code, padded to CAP = HI_ROWS*HI_COLS coded bits (HI_COLS is
// chosen so that a rate-1/2 block fits exactly). The order of the stages
// follows the document; block sizes, code parameters and constellations are
// this design's choices (see the individual modules).
//
// The (I, Q) ports are where the OFDM modulator/demodulator, the
// synchronization and the AD/DA converter would attach; those are not part
// of this module. The code rate and modulation of each direction are set by
// the tx_/rx_ rate and mod inputs, which must stay constant during a block
// (they are sampled at the block start by the stages that use them).
// The Viterbi decoder's busy_tb status output is left open here; it is
// there for observation and testing only.
module ldacs_phy_top
  import ldacs_pkg::*;
#(
  parameter int unsigned RS_K     = 239,
  parameter int unsigned RS_T     = 8,
  parameter int unsigned NW       = 2,
  parameter int unsigned HI_ROWS  = 12,
  parameter int unsigned HI_SHIFT = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  // transmit side
  input  code_rate_e        tx_rate,
  input  mod_e              tx_mod,
  input  logic              tx_in_valid,
  output logic              tx_in_ready,
  input  logic [7:0]        tx_in_data,
  output logic              tx_iq_valid,
  input  logic              tx_iq_ready,
  output logic signed [7:0] tx_i,
  output logic signed [7:0] tx_q,
  // receive side
  input  code_rate_e        rx_rate,
  input  mod_e              rx_mod,
  input  logic              rx_iq_valid,
  output logic              rx_iq_ready,
  input  logic signed [7:0] rx_i,
  input  logic signed [7:0] rx_q,
  output logic              rx_out_valid,
  input  logic              rx_out_ready,
  output logic [7:0]        rx_out_data,
  output logic              rx_cw_err_valid,
  output logic              rx_cw_err,
  output logic [$clog2(RS_T+1)-1:0] rx_cw_nfix
);

  localparam int unsigned RS_N    = RS_K + 2 * RS_T;
  localparam int unsigned NBYTES  = NW * RS_N;
  localparam int unsigned NSTEPS  = NBYTES * 8 + CC_M;
  localparam int unsigned HI_COLS = (2 * NSTEPS + HI_ROWS - 1) / HI_ROWS;
  localparam int unsigned CAP     = HI_ROWS * HI_COLS;

  // ---------------------------------------------------------------- TX
  logic       scr_v, scr_r;   logic [7:0] scr_d;
  logic       rse_v, rse_r;   logic [7:0] rse_d;
  logic       bi_v,  bi_r;    logic [7:0] bi_d;
  logic       cc_v,  cc_r;    logic       cc_b;
  logic       hi_v,  hi_r;    logic       hi_b;

  randomizer #(.BLOCK_BYTES(NW * RS_K)) u_scr (
    .clk, .rst_n,
    .in_valid(tx_in_valid), .in_ready(tx_in_ready), .in_data(tx_in_data),
    .out_valid(scr_v), .out_ready(scr_r), .out_data(scr_d));

  rs_encoder #(.RS_K(RS_K), .RS_T(RS_T)) u_rse (
    .clk, .rst_n,
    .in_valid(scr_v), .in_ready(scr_r), .in_data(scr_d),
    .out_valid(rse_v), .out_ready(rse_r), .out_data(rse_d));

  block_interleaver #(.ROWS(NW), .COLS(RS_N), .W(8), .DEINT(1'b0)) u_bi (
    .clk, .rst_n,
    .in_valid(rse_v), .in_ready(rse_r), .in_data(rse_d),
    .out_valid(bi_v), .out_ready(bi_r), .out_data(bi_d));

  conv_encoder #(.NBYTES(NBYTES), .CAP(CAP)) u_cc (
    .clk, .rst_n, .rate(tx_rate),
    .in_valid(bi_v), .in_ready(bi_r), .in_data(bi_d),
    .out_valid(cc_v), .out_ready(cc_r), .out_bit(cc_b));

  helical_interleaver #(.ROWS(HI_ROWS), .COLS(HI_COLS), .SHIFT(HI_SHIFT), .W(1), .DEINT(1'b0)) u_hi (
    .clk, .rst_n,
    .in_valid(cc_v), .in_ready(cc_r), .in_data(cc_b),
    .out_valid(hi_v), .out_ready(hi_r), .out_data(hi_b));

  qam_mapper u_map (
    .clk, .rst_n, .mod(tx_mod),
    .in_valid(hi_v), .in_ready(hi_r), .in_bit(hi_b),
    .out_valid(tx_iq_valid), .out_ready(tx_iq_ready), .out_i(tx_i), .out_q(tx_q));

  // ---------------------------------------------------------------- RX
  logic  dm_v,  dm_r;   soft_t dm_s;
  logic  hd_v,  hd_r;   soft_t hd_s;
  logic  dp_v,  dp_r;   soft_t dp_x, dp_y;
  logic  vd_v,  vd_r;   logic [7:0] vd_d;
  logic  bd_v,  bd_r;   logic [7:0] bd_d;
  logic  rsd_v, rsd_r;  logic [7:0] rsd_d;

  qam_demapper u_demap (
    .clk, .rst_n, .mod(rx_mod),
    .in_valid(rx_iq_valid), .in_ready(rx_iq_ready), .in_i(rx_i), .in_q(rx_q),
    .out_valid(dm_v), .out_ready(dm_r), .out_soft(dm_s));

  helical_interleaver #(.ROWS(HI_ROWS), .COLS(HI_COLS), .SHIFT(HI_SHIFT), .W(SOFT_W), .DEINT(1'b1)) u_hd (
    .clk, .rst_n,
    .in_valid(dm_v), .in_ready(dm_r), .in_data(dm_s),
    .out_valid(hd_v), .out_ready(hd_r), .out_data(hd_s));

  depuncturer #(.NSTEPS(NSTEPS), .CAP(CAP)) u_dp (
    .clk, .rst_n, .rate(rx_rate),
    .in_valid(hd_v), .in_ready(hd_r), .in_soft(hd_s),
    .out_valid(dp_v), .out_ready(dp_r), .out_x(dp_x), .out_y(dp_y));

  viterbi_decoder #(.NSTEPS(NSTEPS)) u_vd (
    .clk, .rst_n,
    .in_valid(dp_v), .in_ready(dp_r), .in_x(dp_x), .in_y(dp_y),
    .out_valid(vd_v), .out_ready(vd_r), .out_data(vd_d), .busy_tb());

  block_interleaver #(.ROWS(NW), .COLS(RS_N), .W(8), .DEINT(1'b1)) u_bd (
    .clk, .rst_n,
    .in_valid(vd_v), .in_ready(vd_r), .in_data(vd_d),
    .out_valid(bd_v), .out_ready(bd_r), .out_data(bd_d));

  rs_decoder #(.RS_K(RS_K), .RS_T(RS_T)) u_rsd (
    .clk, .rst_n,
    .in_valid(bd_v), .in_ready(bd_r), .in_data(bd_d),
    .out_valid(rsd_v), .out_ready(rsd_r), .out_data(rsd_d),
    .err_valid(rx_cw_err_valid), .err(rx_cw_err), .nfix(rx_cw_nfix));

  randomizer #(.BLOCK_BYTES(NW * RS_K)) u_dscr (
    .clk, .rst_n,
    .in_valid(rsd_v), .in_ready(rsd_r), .in_data(rsd_d),
    .out_valid(rx_out_valid), .out_ready(rx_out_ready), .out_data(rx_out_data));

endmodule
