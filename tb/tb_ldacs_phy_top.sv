// tb_ldacs_phy_top: end-to-end test of the full-size data path (default
// parameters: two RS(255,239) codewords per block, 8172 coded bits). Each
// block of 478 random user bytes goes through the TX chain; the symbols are
// passed through a channel model (uniform noise plus injected symbol errors)
// and fed to the RX chain, whose output is compared with the user bytes.
//   block 0: QPSK,   rate 1/2, noise +-4, 20 symbol errors (exact fill)
//   block 1: 16-QAM, rate 2/3, noise +-3, 6 symbol errors
//   block 2: 64-QAM, rate 3/4, noise +-2, 6 symbol errors
//   block 3: QPSK,   rate 1/2, 80 consecutive symbols inverted: the Viterbi
//            decoder leaves a few wrong bytes in each codeword and the RS
//            decoder must correct them all
//   block 4: QPSK,   rate 1/2, 400 consecutive symbols inverted: too many
//            for both codes; the RS decoder must flag exactly the codewords
//            whose bytes come out wrong
// Every codeword's RS flag must agree with its output (flag = 1 exactly when
// bytes are wrong), and blocks 0-3 must come out without error.
// Mechanisms counted (each must happen at least once): every code rate,
// every modulation, padded and exactly filled interleaver blocks, channel
// bit errors corrected by the Viterbi decoder, byte errors corrected by the
// RS decoder, RS failure flags raised,
// back-pressure on the TX symbol port and on the RX byte port. Each block's
// RX time (first symbol offered to last byte out, with the random gaps) must
// stay below the time the peak LDACS user rate, 1428.27 kbit/s, takes to
// deliver the block's 3824 bits at a 100 MHz clock, and below 0.72 ms
// (72,000 clocks), the shortest LDACS frame a demodulation must fit in.
module tb_ldacs_phy_top;
  import ldacs_pkg::*;
  import ldacs_ref_pkg::*;
  localparam int RS_K = 239, RS_T = 8, NW = 2, SC = 4;
  localparam int RS_N = RS_K + 2 * RS_T, NSTEPS = NW * RS_N * 8 + 6;
  localparam int CAP = 12 * ((2 * NSTEPS + 11) / 12);
  localparam int BLK = NW * RS_K;
  localparam int BURST_FIX = 80;

  logic clk = 0, rst_n = 0;
  code_rate_e tx_rate = RATE_1_2, rx_rate = RATE_1_2;
  mod_e tx_mod = MOD_QPSK, rx_mod = MOD_QPSK;
  logic tx_in_valid = 0, tx_in_ready, tx_iq_valid, tx_iq_ready = 1;
  logic [7:0] tx_in_data = 0;
  logic signed [7:0] tx_i, tx_q, rx_i = 0, rx_q = 0;
  logic rx_iq_valid = 0, rx_iq_ready, rx_out_valid, rx_out_ready = 1;
  logic [7:0] rx_out_data;
  logic rx_cw_err_valid, rx_cw_err;
  logic [3:0] rx_cw_nfix;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;
  intq_t ti, tq;
  byteq_t got;
  bit flags [$];
  int fixes [$];
  // mechanism counters
  int n_rate [3], n_mod [3], n_padded = 0, n_exact = 0, n_corrected = 0;
  int n_rs_flag = 0, n_rs_fixed = 0, n_tx_stall = 0, n_rx_stall = 0;

  ldacs_phy_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) begin
    #2;
    if (rst_n && tx_iq_valid && tx_iq_ready) begin ti.push_back(int'(tx_i)); tq.push_back(int'(tx_q)); end
    if (rst_n && tx_iq_valid && !tx_iq_ready) n_tx_stall++;
    if (rst_n && rx_out_valid && rx_out_ready) got.push_back(rx_out_data);
    if (rst_n && rx_out_valid && !rx_out_ready) n_rx_stall++;
    if (rst_n && rx_cw_err_valid) begin flags.push_back(rx_cw_err); fixes.push_back(int'(rx_cw_nfix)); end
  end

  // hard decision of one axis, unscaled level
  function automatic int slice(int m, int y);
    int best, bd;
    bd = 1 << 30; best = 0;
    for (int l = -7; l <= 7; l += 2) begin
      int d;
      if (m == 0 && l != 1 && l != -1) continue;
      if (m == 1 && (l > 3 || l < -3)) continue;
      d = (y - SC * l) * (y - SC * l);
      if (d < bd) begin bd = d; best = l; end
    end
    return best;
  endfunction

  task automatic run_block(int b, code_rate_e r, mod_e m, int noise, int nerr, int burst, bit clean);
    byteq_t msg;
    int nsym, s0, g0, f0, k, bit_errs, coded;
    bit pending;
    int ri [$], rq [$];
    int rx_t0, rx_cycles;
    nsym = CAP / int'(bits_per_symbol(m));
    tx_rate = r; rx_rate = r; tx_mod = m; rx_mod = m;
    n_rate[int'(r)]++; n_mod[int'(m)]++;
    coded = (r == RATE_1_2) ? 2 * NSTEPS : (r == RATE_2_3) ? (3 * NSTEPS + 1) / 2 : (4 * NSTEPS + 2) / 3;
    if (coded == CAP) n_exact++; else n_padded++;
    for (int i = 0; i < BLK; i++) msg.push_back(8'($urandom));
    s0 = ti.size(); g0 = got.size(); f0 = flags.size();
    // TX: feed bytes, random gaps on both sides
    k = 0; pending = 0;
    while (ti.size() < s0 + nsym) begin
      @(negedge clk);
      tx_iq_ready = ($urandom_range(0, 4) != 0);
      if (k < BLK) begin
        if (!pending) begin
          tx_in_valid = ($urandom_range(0, 3) != 0);
          tx_in_data  = msg[k];
        end
        #1;
        pending = tx_in_valid && !tx_in_ready;
        if (tx_in_valid && tx_in_ready) k++;
      end else tx_in_valid = 0;
    end
    @(negedge clk);
    tx_in_valid = 0;
    // channel
    bit_errs = 0;
    for (int s = 0; s < nsym; s++) begin
      int yi, yq;
      yi = ti[s0 + s] + $urandom_range(0, 2 * noise) - noise;
      yq = tq[s0 + s] + $urandom_range(0, 2 * noise) - noise;
      if (nerr > 0 && s % (nsym / nerr) == 7) begin yi = -yi; end
      if (burst > 0 && s >= 1000 && s < 1000 + burst) begin yi = -yi; yq = -yq; end
      if (slice(int'(m), yi) != ti[s0 + s] / SC || slice(int'(m), yq) != tq[s0 + s] / SC) bit_errs++;
      ri.push_back(yi); rq.push_back(yq);
    end
    // RX: feed symbols
    k = 0; pending = 0;
    rx_t0 = cyc;
    while (got.size() < g0 + BLK) begin
      @(negedge clk);
      rx_out_ready = ($urandom_range(0, 4) != 0);
      if (k < nsym) begin
        if (!pending) begin
          rx_iq_valid = ($urandom_range(0, 3) != 0);
          rx_i = 8'(ri[k]); rx_q = 8'(rq[k]);
        end
        #1;
        pending = rx_iq_valid && !rx_iq_ready;
        if (rx_iq_valid && rx_iq_ready) k++;
      end else rx_iq_valid = 0;
    end
    rx_cycles = cyc - rx_t0;
    @(negedge clk);
    rx_iq_valid = 0;
    repeat (60) @(negedge clk);   // parity bytes of the last codeword
    // compare
    checks++;
    if (flags.size() != f0 + NW) begin failures++; $display("block %0d: %0d RS flags", b, flags.size() - f0); end
    for (int w = 0; w < NW; w++) begin
      int wrong;
      wrong = 0;
      // codeword w holds the de-interleaved bytes w*RS_K .. of the block
      for (int i = 0; i < RS_K; i++) if (got[g0 + w*RS_K + i] != msg[w*RS_K + i]) wrong++;
      if (f0 + w < flags.size()) begin
        $display("block %0d codeword %0d: %0d bytes corrected by RS, flag %0d, %0d wrong bytes out",
                 b, w, fixes[f0 + w], flags[f0 + w], wrong);
        checks++;
        if (flags[f0 + w] != (wrong != 0)) begin
          failures++; $display("block %0d codeword %0d: flag does not match the output", b, w);
        end
        if (flags[f0 + w]) n_rs_flag++;
        if (fixes[f0 + w] > 0) n_rs_fixed++;
      end
      if (clean) begin
        checks++;
        if (wrong != 0) begin failures++; $display("block %0d codeword %0d: %0d wrong bytes", b, w, wrong); end
      end
    end
    if (burst == 0 && bit_errs > 0) n_corrected++;
    // real time: a block must be decoded faster than the peak LDACS user
    // rate of 1428.27 kbit/s delivers it, at a 100 MHz clock
    checks++;
    if (rx_cycles > (BLK * 8 * 100_000) / 1428) begin
      failures++; $display("block %0d: RX took %0d clocks, too slow", b, rx_cycles);
    end
    // the shortest frame of the demodulation-latency budget, 0.72 ms =
    // 72,000 clocks at 100 MHz, must hold the decoding of a whole block
    checks++;
    if (rx_cycles > 72_000) begin
      failures++; $display("block %0d: RX took %0d clocks, longer than a 0.72 ms frame", b, rx_cycles);
    end
    $display("block %0d: rate %0d mod %0d, %0d symbols, %0d symbols in error, RX %0d clocks (with random gaps)",
             b, r, m, nsym, bit_errs, rx_cycles);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_block(0, RATE_1_2, MOD_QPSK,  4, 20, 0, 1);
    run_block(1, RATE_2_3, MOD_16QAM, 3, 6, 0, 1);
    run_block(2, RATE_3_4, MOD_64QAM, 2, 6, 0, 1);
    run_block(3, RATE_1_2, MOD_QPSK,  1, 0, BURST_FIX, 1);
    run_block(4, RATE_1_2, MOD_QPSK,  1, 0, 400, 0);
    $display("mechanisms: rate1/2=%0d rate2/3=%0d rate3/4=%0d qpsk=%0d 16qam=%0d 64qam=%0d exact=%0d padded=%0d corrected=%0d rs_fixed=%0d rs_flag=%0d tx_stall=%0d rx_stall=%0d",
             n_rate[0], n_rate[1], n_rate[2], n_mod[0], n_mod[1], n_mod[2], n_exact, n_padded,
             n_corrected, n_rs_fixed, n_rs_flag, n_tx_stall, n_rx_stall);
    foreach (n_rate[i]) begin checks++; if (n_rate[i] == 0) failures++; end
    foreach (n_mod[i])  begin checks++; if (n_mod[i] == 0) failures++; end
    checks += 7;
    if (n_rs_fixed == 0)  begin failures++; $display("no RS correction happened"); end
    if (n_exact == 0)     failures++;
    if (n_padded == 0)    failures++;
    if (n_corrected == 0) begin failures++; $display("no channel errors were corrected"); end
    if (n_rs_flag == 0)   begin failures++; $display("no RS flag raised"); end
    if (n_tx_stall == 0)  failures++;
    if (n_rx_stall == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
