// tb_viterbi_decoder: 16-byte blocks (134 trellis steps) of random data are
// encoded by the reference encoder, turned into soft values (+-5, positive
// = 1) and fed to the decoder one pair per step.
//   block 0: rate 1/2, no errors                 -> exact data
//   block 1: rate 1/2, 8 hard bit errors spread   -> corrected
//   block 2: rate 3/4 (erasures at punctured positions), 3 errors -> corrected
//   block 3: rate 1/2, 6 bursts of weak/erased values -> corrected
// Timing: with a pair every clock, the first decoded byte must appear
// 2*NSTEPS (+ a few) clocks after the first pair: one trellis step per clock
// for all 64 states, then one traceback step per clock.
module tb_viterbi_decoder;
  import ldacs_pkg::*;
  import ldacs_ref_pkg::*;
  localparam int NB = 16, NS = NB * 8 + 6;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, busy_tb;
  soft_t in_x = 0, in_y = 0;
  logic [7:0] out_data;
  int checks = 0, failures = 0, cyc = 0;
  byteq_t got;
  int first_out_cyc = -1;

  viterbi_decoder #(.NSTEPS(NS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) begin
    cyc++;
    #2;
    if (rst_n && out_valid && out_ready) begin
      if (first_out_cyc < 0) first_out_cyc = cyc;
      got.push_back(out_data);
    end
  end

  task automatic run_block(int b, int rate, int nerr, int nburst, bit gaps);
    byteq_t msg;
    bitq_t  coded;
    int sx [NS], sy [NS];
    int pos, g0, c0;
    for (int i = 0; i < NB; i++) msg.push_back(8'($urandom));
    coded = ref_conv_encode(ref_bytes_to_bits(msg), rate, 0);
    // de-puncture into pairs, 0 = erasure
    pos = 0;
    for (int k = 0; k < NS; k++) begin
      bit kx, ky;
      kx = 1; ky = 1;
      if (rate == 2 && k % 3 == 1) kx = 0;
      if (rate == 2 && k % 3 == 2) ky = 0;
      sx[k] = 0; sy[k] = 0;
      if (kx) begin sx[k] = coded[pos] ? 5 : -5; pos++; end
      if (ky) begin sy[k] = coded[pos] ? 5 : -5; pos++; end
    end
    // hard errors, spread out
    for (int e = 0; e < nerr; e++) begin
      int k;
      k = (e * NS) / nerr + 3;
      if (sx[k] != 0) sx[k] = -sx[k]; else sy[k] = -sy[k];
    end
    // bursts of weak values
    for (int e = 0; e < nburst; e++)
      for (int k = (e * NS) / nburst + 5; k < (e * NS) / nburst + 8; k++) begin
        sx[k] = 0; sy[k] = (sy[k] > 0) ? -1 : 1;
      end
    g0 = got.size();
    first_out_cyc = -1;
    c0 = -1;
    for (int k = 0; k < NS; k++) begin
      bit done;
      done = 0;
      while (!done) begin
        @(negedge clk);
        out_ready = gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
        in_valid = !gaps || ($urandom_range(0, 2) != 0);
        in_x = soft_t'(sx[k]); in_y = soft_t'(sy[k]);
        #1;
        done = in_valid && in_ready;
        if (done && k == 0) c0 = cyc;
      end
    end
    @(negedge clk);
    in_valid = 0;
    while (got.size() < g0 + NB) begin @(negedge clk); out_ready = 1; end
    for (int i = 0; i < NB; i++) begin
      checks++;
      if (got[g0+i] != msg[i]) begin failures++; $display("block %0d byte %0d: got %h exp %h", b, i, got[g0+i], msg[i]); end
    end
    if (!gaps) begin
      checks++;
      if (first_out_cyc - c0 < 2 * NS || first_out_cyc - c0 > 2 * NS + 4) begin
        failures++; $display("block %0d: first byte %0d clocks after first pair", b, first_out_cyc - c0);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_block(0, 0, 0, 0, 0);
    run_block(1, 0, 8, 0, 1);
    run_block(2, 2, 3, 0, 0);
    run_block(3, 0, 0, 6, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
