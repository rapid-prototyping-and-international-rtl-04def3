// tb_qam_demapper: for QPSK, 16-QAM and 64-QAM sends 60 symbols each: ideal
// constellation points built from random bits, then the same points with
// random noise. Checks
//   * ideal points: every soft value has the sign of its bit (positive = 1)
//     and is non-zero;
//   * noisy points: the soft value's sign agrees with the exact max-log
//     log-likelihood ratio computed by brute force over all levels of the
//     axis, wherever that ratio is not close to zero;
//   * QPSK: the value equals -y saturated to +-7.
// Valid/ready gaps are random.
module tb_qam_demapper;
  import ldacs_pkg::*;
  import ldacs_ref_pkg::*;
  localparam int SC = 4, NS = 60;
  logic clk = 0, rst_n = 0;
  mod_e mod = MOD_QPSK;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic signed [7:0] in_i = 0, in_q = 0;
  soft_t out_soft;
  int checks = 0, failures = 0;
  intq_t got;

  qam_demapper #(.SCALE(SC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) begin
    #2;
    if (rst_n && out_valid && out_ready) got.push_back(int'(out_soft));
  end

  task automatic send_sym(int i, int q);
    bit done;
    done = 0;
    while (!done) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 3) != 0);
      in_valid  = ($urandom_range(0, 2) != 0);
      in_i = 8'(i); in_q = 8'(q);
      #1;
      done = in_valid && in_ready;
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  // exact max-log LLR (positive = bit 1) of axis bit k for received y
  function automatic int llr(int m, int k, int y);
    int d0, d1;
    d0 = 1 << 30; d1 = 1 << 30;
    for (int v = 0; v < 8; v++) begin
      bit a0, a1, a2;
      int x, d;
      a0 = v[0]; a1 = v[1]; a2 = v[2];
      if (m == 0 && (a1 || a2)) continue;
      if (m == 1 && a2) continue;
      x = SC * ref_level(m, a0, a1, a2);
      d = (y - x) * (y - x);
      if ((k == 0 ? a0 : k == 1 ? a1 : a2)) begin if (d < d1) d1 = d; end
      else if (d < d0) d0 = d;
    end
    return d0 - d1;
  endfunction

  initial begin
    mod_e ms [3] = '{MOD_QPSK, MOD_16QAM, MOD_64QAM};
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (ms[m]) begin
      int bp, h;
      mod = ms[m];
      bp = int'(bits_per_symbol(ms[m]));
      h  = bp / 2;
      for (int s = 0; s < NS; s++) begin
        bit a [6];
        int yi, yq, g0, noisy;
        noisy = (s >= NS / 2);
        for (int k = 0; k < 6; k++) a[k] = (k < bp) ? 1'($urandom) : 1'b0;
        yi = SC * ref_level(int'(ms[m]), a[0], (h > 1) ? a[1] : 1'b0, (h > 2) ? a[2] : 1'b0);
        yq = SC * ref_level(int'(ms[m]), a[h], (h > 1) ? a[h+1] : 1'b0, (h > 2) ? a[h+2] : 1'b0);
        if (noisy) begin
          yi += $urandom_range(0, 2 * SC) - SC;
          yq += $urandom_range(0, 2 * SC) - SC;
        end
        g0 = got.size();
        send_sym(yi, yq);
        while (got.size() < g0 + bp) begin @(negedge clk); out_ready = 1; end
        for (int k = 0; k < bp; k++) begin
          int y, kk, l;
          y  = (k < h) ? yi : yq;
          kk = k % h;
          if (!noisy) begin
            checks++;
            if ((got[g0+k] > 0) != a[k] || got[g0+k] == 0) begin
              failures++; $display("mod %0d ideal sym %0d bit %0d soft %0d", ms[m], s, k, got[g0+k]);
            end
          end else begin
            l = llr(int'(ms[m]), kk, y);
            if (l > 2 * SC * SC || l < -2 * SC * SC) begin
              checks++;
              if ((got[g0+k] > 0) != (l > 0)) begin
                failures++; $display("mod %0d y %0d bit %0d soft %0d llr %0d", ms[m], y, kk, got[g0+k], l);
              end
            end
          end
          if (ms[m] == MOD_QPSK) begin
            checks++;
            if (got[g0+k] != ((-y > 7) ? 7 : (-y < -7) ? -7 : -y)) begin
              failures++; $display("qpsk y %0d soft %0d", y, got[g0+k]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
