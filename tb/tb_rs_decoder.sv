// tb_rs_decoder: RS(46,30), t = 8, codewords from the reference long-division
// encoder with 0 .. 10 byte errors at random positions (data and parity)
// and random non-zero values. Checks, per codeword:
//   * up to 8 errors: the 30 data bytes come out corrected, err = 0 and
//     nfix = number of errors;
//   * 9 or 10 errors: err = 1 and the data bytes come out as received (for
//     these patterns the decoder finds no consistent locator);
//   * no parity byte comes out.
// Valid/ready gaps are random except for the last codeword, which is fed
// without gaps to check the decoding time: the error flag must appear
// 2N + 2T + 1 clocks after the first byte is accepted (input, BM, Omega,
// Chien count).
module tb_rs_decoder;
  import ldacs_pkg::*;
  import ldacs_ref_pkg::*;
  localparam int K = 30, T = 8, N = K + 2 * T, NCW = 14;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, err_valid, err;
  logic [3:0] nfix;
  logic [7:0] in_data = 0, out_data;
  int checks = 0, failures = 0;
  int cyc = 0, t_first = 0, t_flag = 0;
  byteq_t stream, got, data;
  bit flags [$];
  int fixes [$];
  int nerr [NCW] = '{0, 1, 2, 3, 4, 5, 6, 7, 8, 8, 9, 10, 0, 8};

  rs_decoder #(.RS_K(K), .RS_T(T)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) begin
    #2;
    if (rst_n && out_valid && out_ready) got.push_back(out_data);
    if (rst_n && err_valid) begin
      flags.push_back(err);
      fixes.push_back(int'(nfix));
      t_flag = cyc;
    end
  end

  initial begin
    int k;
    bit pending;
    for (int w = 0; w < NCW; w++) begin
      byteq_t msg, cw, rx;
      bit hit [N];
      msg.delete();
      for (int i = 0; i < K; i++) msg.push_back(8'($urandom));
      cw = ref_rs_encode(msg, T);
      rx = cw;
      foreach (hit[i]) hit[i] = 0;
      for (int e = 0; e < nerr[w]; e++) begin
        int p;
        do p = $urandom_range(0, N - 1); while (hit[p]);
        hit[p] = 1;
        rx[p] ^= 8'($urandom_range(1, 255));
      end
      foreach (rx[i]) stream.push_back(rx[i]);
      for (int i = 0; i < K; i++) data.push_back(nerr[w] <= T ? cw[i] : rx[i]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    k = 0; pending = 0;
    while (k < stream.size()) begin
      @(negedge clk);
      if (k >= (NCW - 1) * N) begin
        out_ready = 1;
        in_valid  = 1;
        in_data   = stream[k];
      end else begin
        out_ready = ($urandom_range(0, 3) != 0);
        if (!pending) begin
          in_valid = ($urandom_range(0, 2) != 0);
          in_data  = stream[k];
        end
      end
      #1;
      pending = in_valid && !in_ready;
      if (in_valid && in_ready) begin
        if (k == (NCW - 1) * N) t_first = cyc;
        k++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4 * N) begin @(negedge clk); out_ready = 1; end
    checks++;
    if (got.size() != NCW * K) begin failures++; $display("%0d bytes out", got.size()); end
    for (int i = 0; i < NCW * K && i < got.size(); i++) begin
      checks++;
      if (got[i] != data[i]) begin failures++; $display("byte %0d: got %h exp %h", i, got[i], data[i]); end
    end
    checks++;
    if (flags.size() != NCW) begin failures++; $display("%0d flags", flags.size()); end
    for (int w = 0; w < NCW && w < flags.size(); w++) begin
      checks += 2;
      if (flags[w] != (nerr[w] > T)) begin failures++; $display("codeword %0d flag %0d", w, flags[w]); end
      if (fixes[w] != (nerr[w] > T ? 0 : nerr[w])) begin
        failures++; $display("codeword %0d nfix %0d exp %0d", w, fixes[w], nerr[w]);
      end
    end
    // decoding time of the gap-free codeword
    checks++;
    if (t_flag - t_first != 2 * N + 2 * T + 1) begin
      failures++; $display("flag %0d clocks after first byte, expected %0d", t_flag - t_first, 2 * N + 2 * T + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
