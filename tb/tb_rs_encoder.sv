// tb_rs_encoder: encodes four random messages (RS_K = 30, RS_T = 8) with
// random valid/ready gaps. For each codeword it checks that the data bytes
// pass unchanged, that exactly 2*RS_T parity bytes follow, and that the
// codeword evaluates to zero at alpha^0 .. alpha^(2T-1) (reference Horner
// evaluation), which fixes the parity uniquely. Then checks the rate: RS_N
// bytes out in RS_N clocks without back-pressure.
module tb_rs_encoder;
  import ldacs_pkg::*;
  import ldacs_ref_pkg::*;
  localparam int K = 30, T = 8, N = K + 2 * T;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [7:0] in_data = 0, out_data;
  int checks = 0, failures = 0, cyc = 0;
  byteq_t sent, got;
  bit stall_mode = 1;

  rs_encoder #(.RS_K(K), .RS_T(T)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) begin
    cyc++;
    #2;
    if (rst_n && out_valid && out_ready) got.push_back(out_data);
  end

  task automatic send(int n);
    int k;
    bit pending;
    k = 0; pending = 0;
    while (k < n) begin
      @(negedge clk);
      out_ready = stall_mode ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (!pending) begin
        in_valid = !stall_mode || ($urandom_range(0, 2) != 0);
        in_data  = 8'($urandom);
      end
      #1;
      pending = in_valid && !in_ready;
      if (in_valid && in_ready) begin sent.push_back(in_data); k++; end
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic check_words(int nw);
    for (int w = 0; w < nw; w++) begin
      byteq_t cw;
      cw = got[w*N : w*N + N - 1];
      for (int i = 0; i < K; i++) begin
        checks++;
        if (cw[i] != sent[w*K + i]) begin failures++; $display("cw %0d data byte %0d differs", w, i); end
      end
      for (int j = 0; j < 2 * T; j++) begin
        checks++;
        if (ref_rs_eval(cw, j) != 0) begin failures++; $display("cw %0d syndrome %0d non-zero", w, j); end
      end
    end
  endtask

  initial begin
    int c0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(3 * K);
    wait (got.size() == 3 * N);
    repeat (5) @(negedge clk);
    checks++;
    if (got.size() != 3 * N) begin failures++; $display("byte count %0d", got.size()); end
    check_words(3);
    stall_mode = 0;
    c0 = cyc;
    send(K);
    wait (got.size() == 4 * N);
    checks++;
    if (cyc - c0 > N + 3) begin failures++; $display("rate: %0d bytes took %0d clocks", N, cyc - c0); end
    check_words(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
