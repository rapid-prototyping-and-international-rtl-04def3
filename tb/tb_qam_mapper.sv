// tb_qam_mapper: sends random bits for QPSK, 16-QAM and 64-QAM (40 symbols
// each, then QPSK again) with random valid/ready gaps and compares every
// (I, Q) symbol with the reference Gray map (first half of the bits on I,
// second half on Q, levels scaled by SCALE).
module tb_qam_mapper;
  import ldacs_pkg::*;
  import ldacs_ref_pkg::*;
  localparam int SC = 4, NS = 40;
  logic clk = 0, rst_n = 0;
  mod_e mod = MOD_QPSK;
  logic in_valid = 0, in_ready, in_bit = 0, out_valid, out_ready = 1;
  logic signed [7:0] out_i, out_q;
  int checks = 0, failures = 0;
  bitq_t sent;
  intq_t gi, gq;

  qam_mapper #(.SCALE(SC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) begin
    #2;
    if (rst_n && out_valid && out_ready) begin gi.push_back(int'(out_i)); gq.push_back(int'(out_q)); end
  end

  task automatic send(int n);
    int k;
    bit pending;
    k = 0; pending = 0;
    while (k < n) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 3) != 0);
      if (!pending) begin
        in_valid = ($urandom_range(0, 2) != 0);
        in_bit   = 1'($urandom);
      end
      #1;
      pending = in_valid && !in_ready;
      if (in_valid && in_ready) begin sent.push_back(in_bit); k++; end
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int bp, s0;
    mod_e ms [4] = '{MOD_QPSK, MOD_16QAM, MOD_64QAM, MOD_QPSK};
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (ms[m]) begin
      int b0;
      mod = ms[m];
      bp  = int'(bits_per_symbol(ms[m]));
      b0  = sent.size();
      s0  = gi.size();
      send(NS * bp);
      while (gi.size() < s0 + NS) begin @(negedge clk); out_ready = 1; end
      for (int s = 0; s < NS; s++) begin
        int h, ei, eq;
        bit a [6];
        for (int k = 0; k < bp; k++) a[k] = sent[b0 + s*bp + k];
        h  = bp / 2;
        ei = SC * ref_level(int'(ms[m]), a[0], (h > 1) ? a[1] : 1'b0, (h > 2) ? a[2] : 1'b0);
        eq = SC * ref_level(int'(ms[m]), a[h], (h > 1) ? a[h+1] : 1'b0, (h > 2) ? a[h+2] : 1'b0);
        checks += 2;
        if (gi[s0+s] != ei || gq[s0+s] != eq) begin
          failures++; $display("mod %0d sym %0d: got (%0d,%0d) exp (%0d,%0d)", ms[m], s, gi[s0+s], gq[s0+s], ei, eq);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
