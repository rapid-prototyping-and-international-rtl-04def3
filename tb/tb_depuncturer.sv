// tb_depuncturer: for rates 1/2, 2/3, 3/4 and 1/2 again builds random soft
// pairs for 20 trellis steps, punctures them with the reference patterns,
// pads the stream with random values to 48 and sends it with random
// valid/ready gaps. Checks every output pair (punctured positions must be
// 0), that exactly 20 pairs come out per block, and, through the following
// block, that the padding was dropped.
module tb_depuncturer;
  import ldacs_pkg::*;
  import ldacs_ref_pkg::*;
  localparam int NS = 20, CAP = 48;
  logic clk = 0, rst_n = 0;
  code_rate_e rate = RATE_1_2;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  soft_t in_soft = 0, out_x, out_y;
  int checks = 0, failures = 0;
  intq_t gx, gy;

  depuncturer #(.NSTEPS(NS), .CAP(CAP)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) begin
    #2;
    if (rst_n && out_valid && out_ready) begin gx.push_back(int'(out_x)); gy.push_back(int'(out_y)); end
  end

  task automatic send(intq_t vals);
    int k;
    bit pending;
    k = 0; pending = 0;
    while (k < vals.size()) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 3) != 0);
      if (!pending) begin
        in_valid = ($urandom_range(0, 2) != 0);
        in_soft  = soft_t'(vals[k]);
      end
      #1;
      pending = in_valid && !in_ready;
      if (in_valid && in_ready) k++;
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    code_rate_e rs [4] = '{RATE_1_2, RATE_2_3, RATE_3_4, RATE_1_2};
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (rs[b]) begin
      int ex [NS], ey [NS];
      intq_t stream;
      int g0;
      stream.delete();
      for (int k = 0; k < NS; k++) begin
        bit kx, ky;
        kx = 1; ky = 1;
        if (rs[b] == RATE_2_3 && k % 2 == 1) kx = 0;
        if (rs[b] == RATE_3_4 && k % 3 == 1) kx = 0;
        if (rs[b] == RATE_3_4 && k % 3 == 2) ky = 0;
        ex[k] = kx ? $urandom_range(0, 14) - 7 : 0;
        ey[k] = ky ? $urandom_range(0, 14) - 7 : 0;
        if (kx) stream.push_back(ex[k]);
        if (ky) stream.push_back(ey[k]);
      end
      while (stream.size() < CAP) stream.push_back($urandom_range(0, 14) - 7);
      rate = rs[b];
      g0 = gx.size();
      send(stream);
      repeat (10) @(negedge clk);
      checks++;
      if (gx.size() != g0 + NS) begin failures++; $display("block %0d: %0d pairs", b, gx.size() - g0); end
      for (int k = 0; k < NS && g0 + k < gx.size(); k++) begin
        checks++;
        if (gx[g0+k] != ex[k] || gy[g0+k] != ey[k]) begin
          failures++; $display("block %0d step %0d: got (%0d,%0d) exp (%0d,%0d)", b, k, gx[g0+k], gy[g0+k], ex[k], ey[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
