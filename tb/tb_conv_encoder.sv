// tb_conv_encoder: encodes 6-byte blocks at rates 1/2, 2/3 and 3/4 (and 1/2
// again) with random valid/ready gaps and compares each 120-bit output block
// with the reference shift-register encoder (tail bits, puncturing, zero
// padding). A last block at full rate checks the timing: one coded bit per
// clock plus one clock per input byte.
module tb_conv_encoder;
  import ldacs_pkg::*;
  import ldacs_ref_pkg::*;
  localparam int NB = 6, CAP = 120;
  logic clk = 0, rst_n = 0;
  code_rate_e rate = RATE_1_2;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [7:0] in_data = 0;
  logic out_bit;
  int checks = 0, failures = 0, cyc = 0;
  byteq_t sent;
  bitq_t got;
  bit stall_mode = 1;

  conv_encoder #(.NBYTES(NB), .CAP(CAP)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) begin
    cyc++;
    #2;
    if (rst_n && out_valid && out_ready) got.push_back(out_bit);
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

  // keep out_ready toggling while the block drains
  task automatic drain(int nbits);
    while (got.size() < nbits) begin
      @(negedge clk);
      out_ready = stall_mode ? ($urandom_range(0, 3) != 0) : 1'b1;
    end
  endtask

  task automatic block(code_rate_e r, int b);
    byteq_t msg;
    bitq_t  exp_bits;
    rate = r;
    send(NB);
    drain((b + 1) * CAP);
    msg = sent[b*NB : b*NB + NB - 1];
    exp_bits = ref_conv_encode(ref_bytes_to_bits(msg), int'(r), CAP);
    for (int i = 0; i < CAP; i++) begin
      checks++;
      if (got[b*CAP + i] != exp_bits[i]) begin
        failures++;
        if (failures < 10) $display("block %0d rate %0d bit %0d: got %0d exp %0d", b, r, i, got[b*CAP+i], exp_bits[i]);
      end
    end
  endtask

  initial begin
    int c0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    block(RATE_1_2, 0);
    block(RATE_2_3, 1);
    block(RATE_3_4, 2);
    block(RATE_1_2, 3);
    stall_mode = 0;
    c0 = cyc;
    block(RATE_3_4, 4);
    checks++;
    if (cyc - c0 > CAP + NB + 6) begin failures++; $display("block took %0d clocks", cyc - c0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
