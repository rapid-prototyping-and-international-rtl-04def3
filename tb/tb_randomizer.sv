// tb_randomizer: drives three 20-byte blocks of random bytes through the
// scrambler with random valid and ready gaps and compares every output byte
// with the input XOR the reference PRBS mask, restarted at each block.
// Then checks the rate: one byte per clock without back-pressure.
// Stimulus and monitors act on the falling edge; the DUT on the rising edge.
module tb_randomizer;
  import ldacs_ref_pkg::*;
  localparam int BB = 20;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [7:0] in_data = 0, out_data;
  int checks = 0, failures = 0;
  byteq_t mask, sent;
  int nout = 0, cyc = 0;
  bit stall_mode = 1;

  randomizer #(.BLOCK_BYTES(BB)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // monitor: outputs are sampled 2 ns after the falling edge, once the
  // driver has set out_ready; a transfer seen then completes at the next
  // rising edge
  always @(negedge clk) begin
    cyc++;
    #2;
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (out_data !== (sent[nout] ^ mask[nout % BB])) begin
        failures++; $display("byte %0d: got %h exp %h", nout, out_data, sent[nout] ^ mask[nout % BB]);
      end
      nout++;
    end
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

  initial begin
    int t0, c0;
    mask = ref_prbs_bytes(BB);
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(3 * BB);
    wait (nout == 3 * BB);
    stall_mode = 0;
    t0 = nout; c0 = cyc;
    send(BB);
    wait (nout == 4 * BB);
    checks++;
    if (cyc - c0 > BB + 2) begin failures++; $display("rate: %0d bytes took %0d clocks", BB, cyc - c0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
