// tb_block_interleaver: an interleaver (DEINT = 0) feeding a de-interleaver
// (DEINT = 1), 3 rows x 7 columns of bytes, three blocks with random
// valid/ready gaps. Checks the interleaver output against the reference
// column-order permutation (output k = input (k mod ROWS)*COLS + k div ROWS)
// and the de-interleaver output against the original bytes. Then checks
// that a block drains in ROWS*COLS clocks once it has been written.
module tb_block_interleaver;
  import ldacs_ref_pkg::*;
  localparam int R = 3, C = 7, L = R * C;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, mid_valid, mid_ready, out_valid, out_ready = 1;
  logic [7:0] in_data = 0, mid_data, out_data;
  int checks = 0, failures = 0, cyc = 0;
  byteq_t sent, mid, got;
  bit stall_mode = 1;

  block_interleaver #(.ROWS(R), .COLS(C), .W(8), .DEINT(1'b0)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(mid_valid), .out_ready(mid_ready), .out_data(mid_data));
  block_interleaver #(.ROWS(R), .COLS(C), .W(8), .DEINT(1'b1)) dut_inv (
    .clk, .rst_n, .in_valid(mid_valid), .in_ready(mid_ready), .in_data(mid_data),
    .out_valid, .out_ready, .out_data);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) begin
    cyc++;
    #2;
    if (rst_n && mid_valid && mid_ready) mid.push_back(mid_data);
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

  initial begin
    int c0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(3 * L);
    wait (got.size() == 3 * L);
    for (int b = 0; b < 3; b++)
      for (int k = 0; k < L; k++) begin
        checks += 2;
        if (mid[b*L + k] != sent[b*L + (k % R) * C + k / R]) begin
          failures++; $display("interleaver block %0d out %0d wrong", b, k);
        end
        if (got[b*L + k] != sent[b*L + k]) begin
          failures++; $display("de-interleaver block %0d out %0d wrong", b, k);
        end
      end
    // drain rate of the interleaver: L bytes in L clocks after the last write
    stall_mode = 0;
    send(L);
    c0 = cyc;
    wait (mid.size() == 4 * L);
    checks++;
    if (cyc - c0 > L + 3) begin failures++; $display("drain took %0d clocks", cyc - c0); end
    wait (got.size() == 4 * L);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
