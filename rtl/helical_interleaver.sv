// helical_interleaver: bit interleaver after the convolutional encoder (and,
// with DEINT = 1, the soft-value de-interleaver in front of the Viterbi
// decoder).
//
// A block of ROWS x COLS values is written row by row. It is read column by
// column, but row r is rotated by r*SHIFT columns, so the read path runs
// along a helix through the array: output k takes row r = k mod ROWS from
// column (k div ROWS + r*SHIFT) mod COLS. Neighbouring coded bits therefore
// land ROWS positions apart in the output and, with 2..6 bits per symbol,
// in different QAM symbols and bit positions. DEINT = 1 writes in helical
// order and reads row by row, which is the inverse permutation. W sets the
// value width: 1 for coded bits, SOFT_W for soft values.
//
// The document names a helical interleaver as the last TX coding step; the
// array shape and rotation (ROWS = 12, SHIFT = 5) are this design's choice.
// ROWS is a multiple of 6 so a block is a whole number of QPSK, 16-QAM and
// 64-QAM symbols.
//
// Interface: valid/ready streams. Single buffer, filled then drained, one
// value per clock each way; the read has a registered output.
module helical_interleaver #(
  parameter int unsigned ROWS  = 12,
  parameter int unsigned COLS  = 681,
  parameter int unsigned SHIFT = 5,
  parameter int unsigned W     = 1,
  parameter bit          DEINT = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);

  localparam int unsigned L  = ROWS * COLS;
  localparam int unsigned AW = $clog2(L);
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned CW = $clog2(COLS + SHIFT);

  logic [W-1:0] mem [L];

  logic          drain_q;
  logic [AW-1:0] seq_q;
  logic [RW-1:0] r_q;
  logic [CW-1:0] c_q;
  logic [CW-1:0] hc_q;                     // (c + r*SHIFT) mod COLS
  logic [AW-1:0] hel_addr;
  logic [AW-1:0] cnt_q;
  logic          can_load;

  assign hel_addr = AW'(r_q) * AW'(COLS) + AW'(hc_q);
  assign can_load = !out_valid || out_ready;
  assign in_ready = !drain_q;

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[DEINT ? hel_addr : seq_q] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      drain_q   <= 1'b0;
      seq_q     <= '0;
      r_q       <= '0;
      c_q       <= '0;
      hc_q      <= '0;
      cnt_q     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      logic step;
      step = 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (!drain_q) begin
        if (in_valid) step = 1'b1;
      end else if (can_load) begin
        out_valid <= 1'b1;
        out_data  <= mem[DEINT ? seq_q : hel_addr];
        step = 1'b1;
      end
      if (step) begin
        seq_q <= seq_q + 1'b1;
        if (r_q == RW'(ROWS - 1)) begin
          r_q  <= '0;
          c_q  <= c_q + 1'b1;
          hc_q <= c_q + 1'b1;
        end else begin
          r_q  <= r_q + 1'b1;
          hc_q <= (hc_q + CW'(SHIFT) >= CW'(COLS)) ? hc_q + CW'(SHIFT) - CW'(COLS)
                                                   : hc_q + CW'(SHIFT);
        end
        if (cnt_q == AW'(L - 1)) begin
          cnt_q   <= '0;
          seq_q   <= '0;
          r_q     <= '0;
          c_q     <= '0;
          hc_q    <= '0;
          drain_q <= !drain_q;
        end else begin
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end

endmodule
