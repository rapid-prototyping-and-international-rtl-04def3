// block_interleaver: byte-wise block interleaver between the RS code and the
// convolutional code (and, with DEINT = 1, the matching de-interleaver on
// the receive side).
//
// A block of ROWS x COLS bytes (ROWS Reed-Solomon codewords of COLS bytes)
// is written into a buffer row by row, i.e. codeword after codeword, and
// read out column by column, so consecutive output bytes come from different
// codewords. A burst of errors left by the Viterbi decoder is thereby spread
// over several codewords. With DEINT = 1 the write order is by column and the
// read order by row, which undoes the permutation.
//
// The document places a block interleaver between the RS encoder and the
// convolutional encoder; its dimensions and the row/column convention are
// this design's choice (one row per RS codeword).
//
// Interface: valid/ready byte streams. The single buffer is filled (one byte
// per clock) and then drained (one byte per clock, registered output), so a
// block takes 2*ROWS*COLS clocks and input is held off while draining.
module block_interleaver #(
  parameter int unsigned ROWS  = 2,
  parameter int unsigned COLS  = 255,
  parameter int unsigned W     = 8,
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

  logic [W-1:0] mem [L];

  logic             drain_q;
  logic [AW-1:0]    seq_q;                 // sequential (row-major) address
  logic [$clog2(ROWS)-1:0] r_q;            // column-major order: row ...
  logic [$clog2(COLS)-1:0] c_q;            // ... and column
  logic [AW-1:0]    col_addr;
  logic [AW-1:0]    cnt_q;
  logic             can_load;

  assign col_addr = AW'(r_q) * AW'(COLS) + AW'(c_q);
  assign can_load = !out_valid || out_ready;
  assign in_ready = !drain_q;

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[DEINT ? col_addr : seq_q] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      drain_q   <= 1'b0;
      seq_q     <= '0;
      r_q       <= '0;
      c_q       <= '0;
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
        out_data  <= mem[DEINT ? seq_q : col_addr];
        step = 1'b1;
      end
      if (step) begin
        seq_q <= seq_q + 1'b1;
        if (r_q == $bits(r_q)'(ROWS - 1)) begin
          r_q <= '0;
          c_q <= c_q + 1'b1;
        end else begin
          r_q <= r_q + 1'b1;
        end
        if (cnt_q == AW'(L - 1)) begin
          cnt_q   <= '0;
          seq_q   <= '0;
          r_q     <= '0;
          c_q     <= '0;
          drain_q <= !drain_q;
        end else begin
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end

endmodule
