// randomizer: block-synchronous energy-dispersal scrambler.
//
// Every data bit is XORed with the output of a 15-stage PRBS generator with
// polynomial 1 + x^14 + x^15. The generator is loaded with the seed
// 100101010000000 at reset and again after every BLOCK_BYTES bytes, so each
// block (one PHY-SDU worth of user bytes) sees the same "fixed randomizer
// pattern". Because XOR is its own inverse the same module de-scrambles on
// the receive side.
//
// The document states only that the information bits are scrambled with a
// fixed randomizer pattern before RS encoding; the polynomial, seed and the
// restart per block are this design's choice (the usual one for OFDM
// broadband systems).
//
// Interface: valid/ready byte streams, bits processed MSB first, eight PRBS
// steps per byte. One byte per clock; one register stage of latency.
module randomizer #(
  parameter int unsigned BLOCK_BYTES = 478,
  parameter logic [14:0] SEED        = 15'b100101010000000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_data
);

  logic [14:0] lfsr_q;
  logic [$clog2(BLOCK_BYTES+1)-1:0] cnt_q;
  logic [7:0]  mask;
  logic [14:0] lfsr_next;

  // Eight PRBS steps; the first output bit covers the data MSB.
  always_comb begin
    logic [14:0] s;
    logic        fb;
    s = lfsr_q;
    for (int i = 7; i >= 0; i--) begin
      fb      = s[14] ^ s[13];
      mask[i] = fb;
      s       = {s[13:0], fb};
    end
    lfsr_next = s;
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lfsr_q    <= SEED;
      cnt_q     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        out_valid <= 1'b1;
        out_data  <= in_data ^ mask;
        if (cnt_q == $bits(cnt_q)'(BLOCK_BYTES - 1)) begin
          cnt_q  <= '0;
          lfsr_q <= SEED;
        end else begin
          cnt_q  <= cnt_q + 1'b1;
          lfsr_q <= lfsr_next;
        end
      end
    end
  end

endmodule
