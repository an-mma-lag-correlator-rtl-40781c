// delay_line: integer station delay for one sampler.
//
// The sampler delivers PAR samples per clock (sample i of a word is the
// i-th oldest; one word = PAR consecutive samples). Every valid word is
// written into a circular RAM of DEPTH words. The delay, in samples, is split
// into a coarse part (whole words, done by reading the RAM behind the write
// pointer) and a fine part (0..PAR-1 samples, done by a shifter that takes the
// output word across two neighbouring RAM words). Delays from 0 to
// DEPTH*PAR-1 samples are possible, in steps of one sample.
//
// Timing: one registered stage. When in_valid is high, out_word on the next
// clock holds the samples that entered `delay` samples before in_word.
// out_valid follows in_valid by one clock. A change of `delay` takes effect on
// the next word.
//
// Following the design memo: a RAM of 524,288 samples per sampler (one bit per
// sample in each of the two bit planes, i.e. 16384 words of 32 samples, a
// 131 us range at 4 GS/s) addressed in 32-sample steps, plus extra logic for
// single-sample resolution. The two-word shifter is this design's choice.
module delay_line
  import mma_pkg::*;
#(
  parameter int PAR   = 32,
  parameter int DEPTH = 16384,
  localparam int AW = $clog2(DEPTH),
  localparam int DW = $clog2(DEPTH * PAR)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  samp_t         in_word  [PAR],
  input  logic [DW-1:0] delay,
  output logic          out_valid,
  output samp_t         out_word [PAR]
);

  localparam int FW = $clog2(PAR);

  samp_t        mem [DEPTH][PAR];
  logic [AW-1:0] wptr;

  logic [AW-1:0] coarse;
  logic [FW-1:0] fine;
  samp_t         word_a [PAR];   // newer word
  samp_t         word_b [PAR];   // older word
  samp_t         shifted [PAR];

  assign coarse = AW'(delay >> FW);
  assign fine   = FW'(delay);

  always_comb begin
    for (int i = 0; i < PAR; i++) begin
      word_a[i] = (coarse == '0) ? in_word[i] : mem[wptr - coarse][i];
      word_b[i] = mem[wptr - coarse - AW'(1)][i];
    end
    // Concatenation {word_a, word_b} holds 2*PAR samples, word_b older.
    for (int i = 0; i < PAR; i++) begin
      if (i >= int'(fine)) shifted[i] = word_a[i - int'(fine)];
      else                 shifted[i] = word_b[PAR + i - int'(fine)];
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) mem[wptr] <= in_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < PAR; i++) out_word[i] <= S_ZERO;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        wptr     <= wptr + AW'(1);
        out_word <= shifted;
      end
    end
  end

endmodule
