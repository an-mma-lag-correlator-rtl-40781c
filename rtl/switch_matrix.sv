// switch_matrix: mode switching between the samplers of one antenna and the
// memory cards (one prompt and one delayed card per channel).
//
// Two things are selected here.
//  * Active samplers: with act_shift = 0, 1, 2, 3 the number of active
//    samplers is N_SAMP, N_SAMP/2, N_SAMP/4, N_SAMP/8. Output channel m is fed
//    from sampler (m mod n_active), so an active sampler also drives the
//    memory cards of inactive samplers; those cards then produce higher lags
//    (the lag offset is applied in the delayed memory).
//  * Sample discarding: each sampler has its own dec_log2 (0..log2 PAR). Only
//    every 2**dec_log2-th sample is kept, and the kept samples of 2**dec_log2
//    input words are packed into one output word of PAR consecutive kept
//    samples. The output word rate is then 1/2**dec_log2 of the input rate,
//    which is what lets the memory re-use its outputs for more lags.
//
// Timing: in_valid marks a sampler word (all samplers share one clock and
// valid). out_valid[m] pulses on the clock after the word that completes a
// packed word for channel m. A change of act_shift or dec_log2 should be
// followed by `restart`, which empties the packers.
//
// The design memo gives the function (8/4/2/1 active samplers, discarding
// samples, re-routing to use all correlator chips); the packing scheme and
// the modulo routing are this design's choice.
module switch_matrix
  import mma_pkg::*;
#(
  parameter int N_SAMP = 8,
  parameter int PAR    = 32,
  localparam int AS_W = (N_SAMP > 1) ? $clog2(N_SAMP) : 1,
  localparam int DEC_W = $clog2($clog2(PAR) + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restart,
  input  logic [AS_W-1:0]  act_shift,
  input  logic [DEC_W-1:0] dec_log2 [N_SAMP],
  input  logic             in_valid,
  input  samp_t            in_word  [N_SAMP][PAR],
  output logic             out_valid [N_SAMP],
  output samp_t            out_word  [N_SAMP][PAR]
);

  localparam int LP = $clog2(PAR);

  int unsigned n_act;
  assign n_act = N_SAMP >> act_shift;

  for (genvar m = 0; m < N_SAMP; m++) begin : g_ch
    int unsigned   src;
    logic [DEC_W-1:0] d;
    logic [LP:0]   cnt;        // input words collected into the current word
    samp_t         pack [PAR];
    samp_t         pack_nxt [PAR];
    int unsigned   per_word;   // kept samples per input word

    assign src      = m % n_act;
    assign d        = dec_log2[src];
    assign per_word = PAR >> d;

    always_comb begin
      pack_nxt = pack;
      for (int j = 0; j < PAR; j++) begin
        if (j < int'(per_word))
          pack_nxt[int'(cnt) * int'(per_word) + j] = in_word[src][j << d];
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt          <= '0;
        out_valid[m] <= 1'b0;
        for (int j = 0; j < PAR; j++) begin
          pack[j]        <= S_ZERO;
          out_word[m][j] <= S_ZERO;
        end
      end else if (restart) begin
        cnt          <= '0;
        out_valid[m] <= 1'b0;
      end else begin
        out_valid[m] <= 1'b0;
        if (in_valid) begin
          if (int'(cnt) == (1 << d) - 1) begin
            cnt          <= '0;
            out_word[m]  <= pack_nxt;
            out_valid[m] <= 1'b1;
          end else begin
            cnt  <= cnt + 1'b1;
            pack <= pack_nxt;
          end
        end
      end
    end
  end

endmodule
