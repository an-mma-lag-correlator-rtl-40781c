// seg_memory: memory card that turns the PAR-wide interleaved sampler stream
// into PAR outputs that each carry contiguous segments of samples.
//
// The RAM holds PAR*SEG_WORDS words of PAR samples. Words are written in time
// order at a circular write pointer, so the RAM is a ring of consecutive
// samples. It is read as a ring of N_F "FIFOs": N_F regions of equal size.
// At full rate (rate_log2 = 0) N_F = PAR and each region holds SEG_WORDS
// words; when the input carries only every 2**rate_log2-th word slot (fewer
// samples per clock after discarding samples), N_F = PAR >> rate_log2 and
// each region is 2**rate_log2 times longer. Reader f starts when the writer
// has put the first word into region f, then reads one sample per clock
// through the region, and finishes exactly when the writer returns. Each
// output therefore sees one long run of contiguous samples (a segment), then a
// jump in time, then the next segment.
//
// Output k is served by reader f = k mod N_F as copy c = k / N_F. In the prompt
// card (DELAYED = 0) every copy carries the same samples. In the delayed card
// (DELAYED = 1) copy c is read lag_base + c*LAGS samples earlier, so the
// correlator fed by output k covers lags lag_base + c*LAGS ... + LAGS-1. This
// is how the card makes long lags by RAM addressing when the rate is reduced
// or when a channel copies another sampler (lag_base is then non-zero).
//
// out_ok[k] tells the correlators whether to accumulate. In the prompt card it
// is high while reader f is active. In the delayed card it is also low for the
// first LAGS-1 samples of each segment, while the time jump is still inside
// the correlators' lag shift registers (the blanking of the discontinuity),
// and, in the first segment after a restart, for samples older than the
// restart.
//
// Timing: out_samp, out_ok and seg_start are registered, one clock after the
// reader position they belong to. seg_start pulses when reader 0 begins a
// segment; it marks the fundamental memory cycle. The lag offset
// largest lag offset, lag_base + (2**rate_log2 - 1)*LAGS, must stay
// below one region.
//
// Following the design memo: PAR = 32 FIFOs of 131,072 samples in a ring (one
// 32K x 128 RAM per sample bit, 1.05 ms segments at 125 MHz), prompt and
// delayed cards, larger lags by offset addressing, blanking. The reader start
// rule, the copy mapping and the ok flags are this design's choice.
module seg_memory
  import mma_pkg::*;
#(
  parameter int PAR       = 32,
  parameter int SEG_WORDS = 4096,
  parameter int LAGS      = 128,
  parameter bit DELAYED   = 1'b0,
  localparam int TW    = PAR * SEG_WORDS,   // words in the RAM
  localparam int SA_W  = $clog2(TW * PAR),  // sample address width
  localparam int DEC_W = $clog2($clog2(PAR) + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restart,
  input  logic [DEC_W-1:0] rate_log2,
  input  logic [SA_W-1:0]  lag_base,
  input  logic             wr_valid,
  input  samp_t            wr_word  [PAR],
  output samp_t            out_samp [PAR],
  output logic             out_ok   [PAR],
  output logic             seg_start
);

  localparam int LP = $clog2(PAR);
  localparam int AW = $clog2(TW);

  samp_t          mem [TW][PAR];
  logic [AW-1:0]  wp;
  logic           r0_started;   // reader 0 has begun a segment since restart
  logic           r0_first;     // reader 0 is in its first segment

  logic [SA_W-1:0] q      [PAR];   // position of reader f in its region
  logic            active [PAR];

  logic [AW-1:0]   reg_words;      // words per region
  logic [SA_W-1:0] reg_len;        // samples per region
  int unsigned     n_f;

  assign n_f       = PAR >> rate_log2;
  assign reg_words = AW'(SEG_WORDS) << rate_log2;
  assign reg_len   = SA_W'(reg_words) << LP;

  always_ff @(posedge clk) begin
    if (wr_valid) mem[wp] <= wr_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp         <= '0;
      r0_started <= 1'b0;
      r0_first   <= 1'b1;
    end else if (restart) begin
      wp         <= '0;
      r0_started <= 1'b0;
      r0_first   <= 1'b1;
    end else begin
      if (wr_valid) wp <= wp + AW'(1);
      if (g_rd[0].start) begin
        r0_started <= 1'b1;
        r0_first   <= !r0_started;
      end
    end
  end

  // Readers.
  for (genvar f = 0; f < PAR; f++) begin : g_rd
    logic start;
    assign start = wr_valid && (f < int'(n_f)) &&
                   (wp == AW'(f) * reg_words + AW'(1));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        q[f]      <= '0;
        active[f] <= 1'b0;
      end else if (restart) begin
        q[f]      <= '0;
        active[f] <= 1'b0;
      end else if (start) begin
        q[f]      <= '0;
        active[f] <= 1'b1;
      end else if (active[f]) begin
        if (q[f] == reg_len - SA_W'(1)) active[f] <= 1'b0;
        else                            q[f] <= q[f] + SA_W'(1);
      end
    end
  end

  // Outputs.
  for (genvar k = 0; k < PAR; k++) begin : g_out
    int unsigned     f, c;
    logic [SA_W-1:0] addr;
    logic [SA_W-1:0] offs;
    logic            ok;

    assign f    = k % n_f;
    assign c    = k / n_f;
    assign offs = DELAYED ? (lag_base + SA_W'(c * LAGS)) : '0;
    assign addr = SA_W'(f) * reg_len + q[f] - offs;
    // In the first segment of reader 0 nothing older than the restart exists.
    assign ok   = active[f] &&
                  (!DELAYED || ((q[f] >= SA_W'(LAGS - 1)) &&
                                (f != 0 || !r0_first || q[f] >= offs + SA_W'(LAGS - 1))));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_samp[k] <= S_ZERO;
        out_ok[k]   <= 1'b0;
      end else begin
        out_samp[k] <= mem[addr[SA_W-1:LP]][addr[LP-1:0]];
        out_ok[k]   <= ok;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) seg_start <= 1'b0;
    else        seg_start <= g_rd[0].start && !restart;
  end

endmodule
