// mma_correlator_top: the lag correlator for an array of N_ANT antennas with
// N_SAMP samplers each.
//
// Station side, per antenna and sampler: a delay_line applies the integer
// station delay to the sampler's PAR-wide output. Per antenna, a
// switch_matrix selects the active samplers and the sample discarding and
// routes them to N_SAMP channels; each channel writes one prompt and one
// delayed seg_memory card, which turn the interleaved stream into PAR outputs
// of contiguous segments.
//
// Baseline side: for every channel s and card output k there is one
// correlator_matrix of N_ANT x N_ANT correlators (prompt cards on one axis,
// delayed cards on the other), N_SAMP*PAR matrices in all. Every chip's
// read-out goes into its own lta. One dump_timer, driven by the memory cycle
// of antenna 0 channel 0, dumps all chips together.
//
// Modes: act_shift selects N_SAMP >> act_shift active samplers, and
// dec_log2[s] the sample discarding of sampler s (mixed modes allowed).
// Channel m is fed from sampler m mod n_active. Its cards run at
// rate_log2 = dec_log2 of that sampler, and its delayed card is offset by
// lag_base = (m / n_active) * (LAGS << rate_log2) samples, so that the
// channels copying one sampler cover consecutive lag ranges: channel copy q
// and card output copy c give lags (q * 2**rate_log2 + c) * LAGS + 0..LAGS-1.
// A mode change is applied with a `restart` pulse.
//
// Integration control: n_seg memory cycles per dump (1..16); bin_sel and
// first are sampled at each dump and steer the LTA bins for the read-out of
// that integration.
//
// Host read-out: rd_chan, rd_out, rd_chip, rd_bin, rd_addr select one LTA
// word; rd_data / rd_ovf follow one clock later.
//
// The memo's system has N_ANT = 40, N_SAMP = 8, PAR = 32 and 128-lag
// correlators in 4 x 8 chips, 12,800 chips in all. Every default here is that
// system's except N_ANT, which is 16 (2048 chips): elaborating the top takes
// about 6.4 MB of tool memory per chip, so 40 antennas would need about 80 GB.
// N_ANT may be set to 40 (any multiple of COLS and ROWS).
module mma_correlator_top
  import mma_pkg::*;
#(
  parameter int N_ANT     = 16,
  parameter int N_SAMP    = 8,
  parameter int PAR       = 32,
  parameter int DL_DEPTH  = 16384,
  parameter int SEG_WORDS = 4096,
  parameter int ROWS      = 4,
  parameter int COLS      = 8,
  parameter int LAGS      = 128,
  parameter int ACC_W     = 12,
  parameter int N_BINS    = 4,
  parameter int LTA_W     = 32,
  localparam int DW    = $clog2(DL_DEPTH * PAR),
  localparam int AS_W  = (N_SAMP > 1) ? $clog2(N_SAMP) : 1,
  localparam int DEC_W = $clog2($clog2(PAR) + 1),
  localparam int SA_W  = $clog2(PAR * SEG_WORDS * PAR),
  localparam int NCHIP = (N_ANT / COLS) * (N_ANT / ROWS),
  localparam int RA_W  = $clog2(ROWS * COLS * LAGS),
  localparam int BW    = (N_BINS > 1) ? $clog2(N_BINS) : 1,
  localparam int CH_W  = (N_SAMP > 1) ? $clog2(N_SAMP) : 1,
  localparam int K_W   = $clog2(PAR),
  localparam int CP_W  = (NCHIP > 1) ? $clog2(NCHIP) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // sampler outputs, PAR samples per clock per sampler
  input  logic                    samp_valid,
  input  samp_t                   samp_word [N_ANT][N_SAMP][PAR],
  // station delays in samples
  input  logic [DW-1:0]           delay     [N_ANT][N_SAMP],
  // mode
  input  logic                    restart,
  input  logic [AS_W-1:0]         act_shift,
  input  logic [DEC_W-1:0]        dec_log2  [N_SAMP],
  // integration
  input  logic [4:0]              n_seg,
  input  logic [BW-1:0]           bin_sel,
  input  logic                    first,
  output logic                    dump,
  output logic [31:0]             dump_count,
  output logic                    overrun,
  // host read-out of the LTAs
  input  logic [CH_W-1:0]         rd_chan,
  input  logic [K_W-1:0]          rd_out,
  input  logic [CP_W-1:0]         rd_chip,
  input  logic [BW-1:0]           rd_bin,
  input  logic [RA_W-1:0]         rd_addr,
  output logic signed [LTA_W-1:0] rd_data,
  output logic                    rd_ovf
);

  // ---------------------------------------------------------------- station
  samp_t dl_word  [N_ANT][N_SAMP][PAR];
  logic  dl_valid [N_ANT][N_SAMP];
  samp_t ch_word  [N_ANT][N_SAMP][PAR];
  logic  ch_valid [N_ANT][N_SAMP];
  samp_t p_samp   [N_ANT][N_SAMP][PAR];
  logic  p_ok     [N_ANT][N_SAMP][PAR];
  samp_t d_samp   [N_ANT][N_SAMP][PAR];
  logic  d_ok     [N_ANT][N_SAMP][PAR];
  logic  seg_start_p [N_ANT][N_SAMP];
  logic  seg_start_d [N_ANT][N_SAMP];

  int unsigned n_act;
  assign n_act = N_SAMP >> act_shift;

  logic [DEC_W-1:0] ch_rate [N_SAMP];
  logic [SA_W-1:0]  ch_base [N_SAMP];
  for (genvar m = 0; m < N_SAMP; m++) begin : g_mode
    assign ch_rate[m] = dec_log2[m % n_act];
    assign ch_base[m] = SA_W'((m / n_act) * (LAGS << ch_rate[m]));
  end

  for (genvar a = 0; a < N_ANT; a++) begin : g_ant
    for (genvar s = 0; s < N_SAMP; s++) begin : g_dl
      delay_line #(.PAR(PAR), .DEPTH(DL_DEPTH)) u_dl (
        .clk       (clk),
        .rst_n     (rst_n),
        .in_valid  (samp_valid),
        .in_word   (samp_word[a][s]),
        .delay     (delay[a][s]),
        .out_valid (dl_valid[a][s]),
        .out_word  (dl_word[a][s])
      );
    end

    switch_matrix #(.N_SAMP(N_SAMP), .PAR(PAR)) u_sw (
      .clk       (clk),
      .rst_n     (rst_n),
      .restart   (restart),
      .act_shift (act_shift),
      .dec_log2  (dec_log2),
      .in_valid  (dl_valid[a][0]),
      .in_word   (dl_word[a]),
      .out_valid (ch_valid[a]),
      .out_word  (ch_word[a])
    );

    for (genvar m = 0; m < N_SAMP; m++) begin : g_card
      seg_memory #(.PAR(PAR), .SEG_WORDS(SEG_WORDS), .LAGS(LAGS), .DELAYED(1'b0)) u_prompt (
        .clk       (clk),
        .rst_n     (rst_n),
        .restart   (restart),
        .rate_log2 (ch_rate[m]),
        .lag_base  ('0),
        .wr_valid  (ch_valid[a][m]),
        .wr_word   (ch_word[a][m]),
        .out_samp  (p_samp[a][m]),
        .out_ok    (p_ok[a][m]),
        .seg_start (seg_start_p[a][m])
      );
      seg_memory #(.PAR(PAR), .SEG_WORDS(SEG_WORDS), .LAGS(LAGS), .DELAYED(1'b1)) u_delayed (
        .clk       (clk),
        .rst_n     (rst_n),
        .restart   (restart),
        .rate_log2 (ch_rate[m]),
        .lag_base  (ch_base[m]),
        .wr_valid  (ch_valid[a][m]),
        .wr_word   (ch_word[a][m]),
        .out_samp  (d_samp[a][m]),
        .out_ok    (d_ok[a][m]),
        .seg_start (seg_start_d[a][m])
      );
    end
  end

  // ------------------------------------------------------ integration timing
  logic [BW-1:0] dump_bin;
  logic          dump_first;

  dump_timer #(.MAX_SEG(16)) u_timer (
    .clk        (clk),
    .rst_n      (rst_n),
    .restart    (restart),
    .seg_start  (seg_start_p[0][0]),
    .n_seg      (n_seg),
    .dump       (dump),
    .dump_count (dump_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dump_bin   <= '0;
      dump_first <= 1'b1;
    end else if (dump) begin
      dump_bin   <= bin_sel;
      dump_first <= first;
    end
  end

  // --------------------------------------------------------------- baseline
  logic signed [LTA_W-1:0] lta_data [N_SAMP][PAR][NCHIP];
  logic                    lta_ovf  [N_SAMP][PAR][NCHIP];
  logic                    chip_overrun [N_SAMP][PAR][NCHIP];

  for (genvar s = 0; s < N_SAMP; s++) begin : g_ch
    for (genvar k = 0; k < PAR; k++) begin : g_k
      samp_t pv [N_ANT];
      logic  po [N_ANT];
      samp_t dv [N_ANT];
      logic  dk [N_ANT];
      logic                    ro_valid   [NCHIP];
      logic [RA_W-1:0]         ro_addr    [NCHIP];
      logic signed [ACC_W-1:0] ro_data    [NCHIP];
      logic                    ro_ovf     [NCHIP];

      for (genvar a = 0; a < N_ANT; a++) begin : g_a
        assign pv[a] = p_samp[a][s][k];
        assign po[a] = p_ok[a][s][k];
        assign dv[a] = d_samp[a][s][k];
        assign dk[a] = d_ok[a][s][k];
      end

      correlator_matrix #(.N_ANT(N_ANT), .ROWS(ROWS), .COLS(COLS), .LAGS(LAGS),
                          .ACC_W(ACC_W)) u_mat (
        .clk        (clk),
        .rst_n      (rst_n),
        .prompt     (pv),
        .p_ok       (po),
        .delayed    (dv),
        .d_ok       (dk),
        .dump       (dump),
        .ro_valid   (ro_valid),
        .ro_addr    (ro_addr),
        .ro_data    (ro_data),
        .ro_ovf     (ro_ovf),
        .ro_overrun (chip_overrun[s][k])
      );

      for (genvar i = 0; i < NCHIP; i++) begin : g_lta
        lta #(.N_ADDR(ROWS * COLS * LAGS), .N_BINS(N_BINS), .IN_W(ACC_W),
              .ACC_W(LTA_W)) u_lta (
          .clk      (clk),
          .rst_n    (rst_n),
          .in_valid (ro_valid[i]),
          .in_addr  (ro_addr[i]),
          .in_data  (ro_data[i]),
          .in_ovf   (ro_ovf[i]),
          .in_bin   (dump_bin),
          .in_first (dump_first),
          .rd_bin   (rd_bin),
          .rd_addr  (rd_addr),
          .rd_data  (lta_data[s][k][i]),
          .rd_ovf   (lta_ovf[s][k][i])
        );
      end
    end
  end

  // ------------------------------------------------------- host read-out mux
  logic [CH_W-1:0] sel_chan;
  logic [K_W-1:0]  sel_out;
  logic [CP_W-1:0] sel_chip;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_chan <= '0;
      sel_out  <= '0;
      sel_chip <= '0;
      overrun  <= 1'b0;
    end else begin
      sel_chan <= rd_chan;
      sel_out  <= rd_out;
      sel_chip <= rd_chip;
      overrun  <= 1'b0;
      for (int s = 0; s < N_SAMP; s++)
        for (int k = 0; k < PAR; k++)
          for (int i = 0; i < NCHIP; i++)
            if (chip_overrun[s][k][i]) overrun <= 1'b1;
    end
  end

  assign rd_data = lta_data[sel_chan][sel_out][sel_chip];
  assign rd_ovf  = lta_ovf[sel_chan][sel_out][sel_chip];

endmodule
