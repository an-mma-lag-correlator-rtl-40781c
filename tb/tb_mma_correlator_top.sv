// tb_mma_correlator_top: end-to-end test of the correlator at reduced size.
//
// Size: 8 antennas, 2 samplers per antenna, PAR = 4 samples per clock,
// 64-word segments, 8-lag correlators in 4 x 8 chips (2 chips per matrix,
// 8 matrices, 16 LTAs).
//
// Every sampler s observes its own random +-1 sky signal x_s; antenna a sees
// it G[a] samples late (a geometric delay). The expected correlation of an
// antenna pair (prompt p, delayed d) is then known in closed form: a peak of
// full strength at the lag where G[p] - G[d] equals the lag the correlator
// represents, noise elsewhere. Full strength is the number of integrated
// clocks, n_seg * (segment length - (LAGS - 1)), because of the blanking at
// each segment jump. One integration per phase is steered into LTA bin 1 and
// every LTA value is read back through the host port and checked.
//
// Phases and the mechanism each one exercises:
//  A  station delays compensate G[a]      -> delay lines (all pairs peak at lag 0)
//  C  one active sampler feeds 2 channels -> active-sampler switch and lag
//                                            offset of the copied channel
//  D  every 2nd sample discarded          -> rate switch; card outputs copied
//                                            with LAGS-sample offsets
//  E  16 memory cycles per integration    -> integrator saturation / overflow
//  F  first = 0 for two dumps             -> LTA accumulation over dumps
//  G  n_seg = 1                           -> read-out overrun
// Counts of each mechanism are printed; one that never happened fails.
module tb_mma_correlator_top;
  import mma_pkg::*;

  localparam int N_ANT = 8, N_SAMP = 2, PAR = 4, SEG_WORDS = 64, DL_DEPTH = 64;
  localparam int ROWS = 4, COLS = 8, LAGS = 8, ACC_W = 12, N_BINS = 4, LTA_W = 32;
  localparam int DW = $clog2(DL_DEPTH * PAR);
  localparam int NCH_D = N_ANT / ROWS;
  localparam int NCHIP = (N_ANT / COLS) * NCH_D;
  localparam int NV = ROWS * COLS * LAGS;
  localparam int MAXV = (1 << (ACC_W - 1)) - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic samp_valid = 1'b0;
  samp_t samp_word [N_ANT][N_SAMP][PAR];
  logic [DW-1:0] delay [N_ANT][N_SAMP];
  logic restart = 1'b0;
  logic [0:0] act_shift = '0;
  logic [1:0] dec_log2 [N_SAMP];
  logic [4:0] n_seg = 5'd2;
  logic [1:0] bin_sel = '0;
  logic first = 1'b1;
  logic dump, overrun;
  logic [31:0] dump_count;
  logic [0:0] rd_chan = '0;
  logic [1:0] rd_out = '0;
  logic [0:0] rd_chip = '0;
  logic [1:0] rd_bin = '0;
  logic [7:0] rd_addr = '0;
  logic signed [LTA_W-1:0] rd_data;
  logic rd_ovf;

  int checks = 0, failures = 0;

  mma_correlator_top #(
    .N_ANT(N_ANT), .N_SAMP(N_SAMP), .PAR(PAR), .DL_DEPTH(DL_DEPTH),
    .SEG_WORDS(SEG_WORDS), .ROWS(ROWS), .COLS(COLS), .LAGS(LAGS),
    .ACC_W(ACC_W), .N_BINS(N_BINS), .LTA_W(LTA_W)
  ) dut (.*);

  always #5 clk = ~clk;

  // ------------------------------------------------------------ sky signal
  function automatic samp_t sky(int s, longint n);
    int unsigned h;
    h = (32'(n) ^ (32'(s) * 32'h68E31DA4)) * 32'h9E3779B1;
    h = h ^ (h >> 16);
    h = h * 32'h7FEB352D;
    h = h ^ (h >> 15);
    return h[7] ? S_POS : S_NEG;
  endfunction

  int     G [N_ANT];
  longint w = 0;

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      samp_valid = 1'b1;
      for (int a = 0; a < N_ANT; a++)
        for (int s = 0; s < N_SAMP; s++)
          for (int i = 0; i < PAR; i++)
            samp_word[a][s][i] = sky(s, w * PAR + i - G[a]);
      w++;
    end
  end

  // ------------------------------------------------------------ helpers
  task automatic wait_dumps(int n);
    repeat (n) begin
      @(posedge clk);
      while (!dump) @(posedge clk);
    end
    #2;
  endtask

  // Apply a mode with restart, let it settle, then put one integration into
  // LTA bin 1 (first = 1) and wait for its read-out to finish.
  task automatic capture();
    @(negedge clk); restart = 1'b1;
    @(negedge clk); restart = 1'b0;
    wait_dumps(3);
    bin_sel = 2'd1; first = 1'b1;
    wait_dumps(1);          // this dump ends the integration going into bin 1
    bin_sel = 2'd0;
    repeat (NV + 8) @(negedge clk);
  endtask

  int n_peaks, n_ovf_seen;

  int phase;

  // peak_lag(s, k, p, d): lag at which the pair (p, d) peaks in matrix (s, k)
  // in the current phase, -1 if it has no peak there
  function automatic int peak_lag(int s, int k, int p, int d);
    int diff;
    diff = G[p] - G[d];
    case (phase)
      0: return 0;                                          // A: compensated
      1: begin                                              // C: ch1 = copy of s0
           int l = diff - ((s == 1) ? LAGS : 0);
           return (l >= 0 && l < LAGS) ? l : -1;
         end
      2: begin                                              // D: half rate
           int c, l;
           c = k / (PAR / 2);
           if (diff % 2 != 0) return -1;
           l = diff / 2 - c * LAGS;
           return (l >= 0 && l < LAGS) ? l : -1;
         end
      default: return 0;
    endcase
  endfunction

  task automatic check_bin(int bin, int full, bit sat, string name);
    int bad = 0;
    n_peaks = 0;
    for (int s = 0; s < N_SAMP; s++)
      for (int k = 0; k < PAR; k++)
        for (int i = 0; i < NCHIP; i++)
          for (int ad = 0; ad < NV; ad++) begin
            int ci, l, p, d, pk, v;
            bit cell_peak, ok;
            ci = ad / LAGS; l = ad % LAGS;
            p = (i / NCH_D) * COLS + ci % COLS;
            d = (i % NCH_D) * ROWS + ci / COLS;
            pk = peak_lag(s, k, p, d);
            @(negedge clk);
            rd_chan = 1'(s); rd_out = 2'(k); rd_chip = 1'(i); rd_bin = 2'(bin);
            rd_addr = 8'(ad);
            @(posedge clk); #1;
            v = int'(rd_data);
            checks++;
            cell_peak = (pk >= 0);
            ok = 1'b1;
            if (pk == l) begin
              n_peaks++;
              if (v != (sat ? MAXV : full)) ok = 1'b0;
            end else if (v > full / 2 || v < -full / 2) ok = 1'b0;
            if (sat) begin
              checks++;
              if (rd_ovf != cell_peak) ok = 1'b0;
              if (rd_ovf) n_ovf_seen++;
            end
            if (!ok) bad++;
            if (!ok && failures + bad < 8)
              $display("FAIL %s s=%0d k=%0d p=%0d d=%0d l=%0d v=%0d peak=%0d", name, s, k,
                       p, d, l, v, pk);
          end
    failures += bad;
    checks++;
    if (n_peaks == 0) begin
      failures++;
      $display("FAIL %s: no peaks", name);
    end
    $display("phase %s: %0d peaks, %0d bad values", name, n_peaks, bad);
  endtask

  int m_delay = 0, m_switch = 0, m_rate = 0, m_ovf = 0, m_lta = 0, m_overrun = 0, m_blank = 0;

  // blanking: clocks where a delayed card output is active but not ok
  always @(posedge clk)
    if (rst_n && dut.g_ant[0].g_card[0].u_delayed.active[0] &&
        !dut.g_ant[0].g_card[0].u_delayed.out_ok[0]) m_blank++;

  always @(posedge clk) if (rst_n && overrun) m_overrun++;

  initial begin
    #400000000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < N_ANT; a++) begin
      G[a] = 2 * a + 1;
      for (int s = 0; s < N_SAMP; s++) begin
        delay[a][s] = DW'(15 - G[a]);
        for (int i = 0; i < PAR; i++) samp_word[a][s][i] = S_ZERO;
      end
    end
    for (int s = 0; s < N_SAMP; s++) dec_log2[s] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // A: delay compensation
    phase = 0;
    capture();
    check_bin(1, 2 * (SEG_WORDS * PAR - LAGS + 1), 1'b0, "A delays");
    m_delay = n_peaks;

    // C: one active sampler, channel 1 copies sampler 0 with a LAGS offset
    phase = 1;
    for (int a = 0; a < N_ANT; a++) begin
      G[a] = 2 * a;
      for (int s = 0; s < N_SAMP; s++) delay[a][s] = '0;
    end
    act_shift = 1'b1;
    capture();
    check_bin(1, 2 * (SEG_WORDS * PAR - LAGS + 1), 1'b0, "C active samplers");
    m_switch = n_peaks;

    // D: every second sample discarded; card outputs 2,3 offset by LAGS
    phase = 2;
    for (int a = 0; a < N_ANT; a++) G[a] = 4 * a;
    act_shift = 1'b0;
    for (int s = 0; s < N_SAMP; s++) dec_log2[s] = 2'd1;
    capture();
    check_bin(1, 2 * (2 * SEG_WORDS * PAR - LAGS + 1), 1'b0, "D half rate");
    m_rate = n_peaks;

    // E: 16 memory cycles per integration saturate the peak lags
    phase = 0;
    for (int a = 0; a < N_ANT; a++) begin
      G[a] = 2 * a + 1;
      for (int s = 0; s < N_SAMP; s++) delay[a][s] = DW'(15 - G[a]);
    end
    for (int s = 0; s < N_SAMP; s++) dec_log2[s] = 2'd0;
    n_seg = 5'd16;
    n_ovf_seen = 0;
    capture();
    check_bin(1, 16 * (SEG_WORDS * PAR - LAGS + 1), 1'b1, "E overflow");
    m_ovf = n_ovf_seen;

    // F: LTA sums three integrations in bin 2
    n_seg = 5'd2;
    wait_dumps(2);
    bin_sel = 2'd2; first = 1'b1;
    wait_dumps(1);
    first = 1'b0;
    wait_dumps(2);
    bin_sel = 2'd0; first = 1'b1;
    repeat (NV + 8) @(negedge clk);
    check_bin(2, 3 * 2 * (SEG_WORDS * PAR - LAGS + 1), 1'b0, "F LTA");
    m_lta = n_peaks;

    // G: one memory cycle per integration is as long as a read-out, so the
    // next dump arrives while the read-out is still running
    n_seg = 5'd1;
    wait_dumps(4);
    n_seg = 5'd2;
    wait_dumps(2);

    $display("mechanisms: delay=%0d switch=%0d rate=%0d overflow=%0d lta=%0d overrun=%0d blank=%0d dumps=%0d",
             m_delay, m_switch, m_rate, m_ovf, m_lta, m_overrun, m_blank, dump_count);
    checks++;
    if (m_delay == 0 || m_switch == 0 || m_rate == 0 || m_ovf == 0 || m_lta == 0 ||
        m_overrun == 0 || m_blank == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
