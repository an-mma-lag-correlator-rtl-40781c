// tb_seg_memory: self-checking test of a prompt and a delayed seg_memory.
//
// Both cards receive the same stream: after a restart, one word every
// R = 2**rate_log2 clocks, word j holding samples j*PAR ... j*PAR+PAR-1 of a
// pseudo-random sequence gen(n). The expected output follows from the
// circular-FIFO description alone: with N_F = PAR/R FIFOs of L = SEG_WORDS*PAR*R
// samples, the g-th filling of FIFO f holds samples (g*N_F + f)*L + q, q < L,
// and is read out one sample per clock starting when the writer has stored the
// first word of the FIFO (plus the card's two-clock latency). Output k shows
// FIFO k mod N_F; in the delayed card it is shifted back by
// lag_base + (k / N_F)*LAGS samples and blanked for the first LAGS-1 samples
// of each segment. Every output, every clock, for four rates and several
// lag_base values is compared, and the segment length (seg_start spacing)
// is checked.
module tb_seg_memory;
  import mma_pkg::*;

  localparam int PAR = 8, SEG_WORDS = 16, LAGS = 4;
  localparam int TW = PAR * SEG_WORDS;
  localparam int SA_W = $clog2(TW * PAR);
  localparam int DEC_W = $clog2($clog2(PAR) + 1);

  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0;
  logic [DEC_W-1:0] rate_log2 = '0;
  logic [SA_W-1:0] lag_base = '0;
  logic wr_valid = 1'b0;
  samp_t wr_word [PAR];
  samp_t p_samp [PAR], d_samp [PAR];
  logic  p_ok [PAR], d_ok [PAR];
  logic  p_ss, d_ss;

  int checks = 0, failures = 0;

  seg_memory #(.PAR(PAR), .SEG_WORDS(SEG_WORDS), .LAGS(LAGS), .DELAYED(1'b0)) u_p (
    .clk, .rst_n, .restart, .rate_log2, .lag_base('0), .wr_valid, .wr_word,
    .out_samp(p_samp), .out_ok(p_ok), .seg_start(p_ss));
  seg_memory #(.PAR(PAR), .SEG_WORDS(SEG_WORDS), .LAGS(LAGS), .DELAYED(1'b1)) u_d (
    .clk, .rst_n, .restart, .rate_log2, .lag_base, .wr_valid, .wr_word,
    .out_samp(d_samp), .out_ok(d_ok), .seg_start(d_ss));

  always #5 clk = ~clk;

  function automatic samp_t gen(longint n);
    int unsigned h;
    h = 32'(n) * 32'h9E3779B1 + 32'h12345;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    case (h % 3)
      0: return S_NEG;
      1: return S_ZERO;
      default: return S_POS;
    endcase
  endfunction

  function automatic void fail(string what, int k, longint e);
    failures++;
    if (failures < 12) $display("FAIL %s k=%0d e=%0d r=%0d", what, k, e, rate_log2);
  endfunction

  task automatic run(int r, int base, int periods);
    int R, NF, LW, L;
    longint e, last_ss;
    int n_ss;
    R = 1 << r; NF = PAR / R; LW = SEG_WORDS * R; L = LW * PAR;
    @(negedge clk);
    rate_log2 = DEC_W'(r); lag_base = SA_W'(base);
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    last_ss = -1; n_ss = 0;
    for (e = 0; e < longint'(periods) * L + (LW + 2) * R; e++) begin
      // write for edge e
      wr_valid = (e % R == 0);
      for (int i = 0; i < PAR; i++) wr_word[i] = gen((e / R) * PAR + i);
      @(posedge clk); #1;
      // outputs after edge e
      for (int k = 0; k < PAR; k++) begin
        int f = k % NF, c = k / NF;
        longint x = e - 1 - longint'(f * LW + 1) * R;
        bit act = (x >= 0);
        longint g = act ? x / L : 0;
        longint q = act ? x % L : 0;
        longint n = (g * NF + f) * L + q;
        longint nd = n - base - c * LAGS;
        bit dok = act && q >= LAGS - 1 && (g > 0 || f > 0 || nd - (LAGS - 1) >= 0);
        checks += 2;
        if (p_ok[k] !== act) fail("p_ok", k, e);
        if (d_ok[k] !== dok) fail("d_ok", k, e);
        if (act) begin
          checks++;
          if (p_samp[k] !== gen(n)) fail("p_samp", k, e);
        end
        if (dok) begin
          checks++;
          if (nd < 0 || d_samp[k] !== gen(nd)) fail("d_samp", k, e);
        end
      end
      if (p_ss) begin
        if (last_ss >= 0) begin
          checks++;
          if (e - last_ss != L) fail("segment length", 0, e);
        end
        last_ss = e; n_ss++;
      end
      @(negedge clk);
    end
    checks++;
    if (n_ss < periods) fail("too few segments", 0, e);
    wr_valid = 1'b0;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < PAR; i++) wr_word[i] = S_ZERO;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(0, 0, 3);
    run(0, 9, 3);
    run(1, 0, 3);
    run(2, 17, 3);
    run(3, 5, 3);
    run(3, 100, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
