// tb_correlator_matrix: checks the antenna-to-chip wiring of a matrix.
//
// All antennas observe one random +-1 source; antenna a sees it a clocks
// late, on both its prompt and its delayed input. The correlator of the
// antenna pair (prompt p, delayed d) must then show a full-strength peak
// (equal to the number of integrated clocks) at lag p - d when 0 <= p-d < LAGS,
// and only noise at every other lag. Every value of every chip's read-out is
// checked against this after a warm-up integration; the reduced size here is
// 16 antennas (8 chips) of 16 lags.
module tb_correlator_matrix;
  import mma_pkg::*;

  localparam int N_ANT = 16, ROWS = 4, COLS = 8, LAGS = 16, ACC_W = 12;
  localparam int NCH_D = N_ANT / ROWS;
  localparam int NCHIP = (N_ANT / COLS) * NCH_D;
  localparam int RA_W = $clog2(ROWS * COLS * LAGS);
  localparam int INTEG = 400;

  logic clk = 1'b0, rst_n = 1'b0, dump = 1'b0;
  samp_t prompt [N_ANT], delayed [N_ANT];
  logic  p_ok [N_ANT], d_ok [N_ANT];
  logic ro_valid [NCHIP], ro_ovf [NCHIP], ro_overrun [NCHIP];
  logic [RA_W-1:0] ro_addr [NCHIP];
  logic signed [ACC_W-1:0] ro_data [NCHIP];

  int checks = 0, failures = 0, peaks = 0;

  correlator_matrix #(.N_ANT(N_ANT), .ROWS(ROWS), .COLS(COLS), .LAGS(LAGS),
                      .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  samp_t src [64];
  bit    checking = 1'b0;
  int    t = 0;

  always @(posedge clk) begin
    #1;
    for (int i = 63; i > 0; i--) src[i] = src[i-1];
    src[0] = ($urandom_range(1) != 0) ? S_POS : S_NEG;
    for (int a = 0; a < N_ANT; a++) begin
      prompt[a] = src[a];
      delayed[a] = src[a];
      p_ok[a] = 1'b1;
      d_ok[a] = 1'b1;
    end
    if (checking) begin
      for (int i = 0; i < NCHIP; i++) begin
        if (ro_valid[i]) begin
          int a, b, ci, l, p, d, v;
          a = i / NCH_D; b = i % NCH_D;
          ci = int'(ro_addr[i]) / LAGS; l = int'(ro_addr[i]) % LAGS;
          p = a * COLS + ci % COLS; d = b * ROWS + ci / COLS;
          v = int'(ro_data[i]);
          checks++;
          if (p - d == l) begin
            peaks++;
            if (v != INTEG) begin
              failures++;
              if (failures < 10) $display("FAIL peak p=%0d d=%0d l=%0d v=%0d", p, d, l, v);
            end
          end else if (v > INTEG / 2 || v < -INTEG / 2) begin
            failures++;
            if (failures < 10) $display("FAIL noise p=%0d d=%0d l=%0d v=%0d", p, d, l, v);
          end
        end
      end
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (src[i]) src[i] = S_POS;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (100) @(posedge clk);
    // warm-up integration, then one of exactly INTEG clocks
    @(negedge clk); dump = 1'b1; @(negedge clk); dump = 1'b0;
    repeat (INTEG - 1) @(negedge clk);
    dump = 1'b1; @(negedge clk); dump = 1'b0;
    checking = 1'b1;
    repeat (ROWS * COLS * LAGS + 10) @(negedge clk);
    checks++;
    // pairs with 0 <= p-d < LAGS
    begin
      int np = 0;
      for (int p = 0; p < N_ANT; p++)
        for (int d = 0; d < N_ANT; d++)
          if (p - d >= 0 && p - d < LAGS) np++;
      if (peaks != np) begin
        failures++;
        $display("FAIL peaks seen %0d expected %0d", peaks, np);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
