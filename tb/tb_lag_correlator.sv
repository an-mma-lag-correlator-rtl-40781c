// tb_lag_correlator: self-checking test of one 128-lag correlator.
//
// A reference model keeps the history of the delayed input and the expected
// integrator of every lag (sum of prompt(t)*delayed(t-l) over enabled clocks,
// saturating at +-(2**(ACC_W-1)-1)). After each dump all lags of the storage
// registers and the overflow flag are read back and compared, while the next
// integration runs. Phases: random 3-level data with random blanking, short
// integrations, and a long run of fully correlated data that saturates.
module tb_lag_correlator;
  import mma_pkg::*;

  localparam int LAGS = 128, ACC_W = 12;
  localparam int MAXV = (1 << (ACC_W - 1)) - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  samp_t prompt = S_ZERO, delayed = S_ZERO;
  logic acc_en = 1'b0, dump = 1'b0;
  logic [6:0] rd_lag = '0;
  logic signed [ACC_W-1:0] rd_data;
  logic rd_ovf;

  int checks = 0, failures = 0;

  lag_correlator #(.LAGS(LAGS), .ACC_W(ACC_W)) dut (.*);

  bit clk_run = 1'b1;   // the clock is held while the storage is read back
  always #5 if (clk_run) clk = ~clk;

  samp_t hist [LAGS];       // hist[l] = delayed input l clocks ago (incl. now)
  int    acc  [LAGS];
  bit    ovf;
  int    exp_store [LAGS];
  bit    exp_ovf;

  function automatic int val(samp_t s);
    return (s == S_POS) ? 1 : (s == S_NEG) ? -1 : 0;
  endfunction

  function automatic samp_t rnd3();
    case ($urandom_range(2))
      0: return S_NEG;
      1: return S_ZERO;
      default: return S_POS;
    endcase
  endfunction

  // One clock with the given inputs; the model follows the same clock.
  task automatic step(samp_t p, samp_t d, bit en, bit dmp);
    prompt = p; delayed = d; acc_en = en; dump = dmp;
    for (int l = LAGS - 1; l > 0; l--) hist[l] = hist[l-1];
    hist[0] = d;
    for (int l = 0; l < LAGS; l++) begin
      int pr = en ? val(p) * val(hist[l]) : 0;
      if (acc[l] + pr > MAXV || acc[l] + pr < -MAXV) ovf = 1'b1;
      else acc[l] += pr;
    end
    if (dmp) begin
      exp_store = acc;
      exp_ovf = ovf;
      for (int l = 0; l < LAGS; l++) acc[l] = 0;
      ovf = 1'b0;
    end
    @(posedge clk); #1;
  endtask

  task automatic check_store();
    clk_run = 1'b0;
    dump = 1'b0;
    for (int l = 0; l < LAGS; l++) begin
      rd_lag = 7'(l);
      #1;
      checks++;
      if (int'(rd_data) != exp_store[l]) begin
        failures++;
        if (failures < 10) $display("FAIL lag %0d got %0d exp %0d at %0t", l, rd_data, exp_store[l], $time);
      end
    end
    checks++;
    if (rd_ovf !== exp_ovf) begin
      failures++;
      $display("FAIL ovf got %0b exp %0b", rd_ovf, exp_ovf);
    end
    clk_run = 1'b1;
    @(negedge clk);
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_ovf = 0;

  initial begin
    for (int l = 0; l < LAGS; l++) begin hist[l] = S_ZERO; acc[l] = 0; end
    ovf = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // random data, random blanking, integrations of varied length
    for (int it = 0; it < 12; it++) begin
      int len = (it < 4) ? $urandom_range(1, 10) : $urandom_range(100, 1500);
      for (int t = 0; t < len; t++) step(rnd3(), rnd3(), $urandom_range(9) != 0, 1'b0);
      step(rnd3(), rnd3(), 1'b1, 1'b1);
      check_store();
      if (exp_ovf) n_ovf++;
    end
    // correlated data: the delayed input leads the prompt by 5 clocks, so lag 5
    // grows by one per clock and saturates
    begin
      samp_t line [6];
      for (int i = 0; i < 6; i++) line[i] = S_ZERO;
      for (int t = 0; t < 2600; t++) begin
        samp_t p = ($urandom_range(1)) ? S_POS : S_NEG;
        for (int i = 5; i > 0; i--) line[i] = line[i-1];
        line[0] = p;
        step(line[5], p, 1'b1, t == 2599);
      end
      check_store();
      if (exp_ovf) n_ovf++;
    end
    checks++;
    if (n_ovf != 1 || exp_store[5] != MAXV) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
