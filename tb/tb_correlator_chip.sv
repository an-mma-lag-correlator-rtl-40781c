// tb_correlator_chip: self-checking test of the 4 x 8 correlator chip.
//
// Eight prompt lanes and four delayed lanes carry random 3-level data with
// random ok flags; delayed lane r is a copy of prompt lane r, running 3*r+1
// clocks ahead of it, so the cells on the diagonal of the lane pairs see a
// correlation peak. A reference model integrates every ci and lag. After
// each dump the whole read-out stream is checked: its start two clocks after
// the dump, its length ROWS*COLS*LAGS, the address order and every value.
// A dump issued during a read-out must raise ro_overrun, and a long
// integration must saturate the peak cells and report their overflow flag.
module tb_correlator_chip;
  import mma_pkg::*;

  localparam int ROWS = 4, COLS = 8, LAGS = 128, ACC_W = 12;
  localparam int NV = ROWS * COLS * LAGS;

  logic clk = 1'b0, rst_n = 1'b0;
  samp_t prompt [COLS];
  logic  p_ok [COLS];
  samp_t delayed [ROWS];
  logic  d_ok [ROWS];
  logic  dump = 1'b0;
  logic  ro_valid, ro_ovf, ro_overrun;
  logic [$clog2(NV)-1:0] ro_addr;
  logic signed [ACC_W-1:0] ro_data;

  int checks = 0, failures = 0;

  correlator_chip #(.ROWS(ROWS), .COLS(COLS), .LAGS(LAGS), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

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

  samp_t dh  [ROWS][LAGS];          // delayed history per row
  samp_t ph  [COLS][16];            // prompt history, to build the copies
  int    acc [ROWS*COLS][LAGS];
  int    exp_v [NV];
  bit    covf [ROWS*COLS];     // model overflow flag per cell
  bit    exp_ovf [ROWS*COLS];
  int    n_ovf = 0;
  localparam int MAXV = (1 << (ACC_W - 1)) - 1;
  int    ro_seen;
  int    ro_next;
  bit    expect_stream;
  int    overruns = 0;

  // drive one clock of random inputs and update the model
  task automatic step(bit dmp);
    for (int c = 0; c < COLS; c++) begin
      for (int i = 15; i > 0; i--) ph[c][i] = ph[c][i-1];
      ph[c][0] = rnd3();
      prompt[c] = ph[c][15];
      p_ok[c] = ($urandom_range(15) != 0);
    end
    for (int r = 0; r < ROWS; r++) begin
      delayed[r] = ph[r][15 - (3*r+1)];
      d_ok[r] = ($urandom_range(15) != 0);
      for (int l = LAGS - 1; l > 0; l--) dh[r][l] = dh[r][l-1];
      dh[r][0] = delayed[r];
    end
    dump = dmp;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        if (p_ok[c] && d_ok[r])
          for (int l = 0; l < LAGS; l++) begin
            int nv = acc[r*COLS+c][l] + val(prompt[c]) * val(dh[r][l]);
            if (nv > MAXV || nv < -MAXV) covf[r*COLS+c] = 1'b1;
            else acc[r*COLS+c][l] = nv;
          end
    if (dmp) begin
      for (int ci = 0; ci < ROWS*COLS; ci++)
        for (int l = 0; l < LAGS; l++) begin
          exp_v[ci*LAGS + l] = acc[ci][l];
          acc[ci][l] = 0;
        end
      exp_ovf = covf;
      foreach (covf[i]) covf[i] = 1'b0;
    end
    @(posedge clk); #1;
    // check the read-out stream
    if (ro_valid) begin
      checks++;
      if (!expect_stream || int'(ro_addr) != ro_next || int'(ro_data) != exp_v[ro_next] ||
          ro_ovf != exp_ovf[ro_next / LAGS]) begin
        failures++;
        if (failures < 10) $display("FAIL ro addr=%0d exp_addr=%0d data=%0d exp=%0d",
                                    ro_addr, ro_next, ro_data, exp_v[ro_next]);
      end
      if (ro_ovf) n_ovf++;
      ro_next++;
      ro_seen++;
    end
    if (ro_overrun) overruns++;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (dh[r, l]) dh[r][l] = S_ZERO;
    foreach (ph[c, i]) ph[c][i] = S_ZERO;
    foreach (acc[c, l]) acc[c][l] = 0;
    foreach (covf[i]) begin covf[i] = 1'b0; exp_ovf[i] = 1'b0; end
    for (int c = 0; c < COLS; c++) begin prompt[c] = S_ZERO; p_ok[c] = 1'b0; end
    for (int r = 0; r < ROWS; r++) begin delayed[r] = S_ZERO; d_ok[r] = 1'b0; end
    expect_stream = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int it = 0; it < 3; it++) begin
      for (int t = 0; t < 900; t++) step(1'b0);
      step(1'b1);
      // stream starts two clocks after the dump clock
      ro_next = 0; ro_seen = 0; expect_stream = 1'b1;
      checks++;
      if (ro_valid) begin failures++; $display("FAIL stream too early"); end
      for (int t = 0; t < NV + 5; t++) step(1'b0);
      checks++;
      if (ro_seen != NV) begin
        failures++;
        $display("FAIL stream length %0d", ro_seen);
      end
      expect_stream = 1'b0;
    end
    // peak check on the last integration: ci (r, r) at lag 3r+1
    for (int r = 0; r < ROWS; r++) begin
      checks++;
      if (exp_v[(r*COLS + r)*LAGS + 3*r + 1] < 300) begin
        failures++;
        $display("FAIL no correlation peak in cell %0d", r*COLS + r);
      end
    end
    // dump during a read-out
    step(1'b1);
    ro_next = 0; expect_stream = 1'b1;
    for (int t = 0; t < 100; t++) step(1'b0);
    step(1'b1);
    ro_next = 0;
    for (int t = 0; t < NV + 5; t++) step(1'b0);
    checks++;
    if (overruns != 1) begin failures++; $display("FAIL overruns=%0d", overruns); end
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL overflow never read out"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
