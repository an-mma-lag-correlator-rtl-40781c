// tb_switch_matrix: self-checking test of switch_matrix at its default size.
//
// Each sampler s sends a pseudo-random stream gen(s, n) of absolute sample
// numbers n (counted from the last restart). For a channel m fed from
// sampler src = m mod n_active with discard factor D = 2**dec_log2[src], the
// j-th output word must hold samples (j*PAR + i) * D of that sampler, and
// output words must come exactly once every D input words. All four
// active-sampler settings are run, with mixed discard factors.
module tb_switch_matrix;
  import mma_pkg::*;

  localparam int N_SAMP = 8;
  localparam int PAR    = 32;
  localparam int DEC_W  = $clog2($clog2(PAR) + 1);

  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0;
  logic [2:0] act_shift = '0;
  logic [DEC_W-1:0] dec_log2 [N_SAMP];
  logic in_valid = 1'b0;
  samp_t in_word [N_SAMP][PAR];
  logic out_valid [N_SAMP];
  samp_t out_word [N_SAMP][PAR];

  int checks = 0, failures = 0;

  switch_matrix #(.N_SAMP(N_SAMP), .PAR(PAR)) dut (.*);

  always #5 clk = ~clk;

  function automatic samp_t gen(int s, longint n);
    int unsigned h;
    h = (32'(n) + 32'(s) * 32'h01000193) * 32'h9E3779B1;
    h = h ^ (h >> 16);
    h = h * 32'h7FEB352D;
    h = h ^ (h >> 15);
    case (h % 3)
      0: return S_NEG;
      1: return S_ZERO;
      default: return S_POS;
    endcase
  endfunction

  longint in_words;
  int     out_cnt [N_SAMP];

  task automatic run_mode(int ash, int d0, int d1, int words);
    int n_act;
    act_shift = 3'(ash);
    for (int s = 0; s < N_SAMP; s++) dec_log2[s] = DEC_W'((s % 2 == 0) ? d0 : d1);
    n_act = N_SAMP >> ash;
    @(negedge clk); restart = 1'b1;
    @(negedge clk); restart = 1'b0;
    in_words = 0;
    for (int m = 0; m < N_SAMP; m++) out_cnt[m] = 0;
    for (int w = 0; w < words; w++) begin
      in_valid = 1'b1;
      for (int s = 0; s < N_SAMP; s++)
        for (int i = 0; i < PAR; i++) in_word[s][i] = gen(s, in_words * PAR + i);
      @(posedge clk); #1;
      in_words++;
      for (int m = 0; m < N_SAMP; m++) begin
        int src = m % n_act;
        int dd  = int'(dec_log2[src]);
        bit exp_v = ((in_words % (1 << dd)) == 0);
        checks++;
        if (out_valid[m] !== exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL valid m=%0d w=%0d", m, in_words);
        end
        if (out_valid[m]) begin
          for (int i = 0; i < PAR; i++) begin
            longint n = (longint'(out_cnt[m]) * PAR + i) << dd;
            checks++;
            if (out_word[m][i] !== gen(src, n)) begin
              failures++;
              if (failures < 10)
                $display("FAIL ash=%0d m=%0d j=%0d i=%0d", ash, m, out_cnt[m], i);
            end
          end
          out_cnt[m]++;
        end
      end
      @(negedge clk);
      in_valid = 1'b0;
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < N_SAMP; s++) dec_log2[s] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_mode(0, 0, 0, 20);
    run_mode(0, 1, 3, 40);
    run_mode(1, 2, 0, 40);
    run_mode(2, 5, 4, 100);
    run_mode(3, 1, 1, 20);
    run_mode(3, 5, 0, 70);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
