// tb_delay_line: self-checking test of delay_line at its default size.
//
// The sampler stream is a fixed pseudo-random function of the absolute
// sample number, so the expected delayed sample is known without modelling
// the RAM: out sample i of word w must equal gen(w*PAR + i - delay). The test
// runs through delays of 0, 1, PAR-1, PAR, PAR+1, random values and the
// maximum DEPTH*PAR-1, with gaps in in_valid, and checks the one-clock
// latency of out_valid.
module tb_delay_line;
  import mma_pkg::*;

  localparam int PAR   = 32;
  localparam int DEPTH = 16384;
  localparam int DW    = $clog2(DEPTH * PAR);

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  samp_t in_word [PAR];
  logic [DW-1:0] delay = '0;
  logic out_valid;
  samp_t out_word [PAR];

  int checks = 0, failures = 0;

  delay_line #(.PAR(PAR), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic samp_t gen(longint n);
    int unsigned h;
    h = 32'(n) * 32'h9E3779B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EBCA77;
    h = h ^ (h >> 13);
    case (h % 3)
      0: return S_NEG;
      1: return S_ZERO;
      default: return S_POS;
    endcase
  endfunction

  longint wr_words = 0;      // words accepted so far
  longint last_word = -1;    // word index held in out_word

  task automatic push(bit v);
    in_valid <= v;
    if (v) for (int i = 0; i < PAR; i++) in_word[i] <= gen(wr_words * PAR + i);
    @(posedge clk);
    #1;
    checks++;
    if (out_valid !== v) begin
      failures++;
      $display("FAIL out_valid=%0b expected %0b", out_valid, v);
    end
    if (v) begin
      last_word = wr_words;
      wr_words++;
      for (int i = 0; i < PAR; i++) begin
        longint src = last_word * PAR + i - longint'(delay);
        if (src >= 0) begin
          checks++;
          if (out_word[i] !== gen(src)) begin
            failures++;
            if (failures < 10)
              $display("FAIL delay=%0d word=%0d i=%0d got %b exp %b", delay, last_word, i,
                       out_word[i], gen(src));
          end
        end
      end
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < PAR; i++) in_word[i] = S_ZERO;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    // Fill the whole RAM once so every delay has history.
    for (int w = 0; w < DEPTH + 4; w++) push(1'b1);
    begin
      int dl [$] = '{0, 1, PAR - 1, PAR, PAR + 1, 2 * PAR + 7, DEPTH * PAR - 1,
                     DEPTH * PAR - PAR, 12345, 100000};
      for (int r = 0; r < 20; r++) dl.push_back($urandom_range(DEPTH * PAR - 1));
      foreach (dl[j]) begin
        @(negedge clk);
        delay = DW'(dl[j]);
        for (int w = 0; w < 40; w++) push(($urandom_range(3) != 0) ? 1'b1 : 1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
