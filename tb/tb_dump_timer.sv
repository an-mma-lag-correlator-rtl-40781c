// tb_dump_timer: self-checking test of the integration timer.
//
// seg_start pulses arrive every P clocks (P varies between runs). For each
// n_seg from 1 to 16 the dumps must come exactly one clock after every
// n_seg-th pulse, i.e. every n_seg*P clocks, and dump_count must count them.
// A restart in the middle of an integration must restart the count.
module tb_dump_timer;
  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0, seg_start = 1'b0;
  logic [4:0] n_seg = 5'd1;
  logic dump;
  logic [31:0] dump_count;

  int checks = 0, failures = 0;

  dump_timer #(.MAX_SEG(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic run(int n, int period, int segs, int rst_at);
    int pulses = 0;
    int expect_next = -1;
    int c0;
    @(negedge clk);
    n_seg = 5'(n);
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    c0 = dump_count;
    for (int t = 0; t < segs * period; t++) begin
      seg_start = (t % period == period - 1);
      restart = (t == rst_at);
      @(posedge clk); #1;
      if (t == rst_at) begin
        pulses = 0;
      end else if (seg_start) begin
        pulses++;
        if (pulses == n) begin
          pulses = 0;
          expect_next = t;
        end
      end
      // dump is registered: it is seen right after the clock edge that
      // samples the completing seg_start
      checks++;
      if (dump !== (t == expect_next)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d t=%0d dump=%0b", n, t, dump);
      end
      @(negedge clk);
    end
    seg_start = 1'b0;
    restart = 1'b0;
    checks++;
    if (dump_count == c0 && segs >= n) begin
      failures++;
      $display("FAIL no dumps counted for n=%0d", n);
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
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 1; n <= 16; n++) run(n, 3 + n % 4, 3 * n + 2, -1);
    run(4, 5, 20, 27);
    run(16, 7, 40, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
