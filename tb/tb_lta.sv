// tb_lta: self-checking test of the long-term accumulator.
//
// Several read-out streams (one value per address, as a chip delivers them)
// are sent into different bins, the first of each bin with in_first set.
// A model keeps the expected sums and sticky overflow flags; all bins and
// addresses are then read back through the host port (one clock latency).
module tb_lta;
  localparam int N_ADDR = 4096, N_BINS = 4, IN_W = 12, ACC_W = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ovf = 1'b0, in_first = 1'b0;
  logic [11:0] in_addr = '0;
  logic signed [IN_W-1:0] in_data = '0;
  logic [1:0] in_bin = '0, rd_bin = '0;
  logic [11:0] rd_addr = '0;
  logic signed [ACC_W-1:0] rd_data;
  logic rd_ovf;

  int checks = 0, failures = 0;

  lta #(.N_ADDR(N_ADDR), .N_BINS(N_BINS), .IN_W(IN_W), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  longint model [N_BINS][N_ADDR];
  bit     movf  [N_BINS][N_ADDR];

  task automatic stream(int bin, bit first);
    for (int a = 0; a < N_ADDR; a++) begin
      @(negedge clk);
      in_valid = 1'b1; in_addr = 12'(a); in_bin = 2'(bin); in_first = first;
      in_data = IN_W'($urandom_range(4095));
      in_ovf = ($urandom_range(200) == 0);
      if (first) begin
        model[bin][a] = longint'(in_data);
        movf[bin][a] = in_ovf;
      end else begin
        model[bin][a] += longint'(in_data);
        movf[bin][a] |= in_ovf;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < N_BINS; b++) stream(b, 1'b1);
    for (int r = 0; r < 6; r++) stream(r % 3, 1'b0);   // bins 0..2 accumulate
    stream(3, 1'b1);                                   // bin 3 restarted
    stream(1, 1'b1);                                   // bin 1 restarted
    stream(1, 1'b0);
    for (int b = 0; b < N_BINS; b++)
      for (int a = 0; a < N_ADDR; a++) begin
        @(negedge clk);
        rd_bin = 2'(b); rd_addr = 12'(a);
        @(posedge clk); #1;
        checks++;
        if (longint'(rd_data) != model[b][a] || rd_ovf != movf[b][a]) begin
          failures++;
          if (failures < 10)
            $display("FAIL bin %0d addr %0d got %0d exp %0d", b, a, rd_data, model[b][a]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
