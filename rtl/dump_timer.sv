// dump_timer: ends each short-term integration of the correlator chips.
//
// The fundamental timing unit is the memory cycle: one segment of a memory
// card output, marked by the card's seg_start pulse. The timer counts
// seg_start pulses and issues `dump` on every n_seg-th one (n_seg = 1 ... 16),
// so that integrations always span whole memory cycles. `restart` (after a
// mode change) clears the count; the first dump then comes n_seg segments
// later. `dump_count` counts dumps since reset.
//
// Timing: dump is registered and pulses one clock after the seg_start that
// completes an integration.
//
// Following the design memo: short-term accumulation of 1 to 16 ms in the chips,
// carried by the 1-ms fundamental memory cycle. Counting seg_start pulses is
// this design's choice.
module dump_timer #(
  parameter int MAX_SEG = 16,
  localparam int NW = $clog2(MAX_SEG + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          restart,
  input  logic          seg_start,
  input  logic [NW-1:0] n_seg,
  output logic          dump,
  output logic [31:0]   dump_count
);

  logic [NW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      dump       <= 1'b0;
      dump_count <= '0;
    end else if (restart) begin
      cnt  <= '0;
      dump <= 1'b0;
    end else begin
      dump <= 1'b0;
      if (seg_start) begin
        if (cnt + 1'b1 >= n_seg) begin
          cnt        <= '0;
          dump       <= 1'b1;
          dump_count <= dump_count + 1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
