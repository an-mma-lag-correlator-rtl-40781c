// lta: long-term accumulator for the read-out stream of one correlator chip.
//
// Each value of the chip's read-out (address = cell*LAGS + lag) is added into
// one of N_BINS integration bins, so that several kinds of data
// (signal / reference / calibration, or the states of 90-degree phase
// switching) are integrated side by side. The bin and a `first` flag are
// taken with each dump by the caller and held for the read-out that follows:
// with in_first high the value replaces the bin content instead of adding to
// it, which starts a new long integration without a separate clear pass. The
// chip's overflow flag is kept per bin and address as a sticky bit.
//
// Host read port: rd_bin / rd_addr give rd_data and rd_ovf one clock later.
//
// Timing: one value per clock, a read-modify-write in one clock. The memory
// is written as an array (in the real system a DRAM).
//
// Following the design memo: an LTA with several integration bins after the
// chips' 1 to 16 ms short-term integration. N_BINS, the accumulator width
// ACC_W = 32 and the `first` mechanism are this design's choice.
module lta #(
  parameter int N_ADDR = 4096,
  parameter int N_BINS = 4,
  parameter int IN_W   = 12,
  parameter int ACC_W  = 32,
  localparam int AW = $clog2(N_ADDR),
  localparam int BW = (N_BINS > 1) ? $clog2(N_BINS) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [AW-1:0]           in_addr,
  input  logic signed [IN_W-1:0]  in_data,
  input  logic                    in_ovf,
  input  logic [BW-1:0]           in_bin,
  input  logic                    in_first,
  input  logic [BW-1:0]           rd_bin,
  input  logic [AW-1:0]           rd_addr,
  output logic signed [ACC_W-1:0] rd_data,
  output logic                    rd_ovf
);

  logic signed [ACC_W-1:0] mem  [N_BINS][N_ADDR];
  logic                    ovfm [N_BINS][N_ADDR];

  always_ff @(posedge clk) begin
    if (in_valid) begin
      if (in_first) begin
        mem[in_bin][in_addr]  <= ACC_W'(in_data);
        ovfm[in_bin][in_addr] <= in_ovf;
      end else begin
        mem[in_bin][in_addr]  <= mem[in_bin][in_addr] + ACC_W'(in_data);
        ovfm[in_bin][in_addr] <= ovfm[in_bin][in_addr] | in_ovf;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_data <= '0;
      rd_ovf  <= 1'b0;
    end else begin
      rd_data <= mem[rd_bin][rd_addr];
      rd_ovf  <= ovfm[rd_bin][rd_addr];
    end
  end

endmodule
