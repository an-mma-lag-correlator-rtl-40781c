// correlator_chip: ROWS x COLS array of LAGS-lag correlators with read-out.
//
// The chip has COLS prompt inputs and ROWS delayed inputs. Cell (r, c)
// correlates prompt input c against delayed input r; prompt c drives every
// cell of column c, delayed r drives every cell of row r, and each cell has
// its own lag generator. A cell accumulates while p_ok[c] and d_ok[r] are
// both high. All cells dump together on `dump`.
//
// Read-out: after each dump the chip streams out its secondary storage, one
// value per clock, cell by cell (cell index r*COLS + c) and lag by lag inside
// a cell: ro_valid, ro_addr = cell*LAGS + lag, ro_data and the cell's
// overflow flag ro_ovf. The stream takes ROWS*COLS*LAGS clocks (4096 with the
// defaults, well under one 1-ms integration). A dump that arrives while a
// read-out is still running restarts the read-out and raises ro_overrun for
// one clock; the unread values of the earlier integration are lost.
//
// Timing: ro_* are registered; the first value appears two clocks after the
// dump.
//
// Following the design memo: a 4 x 8 array of 128-lag correlators per chip
// (4096 lags), 12-bit integrators and storage, 125 MHz operation. Which axis
// is prompt and which is delayed, and the serial read-out, are this design's
// choice.
module correlator_chip
  import mma_pkg::*;
#(
  parameter int ROWS  = 4,
  parameter int COLS  = 8,
  parameter int LAGS  = 128,
  parameter int ACC_W = 12,
  localparam int NV = ROWS * COLS * LAGS,
  localparam int RA_W = $clog2(NV)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  samp_t                   prompt [COLS],
  input  logic                    p_ok   [COLS],
  input  samp_t                   delayed [ROWS],
  input  logic                    d_ok    [ROWS],
  input  logic                    dump,
  output logic                    ro_valid,
  output logic [RA_W-1:0]         ro_addr,
  output logic signed [ACC_W-1:0] ro_data,
  output logic                    ro_ovf,
  output logic                    ro_overrun
);

  localparam int LW = $clog2(LAGS);
  localparam int NC = ROWS * COLS;

  logic [RA_W-1:0]         idx;
  logic                    busy;
  logic signed [ACC_W-1:0] cell_data [NC];
  logic                    cell_ovf  [NC];
  logic [LW-1:0]           rd_lag;
  logic [RA_W-LW-1:0]      rd_cell;

  assign rd_lag  = idx[LW-1:0];
  assign rd_cell = idx[RA_W-1:LW];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      lag_correlator #(.LAGS(LAGS), .ACC_W(ACC_W)) u_cell (
        .clk     (clk),
        .rst_n   (rst_n),
        .prompt  (prompt[c]),
        .delayed (delayed[r]),
        .acc_en  (p_ok[c] && d_ok[r]),
        .dump    (dump),
        .rd_lag  (rd_lag),
        .rd_data (cell_data[r*COLS + c]),
        .rd_ovf  (cell_ovf[r*COLS + c])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx        <= '0;
      busy       <= 1'b0;
      ro_valid   <= 1'b0;
      ro_addr    <= '0;
      ro_data    <= '0;
      ro_ovf     <= 1'b0;
      ro_overrun <= 1'b0;
    end else begin
      ro_overrun <= dump && busy;
      ro_valid   <= busy && !dump;
      ro_addr    <= idx;
      ro_data    <= cell_data[rd_cell];
      ro_ovf     <= cell_ovf[rd_cell];
      if (dump) begin
        idx  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        idx <= idx + 1'b1;
        if (idx == RA_W'(NV - 1)) busy <= 1'b0;
      end
    end
  end

endmodule
