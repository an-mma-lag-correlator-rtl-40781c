// correlator_matrix: the N_ANT x N_ANT array of correlators for one sampler
// channel and one memory-card output.
//
// Every antenna's prompt output drives a column and every antenna's delayed
// output drives a row, so each ordered antenna pair (p, d) has its own
// correlator: the diagonal holds the self products, one triangle the lags and
// the other the leads of each baseline. The array is tiled with correlator
// chips of ROWS x COLS cells: chip (a, b), index a*(N_ANT/ROWS) + b, takes
// prompt antennas a*COLS ... a*COLS+COLS-1 and delayed antennas
// b*ROWS ... b*ROWS+ROWS-1. The pair (p, d) is thus cell
// (d mod ROWS)*COLS + (p mod COLS) of chip (p / COLS, d / ROWS).
//
// Each chip's read-out stream is brought out unchanged; all chips dump
// together. Timing is that of correlator_chip.
//
// Following the design memo: a 40 x 40 antenna array per sampler and memory
// output, built from 4 x 8 correlator chips (50 chips per array, 256 arrays
// in the full system). The tiling order is this design's choice.
module correlator_matrix
  import mma_pkg::*;
#(
  parameter int N_ANT = 40,
  parameter int ROWS  = 4,
  parameter int COLS  = 8,
  parameter int LAGS  = 128,
  parameter int ACC_W = 12,
  localparam int NCH_P = N_ANT / COLS,
  localparam int NCH_D = N_ANT / ROWS,
  localparam int NCHIP = NCH_P * NCH_D,
  localparam int RA_W  = $clog2(ROWS * COLS * LAGS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  samp_t                   prompt  [N_ANT],
  input  logic                    p_ok    [N_ANT],
  input  samp_t                   delayed [N_ANT],
  input  logic                    d_ok    [N_ANT],
  input  logic                    dump,
  output logic                    ro_valid   [NCHIP],
  output logic [RA_W-1:0]         ro_addr    [NCHIP],
  output logic signed [ACC_W-1:0] ro_data    [NCHIP],
  output logic                    ro_ovf     [NCHIP],
  output logic                    ro_overrun [NCHIP]
);

  for (genvar a = 0; a < NCH_P; a++) begin : g_p
    for (genvar b = 0; b < NCH_D; b++) begin : g_d
      samp_t pin [COLS];
      logic  pok [COLS];
      samp_t din [ROWS];
      logic  dok [ROWS];

      for (genvar c = 0; c < COLS; c++) begin : g_c
        assign pin[c] = prompt[a*COLS + c];
        assign pok[c] = p_ok[a*COLS + c];
      end
      for (genvar r = 0; r < ROWS; r++) begin : g_r
        assign din[r] = delayed[b*ROWS + r];
        assign dok[r] = d_ok[b*ROWS + r];
      end

      correlator_chip #(.ROWS(ROWS), .COLS(COLS), .LAGS(LAGS), .ACC_W(ACC_W)) u_chip (
        .clk        (clk),
        .rst_n      (rst_n),
        .prompt     (pin),
        .p_ok       (pok),
        .delayed    (din),
        .d_ok       (dok),
        .dump       (dump),
        .ro_valid   (ro_valid  [a*NCH_D + b]),
        .ro_addr    (ro_addr   [a*NCH_D + b]),
        .ro_data    (ro_data   [a*NCH_D + b]),
        .ro_ovf     (ro_ovf    [a*NCH_D + b]),
        .ro_overrun (ro_overrun[a*NCH_D + b])
      );
    end
  end

  initial begin
    assert (N_ANT % COLS == 0 && N_ANT % ROWS == 0)
      else $error("N_ANT must be a multiple of ROWS and COLS");
  end

endmodule
