// lag_correlator: one LAGS-lag 3-level x 3-level correlator.
//
// The delayed input runs down a lag generator (a shift register); tap l holds
// the delayed sample from l clocks ago, tap 0 being the current input. Each
// tap is multiplied by the current prompt sample, and LAGS short-term
// integrators add up the products, so integrator l accumulates
//   sum over t of prompt(t) * delayed(t - l).
// Integration happens only in clocks where acc_en is high (used to blank time
// discontinuities). The integrators are ACC_W-bit signed and saturate; a
// saturation sets the sticky `ovf` flag of the current integration.
//
// dump ends an integration: the secondary storage registers take the
// integrator values (including the product of the dump clock itself), the
// integrators restart from zero, and the overflow flag is stored with them.
// The storage registers are read at any time through rd_lag / rd_data
// (combinational), while the next integration proceeds.
//
// Following the design memo: 128-bit lag generator, 128 3-level x 3-level
// multipliers, 128 12-bit short-term integrators and 128 12-bit secondary
// storage registers. Saturation with a flag, the acc_en blanking input and
// the read port are this design's choice.
module lag_correlator
  import mma_pkg::*;
#(
  parameter int LAGS  = 128,
  parameter int ACC_W = 12,
  localparam int LW = $clog2(LAGS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  samp_t                   prompt,
  input  samp_t                   delayed,
  input  logic                    acc_en,
  input  logic                    dump,
  input  logic [LW-1:0]           rd_lag,
  output logic signed [ACC_W-1:0] rd_data,
  output logic                    rd_ovf
);

  localparam logic signed [ACC_W-1:0] MAXV = {1'b0, {(ACC_W-1){1'b1}}};
  localparam logic signed [ACC_W-1:0] MINV = -MAXV;

  samp_t                   sr   [LAGS];   // sr[l] = delayed(t - l)
  logic signed [ACC_W-1:0] acc  [LAGS];
  logic signed [ACC_W-1:0] acc_nxt [LAGS];
  logic signed [ACC_W-1:0] store [LAGS];
  logic                    ovf, ovf_nxt, store_ovf;

  always_comb begin
    sr[0] = delayed;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 1; l < LAGS; l++) sr[l] <= S_ZERO;
    end else begin
      for (int l = 1; l < LAGS; l++) sr[l] <= sr[l-1];
    end
  end

  always_comb begin
    ovf_nxt = ovf;
    for (int l = 0; l < LAGS; l++) begin
      logic signed [1:0] p;
      p = acc_en ? mul3(prompt, sr[l]) : 2'sd0;
      acc_nxt[l] = acc[l];
      if (p == 2'sd1) begin
        if (acc[l] == MAXV) ovf_nxt = 1'b1;
        else                acc_nxt[l] = acc[l] + 1'b1;
      end else if (p == -2'sd1) begin
        if (acc[l] == MINV) ovf_nxt = 1'b1;
        else                acc_nxt[l] = acc[l] - 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ovf       <= 1'b0;
      store_ovf <= 1'b0;
      for (int l = 0; l < LAGS; l++) begin
        acc[l]   <= '0;
        store[l] <= '0;
      end
    end else if (dump) begin
      ovf       <= 1'b0;
      store_ovf <= ovf_nxt;
      for (int l = 0; l < LAGS; l++) begin
        acc[l]   <= '0;
        store[l] <= acc_nxt[l];
      end
    end else begin
      ovf <= ovf_nxt;
      acc <= acc_nxt;
    end
  end

  assign rd_data = store[rd_lag];
  assign rd_ovf  = store_ovf;

endmodule
