// daub_1d: N-point one-dimensional Daubechies (Daub4 or Daub6) wavelet
// transform, direct-mapped and pipelined.
//
// All N samples of a vector enter in one cycle. Each decomposition level is
// one pipeline stage built from multipliers, arithmetic shifters and adders:
// on the first n = N >> l elements of its input it computes
//   low[k]  = sum_j (x[(2k+j) mod n] * h_j) >>> FRAC      k = 0 .. n/2-1
//   high[k] = sum_j (x[(2k+j) mod n] * g_j) >>> FRAC
// and writes low into elements 0..n/2-1 and high into n/2..n-1; the elements
// from n upwards pass through unchanged. The modulo is the periodic extension
// that settles the filter running off the end of the vector. With the default
// LEVELS = log2(N) the output is the full pyramid
//   {a_L, d_L, d_(L-1) (2 values), ..., d_1 (N/2 values)}.
// The level structure, the periodic extension and the multiply/shift/add
// datapath follow the described method; the per-product shift, truncating
// rounding and wrap-around on overflow are this design's choices.
//
// Interface: valid/ready on both sides. The whole pipeline advances together
// when the output register is empty or taken (in_ready = out_ready or no
// valid output), so a stall at the output holds every stage.
// Timing: LEVELS cycles from an accepted input to its output, one vector per
// cycle throughput.
module daub_1d
  import daub_pkg::*;
#(
  parameter int N      = 4,           // points per vector (power of two)
  parameter int TAPS   = 4,           // 4 = Daub4, 6 = Daub6
  parameter int DW     = 24,          // sample width, FRAC fraction bits
  parameter int LEVELS = $clog2(N)    // decomposition levels (1..log2 N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_data  [N],
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [DW-1:0] out_data [N]
);

  typedef logic signed [DW-1:0] samp_t;
  localparam int PW = DW + CW;        // full product width
  localparam int AW = PW + 3;         // accumulator width (up to 8 taps)

  logic adv;
  assign adv      = out_ready || !out_valid;
  assign in_ready = adv;

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int NL = N >> l;       // active length at this level
    samp_t src [N];
    logic  src_v;
    samp_t nxt [N];
    samp_t q   [N];
    logic  v;

    if (l == 0) begin : g_first
      assign src   = in_data;
      assign src_v = in_valid;
    end else begin : g_next
      assign src   = g_lvl[l-1].q;
      assign src_v = g_lvl[l-1].v;
    end

    always_comb begin
      logic signed [AW-1:0] acc_lo, acc_hi;
      logic signed [PW-1:0] xe, plo, phi;
      for (int i = 0; i < N; i++) nxt[i] = src[i];
      for (int k = 0; k < NL / 2; k++) begin
        acc_lo = '0;
        acc_hi = '0;
        for (int j = 0; j < TAPS; j++) begin
          xe     = PW'(src[(2 * k + j) % NL]);
          plo    = xe * PW'(hcoef(TAPS, j));
          phi    = xe * PW'(gcoef(TAPS, j));
          acc_lo = acc_lo + AW'(plo >>> FRAC);
          acc_hi = acc_hi + AW'(phi >>> FRAC);
        end
        nxt[k]          = acc_lo[DW-1:0];
        nxt[NL / 2 + k] = acc_hi[DW-1:0];
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v <= 1'b0;
      else if (adv) v <= src_v;
    end

    always_ff @(posedge clk) begin
      if (adv && src_v) q <= nxt;
    end
  end

  assign out_valid = g_lvl[LEVELS-1].v;
  assign out_data  = g_lvl[LEVELS-1].q;

endmodule
