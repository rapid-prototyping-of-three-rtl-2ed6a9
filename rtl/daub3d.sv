// daub3d: three-dimensional Daubechies wavelet transform of an N x N x N
// volume by the transpose-based method.
//
// The 3-D transform is separable, so it is computed as a cascade of three
// N-point 1-D units with two transpose memories between them:
//   pixels -> 1-D (along x) -> T1 -> 1-D (along y) -> T2 -> 1-D (along z)
// Input: one row of N pixels per cycle, rows in order z (slice) outer,
// y inner; element i of a row is x = i. T1 transposes each N x N slice, so
// the second unit sees, per slice z, the columns x = 0..N-1 (element = y).
// T2 buffers the whole volume and hands the third unit, for each x (outer)
// and y (inner), the N coefficients at (x, y) across the N slices
// (element = z). The output therefore comes as N*N vectors, vector x*N + y,
// element z, each holding the fully transformed coefficient W[z][y][x]
// where each index is in the 1-D pyramid order of daub_1d.
// The cascade, the transpose modules and their fetch units follow the
// described architecture; the pixel format (unsigned, PIX_W bits, scaled to
// FRAC fraction bits), the element orders and the handshakes are this
// design's choices.
//
// Interface: valid/ready at the input; the output has no backpressure.
// Timing: the first output vector of a volume leaves
// 3*LEVELS + N + N*N + 2 cycles after its first input row when rows arrive
// back to back; after that one vector per cycle, and volumes can stream
// back to back.
module daub3d
  import daub_pkg::*;
#(
  parameter int N      = 4,          // transform size per dimension
  parameter int TAPS   = 4,          // 4 = Daub4, 6 = Daub6
  parameter int PIX_W  = 8,          // input pixel width, unsigned
  parameter int DW     = 24,         // coefficient width, FRAC fraction bits
  parameter int LEVELS = $clog2(N)   // decomposition levels per dimension
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [PIX_W-1:0]     in_pix  [N],
  output logic                 out_valid,
  output logic signed [DW-1:0] out_coef [N],
  output logic                 t1_swap,    // T1 filled a bank
  output logic                 t2_swap     // T2 filled a bank (a whole volume)
);

  typedef logic signed [DW-1:0] samp_t;

  samp_t x_in [N];
  for (genvar i = 0; i < N; i++) begin : g_scale
    assign x_in[i] = samp_t'({{(DW - PIX_W - FRAC){1'b0}}, in_pix[i], {FRAC{1'b0}}});
  end

  logic  s1_v, s1_r, t1_v, t1_r, s2_v, s2_r, t2_v, t2_r;
  samp_t s1_d [N];
  samp_t t1_d [N];
  samp_t s2_d [N];
  samp_t t2_d [N];

  daub_1d #(.N(N), .TAPS(TAPS), .DW(DW), .LEVELS(LEVELS)) u_dim_x (
    .clk, .rst_n,
    .in_valid (in_valid), .in_ready (in_ready), .in_data (x_in),
    .out_valid(s1_v),     .out_ready(s1_r),     .out_data(s1_d)
  );

  transpose_mem #(.N(N), .VECS(N), .DW(DW)) u_t1 (
    .clk, .rst_n,
    .in_valid (s1_v), .in_ready (s1_r), .in_data (s1_d),
    .out_valid(t1_v), .out_ready(t1_r), .out_data(t1_d),
    .bank_swap(t1_swap)
  );

  daub_1d #(.N(N), .TAPS(TAPS), .DW(DW), .LEVELS(LEVELS)) u_dim_y (
    .clk, .rst_n,
    .in_valid (t1_v), .in_ready (t1_r), .in_data (t1_d),
    .out_valid(s2_v), .out_ready(s2_r), .out_data(s2_d)
  );

  transpose_mem #(.N(N), .VECS(N * N), .DW(DW)) u_t2 (
    .clk, .rst_n,
    .in_valid (s2_v), .in_ready (s2_r), .in_data (s2_d),
    .out_valid(t2_v), .out_ready(t2_r), .out_data(t2_d),
    .bank_swap(t2_swap)
  );

  daub_1d #(.N(N), .TAPS(TAPS), .DW(DW), .LEVELS(LEVELS)) u_dim_z (
    .clk, .rst_n,
    .in_valid (t2_v),      .in_ready (t2_r),  .in_data (t2_d),
    .out_valid(out_valid), .out_ready(1'b1),  .out_data(out_coef)
  );

endmodule
