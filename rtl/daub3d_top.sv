// daub3d_top: the two proposed 3-D wavelet engines side by side.
//
// One engine computes the 3-D Daub4 transform and the other the 3-D Daub6
// transform of N x N x N volumes (default N = 4, the evaluated size). Each
// has its own pixel input and coefficient output; see daub3d for the data
// order and timing. The two share only the clock and reset.
// Having both wavelets as separate engines follows the published design, which
// presents them as two architectures; putting them in one top is this
// design's choice. The *_swap outputs pulse when a transpose memory has
// filled a bank, for monitoring.
module daub3d_top #(
  parameter int N     = 4,     // transform size per dimension
  parameter int PIX_W = 8,     // pixel width, unsigned
  parameter int DW    = 24     // coefficient width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // Daub4 engine
  input  logic                 d4_in_valid,
  output logic                 d4_in_ready,
  input  logic [PIX_W-1:0]     d4_in_pix  [N],
  output logic                 d4_out_valid,
  output logic signed [DW-1:0] d4_out_coef [N],
  output logic                 d4_t1_swap,   // T1 / T2 bank filled (status)
  output logic                 d4_t2_swap,
  // Daub6 engine
  input  logic                 d6_in_valid,
  output logic                 d6_in_ready,
  input  logic [PIX_W-1:0]     d6_in_pix  [N],
  output logic                 d6_out_valid,
  output logic signed [DW-1:0] d6_out_coef [N],
  output logic                 d6_t1_swap,
  output logic                 d6_t2_swap
);

  daub3d #(.N(N), .TAPS(4), .PIX_W(PIX_W), .DW(DW)) u_daub4 (
    .clk, .rst_n,
    .in_valid (d4_in_valid),  .in_ready(d4_in_ready), .in_pix(d4_in_pix),
    .out_valid(d4_out_valid), .out_coef(d4_out_coef),
    .t1_swap  (d4_t1_swap),   .t2_swap (d4_t2_swap)
  );

  daub3d #(.N(N), .TAPS(6), .PIX_W(PIX_W), .DW(DW)) u_daub6 (
    .clk, .rst_n,
    .in_valid (d6_in_valid),  .in_ready(d6_in_ready), .in_pix(d6_in_pix),
    .out_valid(d6_out_valid), .out_coef(d6_out_coef),
    .t1_swap  (d6_t1_swap),   .t2_swap (d6_t2_swap)
  );

endmodule
