// tb_daub3d_top: end-to-end test of the top at its default parameters
// (N = 4, 8-bit pixels, 24-bit coefficients). Both engines, Daub4 and Daub6,
// transform the same sequence of random, all-zero and constant 4x4x4
// volumes, with idle input cycles and back-to-back volumes, and every output
// coefficient is compared with the bit-exact 3-D reference. Checks the
// first-output latency and counts T1/T2 bank swaps per engine.
module tb_daub3d_top;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic d4_iv, d4_ir, d4_ov, d4_s1, d4_s2;
  logic d6_iv, d6_ir, d6_ov, d6_s1, d6_s2;
  logic [7:0] d4_ip [N];
  logic [7:0] d6_ip [N];
  logic signed [23:0] d4_oc [N];
  logic signed [23:0] d6_oc [N];

  daub3d_top dut (
    .clk, .rst_n,
    .d4_in_valid(d4_iv), .d4_in_ready(d4_ir), .d4_in_pix(d4_ip),
    .d4_out_valid(d4_ov), .d4_out_coef(d4_oc), .d4_t1_swap(d4_s1), .d4_t2_swap(d4_s2),
    .d6_in_valid(d6_iv), .d6_in_ready(d6_ir), .d6_in_pix(d6_ip),
    .d6_out_valid(d6_ov), .d6_out_coef(d6_oc), .d6_t1_swap(d6_s1), .d6_t2_swap(d6_s2)
  );

  int checks = 0, failures = 0;
  int c [2];
  int f [2];
  logic d [2];

  daub3d_driver #(.N(N), .TAPS(4), .NVOL(8)) drv4 (
    .clk, .rst_n, .in_valid(d4_iv), .in_ready(d4_ir), .in_pix(d4_ip),
    .out_valid(d4_ov), .out_coef(d4_oc), .t1_swap(d4_s1), .t2_swap(d4_s2),
    .checks(c[0]), .failures(f[0]), .done(d[0])
  );
  daub3d_driver #(.N(N), .TAPS(6), .NVOL(8)) drv6 (
    .clk, .rst_n, .in_valid(d6_iv), .in_ready(d6_ir), .in_pix(d6_ip),
    .out_valid(d6_ov), .out_coef(d6_oc), .t1_swap(d6_s1), .t2_swap(d6_s2),
    .checks(c[1]), .failures(f[1]), .done(d[1])
  );

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (d[0] && d[1]);
    for (int i = 0; i < 2; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
