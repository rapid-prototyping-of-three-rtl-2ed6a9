// tb_daub3d: self-checking test of the 3-D transform engine, Daub4 and
// Daub6 at N = 4 and Daub6 at N = 8, against the bit-exact 3-D reference.
module tb_daub3d;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int c [3];
  int f [3];
  logic d [3];

  for (genvar k = 0; k < 3; k++) begin : g_cfg
    localparam int N    = (k == 2) ? 8 : 4;
    localparam int TAPS = (k == 0) ? 4 : 6;
    logic iv, ir, ov, s1, s2;
    logic [7:0] ip [N];
    logic signed [23:0] oc [N];
    daub3d #(.N(N), .TAPS(TAPS)) dut (
      .clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_pix(ip),
      .out_valid(ov), .out_coef(oc), .t1_swap(s1), .t2_swap(s2)
    );
    daub3d_driver #(.N(N), .TAPS(TAPS), .NVOL(5)) drv (
      .clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_pix(ip),
      .out_valid(ov), .out_coef(oc), .t1_swap(s1), .t2_swap(s2),
      .checks(c[k]), .failures(f[k]), .done(d[k])
    );
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (d[0] && d[1] && d[2]);
    for (int i = 0; i < 3; i++) begin checks += c[i]; failures += f[i]; end
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
