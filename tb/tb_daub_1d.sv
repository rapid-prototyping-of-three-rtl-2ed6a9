// tb_daub_1d: self-checking test of the 1-D Daubechies unit.
// Runs the bit-exact random test on Daub4 and Daub6 at N = 4 (the evaluated
// size) and N = 8, and checks the first level of the 8-point Daub4 worked
// example f = (2,5,8,9,7,4,-1,1) against its hand-computed values, to within
// the error of 8-bit fraction taps.
module tb_daub_1d;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int c [4];
  int f [4];
  logic d [4];

  daub_1d_harness #(.N(4), .TAPS(4), .LEVELS(2)) h0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .done(d[0]));
  daub_1d_harness #(.N(4), .TAPS(6), .LEVELS(2)) h1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .done(d[1]));
  daub_1d_harness #(.N(8), .TAPS(4), .LEVELS(3)) h2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .done(d[2]));
  daub_1d_harness #(.N(8), .TAPS(6), .LEVELS(3)) h3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .done(d[3]));

  // worked example, one level, 8 points
  logic ex_valid, ex_ready, ex_ovalid;
  logic signed [23:0] ex_in  [8];
  logic signed [23:0] ex_out [8];
  daub_1d #(.N(8), .TAPS(4), .DW(24), .LEVELS(1)) u_ex (
    .clk, .rst_n, .in_valid(ex_valid), .in_ready(ex_ready), .in_data(ex_in),
    .out_valid(ex_ovalid), .out_ready(1'b1), .out_data(ex_out)
  );
  // periodic extension at the end of the vector: lows then highs
  real ex_exp [8] = '{5.777, 12.41, 6.374, 0.155, 0.966, 0.871, -3.120, -0.837};
  int  ex_f   [8] = '{2, 5, 8, 9, 7, 4, -1, 1};

  initial begin
    ex_valid = 0;
    for (int i = 0; i < 8; i++) ex_in[i] = 24'(ex_f[i] * 256);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    ex_valid = 1;
    @(posedge clk); #1;
    ex_valid = 0;
    checks++;
    if (!ex_ovalid) begin failures++; $display("example: no output after 1 cycle"); end
    for (int i = 0; i < 8; i++) begin
      real r;
      r = real'(ex_out[i]) / 256.0;
      checks++;
      if (r - ex_exp[i] > 0.06 || ex_exp[i] - r > 0.06) begin
        failures++;
        $display("example elem %0d: got %f exp %f", i, r, ex_exp[i]);
      end
    end
    wait (d[0] && d[1] && d[2] && d[3]);
    for (int i = 0; i < 4; i++) begin checks += c[i]; failures += f[i]; end
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
