// tb_transpose_mem: self-checking test of the transpose memory in both of
// its roles, T1 (one N x N slice per block) and T2 (one N x N x N volume per
// block), at N = 4, with back-to-back blocks and random stalls on both sides.
module tb_transpose_mem;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int c [2];
  int f [2];
  logic d [2];

  transpose_harness #(.N(4), .VECS(4))  h_t1 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .done(d[0]));
  transpose_harness #(.N(4), .VECS(16)) h_t2 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .done(d[1]));

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
