// daub_1d_harness: drives one daub_1d configuration with random vectors,
// random input gaps and random output stalls, and compares every output
// vector with a bit-exact reference model computed here. The model takes its
// filter taps from the closed-form Daubechies formulas ($sqrt), not from the
// design's table. It also checks the pipeline latency (LEVELS cycles) on an
// unstalled vector. Reports its counts on checks/failures and raises done.
module daub_1d_harness #(
  parameter int N      = 4,
  parameter int TAPS   = 4,
  parameter int LEVELS = 2,
  parameter int DW     = 24,
  parameter int NVEC   = 200
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int FRAC = 8;

  logic in_valid, in_ready, out_valid, out_ready;
  logic signed [DW-1:0] in_data [N];
  logic signed [DW-1:0] out_data [N];

  daub_1d #(.N(N), .TAPS(TAPS), .DW(DW), .LEVELS(LEVELS)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data
  );

  longint h [TAPS];
  longint g [TAPS];

  function automatic void make_taps();
    real hr [6];
    real s3, z1, z2, d;
    if (TAPS == 4) begin
      s3 = $sqrt(3.0); d = 4.0 * $sqrt(2.0);
      hr[0] = (1.0 + s3) / d; hr[1] = (3.0 + s3) / d;
      hr[2] = (3.0 - s3) / d; hr[3] = (1.0 - s3) / d;
    end else begin
      z1 = $sqrt(10.0); z2 = $sqrt(5.0 + 2.0 * z1); d = 16.0 * $sqrt(2.0);
      hr[0] = (1.0 + z1 + z2) / d;        hr[1] = (5.0 + z1 + 3.0 * z2) / d;
      hr[2] = (10.0 - 2.0*z1 + 2.0*z2) / d; hr[3] = (10.0 - 2.0*z1 - 2.0*z2) / d;
      hr[4] = (5.0 + z1 - 3.0 * z2) / d;  hr[5] = (1.0 + z1 - z2) / d;
    end
    for (int k = 0; k < TAPS; k++) h[k] = longint'(hr[k] * 256.0);
    for (int k = 0; k < TAPS; k++)
      g[k] = (k % 2 == 0) ? h[TAPS-1-k] : -h[TAPS-1-k];
  endfunction

  function automatic longint wrap(input longint v);
    return (v <<< (64 - DW)) >>> (64 - DW);
  endfunction

  // Reference model, in place on mv[]: LEVELS levels of the periodic
  // Daubechies analysis, lows first, highs after, per level.
  longint mv [N];
  longint mt [N];

  function automatic void model();
    longint lo, hi;
    int n;
    n = N;
    for (int l = 0; l < LEVELS; l++) begin
      for (int i = 0; i < N; i++) mt[i] = mv[i];
      for (int k = 0; k < n / 2; k++) begin
        lo = 0; hi = 0;
        for (int j = 0; j < TAPS; j++) begin
          lo += (mv[(2 * k + j) % n] * h[j]) >>> FRAC;
          hi += (mv[(2 * k + j) % n] * g[j]) >>> FRAC;
        end
        mt[k]         = wrap(lo);
        mt[n / 2 + k] = wrap(hi);
      end
      for (int i = 0; i < N; i++) mv[i] = mt[i];
      n = n / 2;
    end
  endfunction

  task automatic push_expected();
    model();
    for (int i = 0; i < N; i++) expq.push_back(mv[i]);
  endtask

  longint expq [$];
  int   sent, got;
  int   t_in, lat_seen;

  initial begin
    make_taps();
    checks = 0; failures = 0; done = 0;
    in_valid = 0; out_ready = 1; sent = 0; got = 0; lat_seen = 0;
    for (int i = 0; i < N; i++) in_data[i] = '0;
    @(posedge rst_n);
    @(posedge clk); #1;
    // latency: one vector into an empty, unstalled pipeline
    for (int i = 0; i < N; i++) begin
      mv[i] = longint'($urandom_range(0, 65535)) - 32768;
      in_data[i] = DW'(mv[i]);
    end
    in_valid = 1;
    @(posedge clk); #1;
    push_expected(); sent++;
    t_in = 0;
    in_valid = 0;
    while (!out_valid) begin @(posedge clk); #1; t_in++; end
    checks++;
    if (t_in + 1 != LEVELS) begin
      failures++;
      $display("latency %0d cycles, expected %0d", t_in + 1, LEVELS);
    end
    lat_seen = 1;
    // random traffic
    while (sent < NVEC) begin
      in_valid = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < N; i++) begin
        case ($urandom_range(0, 3))
          0: mv[i] = longint'($urandom_range(0, (1 << (DW - 6)) - 1)) - (1 << (DW - 7));
          1: mv[i] = (1 << (DW - 7)) - 1;
          2: mv[i] = -(1 << (DW - 7));
          default: mv[i] = longint'($urandom_range(0, 255)) <<< FRAC;
        endcase
        in_data[i] = DW'(mv[i]);
      end
      out_ready = ($urandom_range(0, 4) != 0);
      @(posedge clk);
      if (in_valid && in_ready) begin push_expected(); sent++; end
      #1;
    end
    in_valid = 0;
    out_ready = 1;
    repeat (LEVELS + 4) @(posedge clk);
    #1;
    checks++;
    if (got != NVEC) begin
      failures++;
      $display("received %0d of %0d vectors", got, NVEC);
    end
    done = 1;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      longint e;
      got++;
      if (expq.size() == 0) begin
        checks++;
        failures++;
        $display("N=%0d TAPS=%0d: unexpected output", N, TAPS);
      end else begin
        for (int i = 0; i < N; i++) begin
          e = expq.pop_front();
          checks++;
          if (longint'(out_data[i]) != e) begin
            failures++;
            $display("N=%0d TAPS=%0d vec %0d elem %0d: got %0d exp %0d",
                     N, TAPS, got, i, out_data[i], e);
          end
        end
      end
    end
  end

endmodule
