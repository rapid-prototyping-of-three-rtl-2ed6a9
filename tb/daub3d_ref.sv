// daub3d_ref: bit-exact reference for the 3-D transform, for testbenches.
// Holds one N x N x N volume in vol[z][y][x]; run() applies the LEVELS-level
// periodic 1-D Daubechies analysis along x, then y, then z, with the same
// number format as the hardware (taps rounded to 8 fraction bits from their
// closed forms, each product shifted right by 8, DW-bit wrap-around).
module daub3d_ref #(
  parameter int N      = 4,
  parameter int TAPS   = 4,
  parameter int LEVELS = 2,
  parameter int DW     = 24
) ();
  localparam int FRAC = 8;

  longint vol [N][N][N];
  longint h [TAPS];
  longint g [TAPS];
  longint mv [N];
  longint mt [N];

  initial begin
    real hr [6];
    real s3, z1, z2, d;
    if (TAPS == 4) begin
      s3 = $sqrt(3.0); d = 4.0 * $sqrt(2.0);
      hr[0] = (1.0 + s3) / d; hr[1] = (3.0 + s3) / d;
      hr[2] = (3.0 - s3) / d; hr[3] = (1.0 - s3) / d;
    end else begin
      z1 = $sqrt(10.0); z2 = $sqrt(5.0 + 2.0 * z1); d = 16.0 * $sqrt(2.0);
      hr[0] = (1.0 + z1 + z2) / d;          hr[1] = (5.0 + z1 + 3.0 * z2) / d;
      hr[2] = (10.0 - 2.0*z1 + 2.0*z2) / d; hr[3] = (10.0 - 2.0*z1 - 2.0*z2) / d;
      hr[4] = (5.0 + z1 - 3.0 * z2) / d;    hr[5] = (1.0 + z1 - z2) / d;
    end
    for (int k = 0; k < TAPS; k++) h[k] = longint'(hr[k] * 256.0);
    for (int k = 0; k < TAPS; k++)
      g[k] = (k % 2 == 0) ? h[TAPS-1-k] : -h[TAPS-1-k];
  end

  function automatic longint wrap(input longint v);
    return (v <<< (64 - DW)) >>> (64 - DW);
  endfunction

  function automatic void line();
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

  function automatic void run();
    for (int z = 0; z < N; z++)
      for (int y = 0; y < N; y++) begin
        for (int x = 0; x < N; x++) mv[x] = vol[z][y][x];
        line();
        for (int x = 0; x < N; x++) vol[z][y][x] = mv[x];
      end
    for (int z = 0; z < N; z++)
      for (int x = 0; x < N; x++) begin
        for (int y = 0; y < N; y++) mv[y] = vol[z][y][x];
        line();
        for (int y = 0; y < N; y++) vol[z][y][x] = mv[y];
      end
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        for (int z = 0; z < N; z++) mv[z] = vol[z][y][x];
        line();
        for (int z = 0; z < N; z++) vol[z][y][x] = mv[z];
      end
  endfunction
endmodule
