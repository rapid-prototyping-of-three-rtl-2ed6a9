// daub3d_driver: feeds NVOL random volumes of PIX_W-bit pixels into one 3-D
// engine and checks its output against daub3d_ref.
// Volume 0 comes in back to back and its first-output latency is checked:
// 3*LEVELS + N + N*N + 2 clock edges from the edge that takes the first row
// to the edge at which the first output vector is taken; volumes 1 .. NVOL-2 come with random idle
// cycles; the last two come back to back without a gap between them.
// Volume 1 is all zeros and volume 2 a constant image, whose transform is a
// single nonzero coefficient plus truncation residue. Counts the mechanisms
// seen: T1 and T2 bank swaps, input idle cycles, back-to-back volume
// boundaries, input stalls (in_ready low).
module daub3d_driver #(
  parameter int N      = 4,
  parameter int TAPS   = 4,
  parameter int PIX_W  = 8,
  parameter int DW     = 24,
  parameter int NVOL   = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 in_valid,
  input  logic                 in_ready,
  output logic [PIX_W-1:0]     in_pix [N],
  input  logic                 out_valid,
  input  logic signed [DW-1:0] out_coef [N],
  input  logic                 t1_swap,
  input  logic                 t2_swap,
  output int                   checks,
  output int                   failures,
  output logic                 done
);
  localparam int LEVELS = $clog2(N);
  localparam int LAT    = 3 * LEVELS + N + N * N + 2;

  daub3d_ref #(.N(N), .TAPS(TAPS), .LEVELS(LEVELS), .DW(DW)) rm ();

  longint pix [N][N][N];
  longint expq [$];
  int got_vec, t1_swaps, t2_swaps, idles, b2b, stalls, lat;
  logic lat_run;

  initial begin
    checks = 0; failures = 0; done = 0;
    in_valid = 0;
    got_vec = 0; idles = 0; b2b = 0; stalls = 0; lat = 0; lat_run = 0;
    for (int i = 0; i < N; i++) in_pix[i] = '0;
    @(posedge rst_n);
    @(posedge clk); #1;
    for (int v = 0; v < NVOL; v++) begin
      for (int z = 0; z < N; z++)
        for (int y = 0; y < N; y++)
          for (int x = 0; x < N; x++) begin
            pix[z][y][x] = (v == 1) ? 0 : (v == 2) ? 100 :
                           longint'($urandom_range(0, (1 << PIX_W) - 1));
            rm.vol[z][y][x] = pix[z][y][x] <<< 8;
          end
      rm.run();
      for (int x = 0; x < N; x++)
        for (int y = 0; y < N; y++)
          for (int z = 0; z < N; z++) expq.push_back(rm.vol[z][y][x]);
      if (v == NVOL - 1) b2b++;
      for (int z = 0; z < N; z++)
        for (int y = 0; y < N; y++) begin
          for (int x = 0; x < N; x++) in_pix[x] = PIX_W'(pix[z][y][x]);
          forever begin
            in_valid = (v == 0 || v >= NVOL - 2) ? 1'b1 : ($urandom_range(0, 3) != 0);
            #1;
            if (!in_valid) idles++;
            if (in_valid && !in_ready) stalls++;
            @(posedge clk);
            if (in_valid && in_ready) begin
              if (v == 0 && z == 0 && y == 0) lat_run = 1;
              #1;
              break;
            end
            #1;
          end
        end
    end
    in_valid = 0;
    while (got_vec < NVOL * N * N) @(posedge clk);
    repeat (N * N + 10) @(posedge clk);
    #1;
    checks += 4;
    if (got_vec != NVOL * N * N) begin failures++; $display("got %0d vectors", got_vec); end
    if (t1_swaps != NVOL * N) begin failures++; $display("T1 swaps %0d, expected %0d", t1_swaps, NVOL * N); end
    if (t2_swaps != NVOL) begin failures++; $display("T2 swaps %0d, expected %0d", t2_swaps, NVOL); end
    if (idles == 0 || b2b == 0) begin failures++; $display("idle input or back-to-back volumes never seen"); end
    $display("N=%0d TAPS=%0d: %0d volumes, latency %0d cycles, T1 swaps %0d, T2 swaps %0d, idle input cycles %0d, back-to-back volume pairs %0d, input stall cycles %0d",
             N, TAPS, NVOL, lat, t1_swaps, t2_swaps, idles, b2b, stalls);
    done = 1;
  end

  initial begin t1_swaps = 0; t2_swaps = 0; end

  always @(posedge clk) begin
    if (rst_n) begin
      if (t1_swap) t1_swaps++;
      if (t2_swap) t2_swaps++;
      if (lat_run) begin
        if (out_valid) begin
          lat_run = 0;
          checks++;
          if (lat != LAT) begin
            failures++;
            $display("N=%0d TAPS=%0d: latency %0d cycles, expected %0d", N, TAPS, lat, LAT);
          end
        end else lat++;
      end
      if (out_valid) begin
        got_vec++;
        for (int j = 0; j < N; j++) begin
          longint e;
          if (expq.size() == 0) begin checks++; failures++; $display("unexpected output"); break; end
          e = expq.pop_front();
          checks++;
          if (longint'(out_coef[j]) != e) begin
            failures++;
            if (failures < 10)
              $display("N=%0d TAPS=%0d vec %0d elem %0d: got %0d exp %0d", N, TAPS, got_vec, j, out_coef[j], e);
          end
        end
      end
    end
  end
endmodule
