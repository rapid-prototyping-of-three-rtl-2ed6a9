// transpose_harness: streams NBLK random blocks through one transpose_mem
// configuration with random input gaps and random output stalls, and checks
// every output vector against the transpose worked out here: element j of
// output vector r of a block is input word j*VECS + r, where input word
// v*N + i is element i of input vector v. Also checks the one-cycle latency
// from the last write of a block to its first read, counts bank swaps and
// input stalls (in_ready low), and fails if no stall was ever seen.
module transpose_harness #(
  parameter int N    = 4,
  parameter int VECS = 4,
  parameter int NBLK = 12
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int DW = 24;
  localparam int WORDS = N * VECS;

  logic in_valid, in_ready, out_valid, out_ready, bank_swap;
  logic signed [DW-1:0] in_data [N];
  logic signed [DW-1:0] out_data [N];

  transpose_mem #(.N(N), .VECS(VECS), .DW(DW)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data, .bank_swap
  );

  longint blk [WORDS];
  longint expq [$];
  int sent_vec, got_vec, swaps, stalls;

  initial begin
    checks = 0; failures = 0; done = 0;
    in_valid = 0; out_ready = 1;
    sent_vec = 0; swaps = 0; stalls = 0;
    for (int i = 0; i < N; i++) in_data[i] = '0;
    @(posedge rst_n);
    @(posedge clk); #1;
    // first block back to back, output unstalled: check latency
    for (int b = 0; b < NBLK; b++) begin
      for (int w = 0; w < WORDS; w++) blk[w] = longint'($urandom) - 64'sd2147483648;
      for (int w = 0; w < WORDS; w++) blk[w] = (blk[w] <<< 40) >>> 40;
      for (int r = 0; r < VECS; r++)
        for (int j = 0; j < N; j++) expq.push_back(blk[j * VECS + r]);
      for (int v = 0; v < VECS; v++) begin
        in_valid = (b == 0) ? 1'b1 : ($urandom_range(0, 3) != 0);
        for (int i = 0; i < N; i++) in_data[i] = DW'(blk[v * N + i]);
        forever begin
          if (b > 0) out_ready = ($urandom_range(0, 2) != 0);
          #1;
          if (in_valid && !in_ready) stalls++;
          @(posedge clk);
          if (in_valid && in_ready) begin #1; break; end
          #1;
          in_valid = (b == 0) ? 1'b1 : ($urandom_range(0, 3) != 0);
        end
      end
      in_valid = 0;
      if (b == 0) begin
        @(posedge clk); #1;
        checks++;
        if (!out_valid) begin failures++; $display("VECS=%0d: no output one cycle after block", VECS); end
      end
    end
    out_ready = 1;
    while (got_vec < NBLK * VECS) @(posedge clk);
    repeat (3) @(posedge clk);
    #1;
    checks += 3;
    if (got_vec != NBLK * VECS) begin failures++; $display("got %0d vectors", got_vec); end
    if (swaps != NBLK) begin failures++; $display("bank swaps %0d, expected %0d", swaps, NBLK); end
    if (stalls == 0) begin failures++; $display("VECS=%0d: input never stalled", VECS); end
    $display("VECS=%0d: %0d blocks, %0d bank swaps, %0d input stall cycles", VECS, NBLK, swaps, stalls);
    done = 1;
  end

  initial got_vec = 0;
  always @(posedge clk) begin
    if (rst_n && bank_swap) swaps++;
    if (rst_n && out_valid && out_ready) begin
      got_vec++;
      for (int j = 0; j < N; j++) begin
        longint e;
        if (expq.size() == 0) begin checks++; failures++; $display("unexpected output"); break; end
        e = expq.pop_front();
        checks++;
        if (longint'(out_data[j]) != e) begin
          failures++;
          $display("VECS=%0d vec %0d elem %0d: got %0d exp %0d", VECS, got_vec, j, out_data[j], e);
        end
      end
    end
  end
endmodule
