// transpose_mem: transpose module between two 1-D wavelet stages (T1, T2).
//
// A block of VECS input vectors of N samples is written, vector by vector,
// into one of two banks, word address v*N + i for element i of vector v
// (row-major VECS x N). When the block is complete the bank is handed to the
// fetch unit, which reads it back as VECS output vectors: element j of output
// vector r is the word at address j*VECS + r. The writer carries on in the
// other bank meanwhile (ping-pong), so blocks can stream back to back.
//   T1, VECS = N:   one N x N slice; rows in, columns out (plain transpose).
//   T2, VECS = N*N: a whole N x N x N volume; vectors along y come in for
//                   each (z, x), vectors along z go out for each (x, y).
// Both banks are register arrays, since N words are written and N words of
// another axis are read in every cycle.
// Storing the coefficients in transposed order and reading them back through
// a fetch unit follows the described architecture; the bank organisation,
// the ping-pong scheme and the exact read order are this design's choices.
//
// Interface: valid/ready in and out. in_ready is low while the bank being
// written is still waiting to be read. out_* is a registered output stage.
// Timing: the first vector of a block leaves one cycle after the block's
// last vector was written; then one vector per cycle. bank_swap pulses when a
// bank has been filled.
module transpose_mem #(
  parameter int N    = 4,    // samples per vector
  parameter int VECS = 4,    // vectors per block
  parameter int DW   = 24    // sample width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_data  [N],
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [DW-1:0] out_data [N],
  output logic                 bank_swap
);

  localparam int WORDS = N * VECS;
  localparam int VW    = (VECS > 1) ? $clog2(VECS) : 1;
  localparam int AW    = $clog2(WORDS);

  typedef logic signed [DW-1:0] samp_t;

  samp_t         mem [2][WORDS];
  logic [1:0]    full;
  logic          wr_bank;
  logic [VW-1:0] wr_vec;
  logic          wr_en, wr_last;

  logic          rd_allow, rd_en, rd_bank, rd_last;
  logic [VW-1:0] rd_vec;

  // ---- write side
  assign in_ready  = !full[wr_bank];
  assign wr_en     = in_valid && in_ready;
  assign wr_last   = (wr_vec == VW'(VECS - 1));
  assign bank_swap = wr_en && wr_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank <= 1'b0;
      wr_vec  <= '0;
    end else if (wr_en) begin
      if (wr_last) begin
        wr_vec  <= '0;
        wr_bank <= !wr_bank;
      end else begin
        wr_vec <= wr_vec + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int i = 0; i < N; i++)
        mem[wr_bank][AW'(wr_vec) * AW'(N) + AW'(i)] <= in_data[i];
  end

  // ---- bank ownership: set by the writer, cleared by the reader. The writer
  // only sets a free bank and the reader only clears a full one, so the two
  // never touch the same bit in one cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) full <= '0;
    else begin
      if (wr_en && wr_last) full[wr_bank] <= 1'b1;
      if (rd_en && rd_last) full[rd_bank] <= 1'b0;
    end
  end

  // ---- read side
  assign rd_allow = out_ready || !out_valid;

  fetch_unit #(.VECS(VECS)) u_fetch (
    .clk      (clk),
    .rst_n    (rst_n),
    .bank_full(full),
    .rd_allow (rd_allow),
    .rd_en    (rd_en),
    .rd_bank  (rd_bank),
    .rd_vec   (rd_vec),
    .rd_last  (rd_last)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else if (rd_allow) out_valid <= rd_en;
  end

  always_ff @(posedge clk) begin
    if (rd_en)
      for (int j = 0; j < N; j++)
        out_data[j] <= mem[rd_bank][AW'(j) * AW'(VECS) + AW'(rd_vec)];
  end

  // A bank is never written while it is owned by the reader.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> !full[wr_bank]);

endmodule
