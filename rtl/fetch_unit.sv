// fetch_unit: read sequencer of a transpose memory.
//
// The transpose memory keeps two banks (ping-pong). Once the writer has
// filled a bank it raises that bank's bit in bank_full; the fetch unit then
// walks the bank's read vectors 0 .. VECS-1, one per cycle in which the
// memory's output register can take data (rd_allow). It reports the bank and
// vector to read, marks the last vector of the bank with rd_last (the memory
// then frees the bank) and moves on to the other bank. Banks are read in the
// same alternating order in which they are written.
// That a fetch unit reads the transposed coefficients back for the next
// 1-D stage follows the described architecture; the ping-pong bank order and
// this interface are this design's choices.
//
// Timing: rd_en is combinational from bank_full and rd_allow; the counters
// step on the clock edge at which rd_en is high.
module fetch_unit #(
  parameter int VECS = 4,                          // vectors per bank
  localparam int VW  = (VECS > 1) ? $clog2(VECS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    bank_full,   // bank b holds a complete block
  input  logic          rd_allow,    // reader may take a vector this cycle
  output logic          rd_en,       // a vector is read this cycle
  output logic          rd_bank,     // bank being read
  output logic [VW-1:0] rd_vec,      // vector index within the bank
  output logic          rd_last      // this is the bank's last vector
);

  assign rd_en   = rd_allow && bank_full[rd_bank];
  assign rd_last = (rd_vec == VW'(VECS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_bank <= 1'b0;
      rd_vec  <= '0;
    end else if (rd_en) begin
      if (rd_last) begin
        rd_vec  <= '0;
        rd_bank <= !rd_bank;
      end else begin
        rd_vec <= rd_vec + 1'b1;
      end
    end
  end

endmodule
