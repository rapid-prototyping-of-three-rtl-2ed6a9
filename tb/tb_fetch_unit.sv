// tb_fetch_unit: self-checking test of the transpose read sequencer.
// Drives random bank_full and rd_allow patterns and checks, every cycle,
// that a read happens exactly when allowed and the current bank is full, and
// that reads walk vectors 0..VECS-1 of one bank, flag the last one, and then
// move to the other bank. The expected sequence is tracked here.
module tb_fetch_unit;
  localparam int VECS = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] bank_full;
  logic       rd_allow, rd_en, rd_bank, rd_last;
  logic [2:0] rd_vec;

  fetch_unit #(.VECS(VECS)) dut (.clk, .rst_n, .bank_full, .rd_allow, .rd_en, .rd_bank, .rd_vec, .rd_last);

  int checks = 0, failures = 0;
  int exp_bank = 0, exp_vec = 0, reads = 0, banks_done = 0;

  initial begin
    bank_full = '0; rd_allow = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (600) begin
      logic exp_en;
      bank_full = 2'($urandom_range(0, 3));
      rd_allow  = ($urandom_range(0, 3) != 0);
      #1;
      exp_en = rd_allow && bank_full[exp_bank];
      checks++;
      if (rd_en !== exp_en) begin failures++; $display("rd_en %b exp %b", rd_en, exp_en); end
      if (exp_en) begin
        checks++;
        if (rd_bank !== 1'(exp_bank) || rd_vec !== 3'(exp_vec) || rd_last !== (exp_vec == VECS - 1)) begin
          failures++;
          $display("read bank %0d vec %0d last %b, expected bank %0d vec %0d",
                   rd_bank, rd_vec, rd_last, exp_bank, exp_vec);
        end
        reads++;
        if (exp_vec == VECS - 1) begin exp_vec = 0; exp_bank = 1 - exp_bank; banks_done++; end
        else exp_vec++;
      end
      @(posedge clk); #1;
    end
    checks++;
    if (banks_done < 10) begin failures++; $display("only %0d banks read", banks_done); end
    $display("%0d reads, %0d banks completed", reads, banks_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
