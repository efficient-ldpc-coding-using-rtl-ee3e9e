// tb_ldpc_enc_input_buffer: self-checking testbench of the 512-bit banked
// information buffer. Writes a random word bit by bit, then reads random
// addresses from all eight banks at once and compares with the word.
module tb_ldpc_enc_input_buffer;
  logic clk = 0, we = 0, wbit = 0;
  logic [8:0] waddr = '0;
  logic [7:0][5:0] raddr;
  logic [7:0] rbit;
  int checks = 0, failures = 0;
  bit word [512];

  always #5 clk = ~clk;

  ldpc_enc_input_buffer dut (.clk(clk), .we(we), .waddr(waddr), .wbit(wbit), .raddr(raddr), .rbit(rbit));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int j = 0; j < 512; j++) word[j] = bit'($urandom_range(0, 1));
      for (int j = 0; j < 512; j++) begin
        @(negedge clk);
        we = 1; waddr = 9'(j); wbit = word[j];
      end
      @(negedge clk);
      we = 0;
      for (int n = 0; n < 300; n++) begin
        for (int b = 0; b < 8; b++) raddr[b] = 6'($urandom_range(0, 63));
        #1;
        for (int b = 0; b < 8; b++) begin
          checks++;
          if (rbit[b] != word[b * 64 + raddr[b]]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
