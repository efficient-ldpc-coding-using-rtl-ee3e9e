// tb_ldpc_parity_gen: self-checking testbench of the XOR/flip-flop parity
// generator. Feeds random sums with random enables and first-row marks and
// compares the flip-flop output each cycle with a running XOR kept here.
module tb_ldpc_parity_gen;
  logic clk = 0, rst_n = 0, en = 0, first = 0, hd_sum = 0, p;
  int checks = 0, failures = 0;
  bit model = 0;

  always #5 clk = ~clk;

  ldpc_parity_gen dut (.clk(clk), .rst_n(rst_n), .en(en), .first(first), .hd_sum(hd_sum), .p(p));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++; if (p !== 1'b0) failures++;   // reset value
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      en = ($urandom_range(0, 4) != 0);
      first = ($urandom_range(0, 30) == 0);
      hd_sum = 1'($urandom_range(0, 1));
      @(posedge clk);
      if (en) model = (first ? 1'b0 : model) ^ hd_sum;
      @(negedge clk);
      checks++;
      if (p != model) begin failures++; $display("cycle %0d: p %0b expected %0b", n, p, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
