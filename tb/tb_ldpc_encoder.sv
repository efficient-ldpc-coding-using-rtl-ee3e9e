// tb_ldpc_encoder: self-checking testbench of the hybrid H-matrix encoder.
//
// Sends random 512-bit information words, some with gaps in in_valid, and
// checks the systematic output, every parity bit against the reference
// encoder, that each codeword satisfies all 512 checks of H, that parity
// comes out on 512 consecutive cycles ending with p_last, and that a
// continuously fed codeword takes 1024 cycles.
module tb_ldpc_encoder;
  import ldpc_tb_pkg::*;

  localparam int WORDS = 4;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_bit = 0;
  logic d_valid, d_bit, p_valid, p_bit, p_last;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  ldpc_encoder dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_bit(in_bit), .d_valid(d_valid), .d_bit(d_bit), .p_valid(p_valid),
    .p_bit(p_bit), .p_last(p_last)
  );

  bit d [WORDS][KBITS];
  bit cw [NBITS];
  bit got [NBITS];
  int np = 0, nd = 0, word_out = 0, p_first = 0, p_lastc = 0, d_first [WORDS];
  int d_err = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(negedge clk) if (rst_n) begin
    if (d_valid) begin
      if (nd % KBITS == 0) d_first[nd / KBITS] = cycle;
      checks++;
      if (d_bit != d[nd / KBITS][nd % KBITS]) begin failures++; d_err++; end
      nd++;
    end
    if (p_valid) begin
      if (np == 0) p_first = cycle;
      got[KBITS + np] = p_bit;
      np++;
      if (p_last) begin
        p_lastc = cycle;
        encode(d[word_out], cw);
        checks++;
        if (np != MROWS || p_lastc - p_first != MROWS - 1) begin
          failures++; $display("word %0d: %0d parity bits over %0d cycles", word_out, np, p_lastc - p_first + 1);
        end
        for (int v = 0; v < KBITS; v++) got[v] = d[word_out][v];
        for (int v = KBITS; v < NBITS; v++) begin
          checks++;
          if (got[v] != cw[v]) failures++;
        end
        checks++;
        if (syndrome_weight(got) != 0) begin failures++; $display("word %0d: syndrome not zero", word_out); end
        if (word_out > 0 && word_out < 3) begin
          checks++;
          if (d_first[word_out] - d_first[word_out - 1] != 2 * KBITS) begin
            failures++; $display("word %0d: started %0d cycles after the previous", word_out, d_first[word_out] - d_first[word_out - 1]);
          end
        end
        np = 0;
        word_out++;
      end
    end
  end

  initial begin
    build_h();
    for (int w = 0; w < WORDS; w++)
      for (int j = 0; j < KBITS; j++) d[w][j] = bit'($urandom_range(0, 1));
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < WORDS; w++) begin
      for (int j = 0; j < KBITS; ) begin
        if (w == 3 && $urandom_range(0, 3) == 0) in_valid = 0;
        else begin in_valid = 1; in_bit = d[w][j]; end
        @(posedge clk);
        if (in_valid && in_ready) j++;
        @(negedge clk);
      end
      in_valid = 0;
      while (!in_ready) @(negedge clk);
    end
    while (word_out < WORDS) @(negedge clk);
    checks++;
    if (nd != WORDS * KBITS) begin failures++; $display("%0d systematic bits", nd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
