// tb_ldpc_codec: end-to-end test of the codec at its default parameters.
//
// Each frame: a random 512-bit word goes through the encoder (some frames
// with gaps in the input, stalling the encoder); the codeword is checked
// against the reference encoder and H; it is sent over a BPSK/AWGN channel
// model and fed to the decoder (some frames with load gaps, stalling the
// decoder); the decoded word is compared bit for bit with the reference
// decoder model, with the sent word on low-noise frames, and the decoding
// time with 64 + 128 * 10 cycles. The testbench counts how often each
// mechanism occurred (encoder stall, decoder stall, saturated channel LLR,
// channel errors corrected) and fails if one never did.
module tb_ldpc_codec;
  import ldpc_tb_pkg::*;

  localparam int FRAMES = 6;
  localparam int ITER = 10;     // the decoder's default iteration count
  localparam int GAIN = 32;     // the LLR table's default gain

  logic clk = 0, rst_n = 0;
  logic enc_in_valid = 0, enc_in_ready, enc_in_bit = 0;
  logic enc_d_valid, enc_d_bit, enc_p_valid, enc_p_bit, enc_p_last;
  logic dec_in_valid = 0, dec_in_ready;
  logic [15:0][5:0] dec_in_y = '0;
  logic dec_out_valid, dec_out_last, dec_busy;
  logic [15:0] dec_out_bits;
  logic [5:0] dec_out_t;

  int checks = 0, failures = 0, cycle = 0;
  int n_enc_stall = 0, n_dec_stall = 0, n_sat = 0, n_corrected = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  ldpc_codec dut (
    .clk(clk), .rst_n(rst_n),
    .enc_in_valid(enc_in_valid), .enc_in_ready(enc_in_ready), .enc_in_bit(enc_in_bit),
    .enc_d_valid(enc_d_valid), .enc_d_bit(enc_d_bit), .enc_p_valid(enc_p_valid),
    .enc_p_bit(enc_p_bit), .enc_p_last(enc_p_last),
    .dec_in_valid(dec_in_valid), .dec_in_ready(dec_in_ready), .dec_in_y(dec_in_y),
    .dec_out_valid(dec_out_valid), .dec_out_bits(dec_out_bits), .dec_out_t(dec_out_t),
    .dec_out_last(dec_out_last), .dec_busy(dec_busy)
  );

  // encoder output collection
  bit enc_word [NBITS];
  int nd = 0, np = 0, enc_done = 0;
  always @(negedge clk) if (rst_n) begin
    if (enc_d_valid) begin enc_word[nd] = enc_d_bit; nd++; end
    if (enc_p_valid) begin enc_word[KBITS + np] = enc_p_bit; np++; end
    if (enc_p_valid && enc_p_last) enc_done++;
  end

  // decoder output collection
  bit dec_word [NBITS];
  int n_out = 0, dec_done = 0, last_cycle = 0;
  always @(negedge clk) if (rst_n && dec_out_valid) begin
    for (int k = 0; k < 16; k++)
      dec_word[(k < 8) ? k * 64 + int'(dec_out_t) : 512 + (k - 8) * 64 + int'(dec_out_t)] = dec_out_bits[k];
    n_out++;
    if (dec_out_last) begin dec_done++; last_cycle = cycle; end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit d [KBITS];
    bit c [NBITS];
    bit ref_hard [NBITS];
    int y [NBITS];
    real sigma;
    int first_cycle, stalls, errs, raw_errs, lm;
    bit ls;
    build_h();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      sigma = (f < 3) ? 0.5 : 0.7;
      for (int j = 0; j < KBITS; j++) d[j] = bit'($urandom_range(0, 1));
      encode(d, c);
      // ---- encode ----
      nd = 0; np = 0;
      while (!enc_in_ready) @(negedge clk);
      for (int j = 0; j < KBITS; ) begin
        if (f % 2 == 0 && $urandom_range(0, 5) == 0) begin enc_in_valid = 0; n_enc_stall++; end
        else begin enc_in_valid = 1; enc_in_bit = d[j]; end
        @(posedge clk);
        if (enc_in_valid && enc_in_ready) j++;
        @(negedge clk);
      end
      enc_in_valid = 0;
      while (enc_done <= f) @(negedge clk);
      errs = 0;
      for (int v = 0; v < NBITS; v++) errs += (enc_word[v] != c[v]);
      checks++; if (errs != 0) begin failures++; $display("frame %0d: %0d codeword bits wrong", f, errs); end
      checks++; if (syndrome_weight(enc_word) != 0) begin failures++; $display("frame %0d: codeword fails H", f); end
      // ---- channel ----
      raw_errs = 0;
      for (int v = 0; v < NBITS; v++) begin
        y[v] = channel(enc_word[v], sigma);
        raw_errs += ((y[v] < 0) != enc_word[v]);
        llr_of(y[v], GAIN, ls, lm);
        if (lm == 15) n_sat++;
      end
      decode(y, GAIN, ITER, ref_hard);
      // ---- decode ----
      while (!dec_in_ready || dec_busy) @(negedge clk);
      first_cycle = -1; stalls = 0;
      for (int t = 0; t < 64; ) begin
        if (f % 2 == 1 && $urandom_range(0, 7) == 0) begin dec_in_valid = 0; stalls++; n_dec_stall++; end
        else begin
          dec_in_valid = 1;
          if (first_cycle < 0) first_cycle = cycle;
          for (int k = 0; k < 16; k++)
            dec_in_y[k] = 6'(y[(k < 8) ? k * 64 + t : 512 + (k - 8) * 64 + t]);
        end
        @(posedge clk);
        if (dec_in_valid) t++;
        @(negedge clk);
      end
      dec_in_valid = 0;
      n_out = 0;
      while (dec_done <= f) @(negedge clk);
      errs = 0;
      for (int v = 0; v < NBITS; v++) errs += (dec_word[v] != ref_hard[v]);
      checks++; if (errs != 0) begin failures++; $display("frame %0d: %0d decoded bits differ from model", f, errs); end
      checks++; if (n_out != 64) begin failures++; $display("frame %0d: %0d output beats", f, n_out); end
      errs = 0;
      for (int v = 0; v < NBITS; v++) errs += (dec_word[v] != enc_word[v]);
      if (f < 3) begin
        checks++; if (errs != 0) begin failures++; $display("frame %0d: %0d residual errors at low noise", f, errs); end
      end
      if (raw_errs > 0 && errs == 0) n_corrected++;
      if (stalls == 0) begin
        checks++;
        if (last_cycle - first_cycle != 64 + 128 * ITER - 1) begin
          failures++; $display("frame %0d: decoding took %0d cycles", f, last_cycle - first_cycle + 1);
        end
      end
      $display("frame %0d sigma %0.1f: channel errors %0d, after decoding %0d, decoder stalls %0d", f, sigma, raw_errs, errs, stalls);
    end
    $display("mechanisms: encoder stalls %0d, decoder stalls %0d, saturated LLRs %0d, frames corrected %0d",
             n_enc_stall, n_dec_stall, n_sat, n_corrected);
    checks++; if (n_enc_stall == 0) failures++;
    checks++; if (n_dec_stall == 0) failures++;
    checks++; if (n_sat == 0) failures++;
    checks++; if (n_corrected == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
