// tb_ldpc_decoder: self-checking testbench of the partially parallel decoder.
//
// Each frame is a random codeword from the reference encoder, sent through a
// BPSK/AWGN channel model and fed to the decoder, 16 samples per beat. The
// hard decisions are compared bit for bit with the reference decoder model,
// and against the sent codeword for low-noise frames. The decoding time
// (64 load beats plus 2p = 128 cycles per iteration, so the first input beat
// and the last output beat are 64 + 128 * ITER cycles apart counting both)
// is checked on frames loaded without gaps; other frames have random gaps in in_valid (load stall).
module tb_ldpc_decoder;
  import ldpc_tb_pkg::*;

  localparam int ITER = 10;
  localparam int GAIN = 32;
  localparam int FRAMES = 6;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [15:0][5:0] in_y;
  logic out_valid, out_last, busy;
  logic [15:0] out_bits;
  logic [5:0] out_t;

  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  ldpc_decoder #(.MAX_ITER(ITER), .LLR_GAIN(GAIN)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_y(in_y), .out_valid(out_valid), .out_bits(out_bits), .out_t(out_t),
    .out_last(out_last), .busy(busy)
  );

  bit got [NBITS];
  int n_out = 0, last_cycle = 0, n_last = 0;
  always @(negedge clk) if (rst_n && out_valid) begin
    for (int k = 0; k < 16; k++) got[(k < 8) ? k * 64 + out_t : 512 + (k - 8) * 64 + out_t] = out_bits[k];
    n_out++;
    if (out_last) begin last_cycle = cycle; n_last++; end
  end

  initial begin
    repeat (2000000) @(posedge clk);
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
    int first_cycle, stalls, errs_ref, errs_sent;
    build_h();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      sigma = (f < 3) ? 0.45 : 0.70;
      for (int j = 0; j < KBITS; j++) d[j] = bit'($urandom_range(0, 1));
      encode(d, c);
      for (int v = 0; v < NBITS; v++) y[v] = channel(c[v], sigma);
      decode(y, GAIN, ITER, ref_hard);
      n_out = 0; n_last = 0; stalls = 0;
      // wait until ready
      while (!in_ready || busy) @(negedge clk);
      first_cycle = -1;
      for (int t = 0; t < 64; ) begin
        if ((f % 2 == 1) && $urandom_range(0, 7) == 0) begin
          in_valid = 0; stalls++;
        end else begin
          in_valid = 1;
          if (first_cycle < 0) first_cycle = cycle;
          for (int k = 0; k < 16; k++)
            in_y[k] = 6'(y[(k < 8) ? k * 64 + t : 512 + (k - 8) * 64 + t]);
        end
        @(posedge clk);
        if (in_valid) t++;
        @(negedge clk);
      end
      in_valid = 0;
      while (n_last == 0) @(negedge clk);
      // compare
      errs_ref = 0; errs_sent = 0;
      for (int v = 0; v < NBITS; v++) begin
        errs_ref += (got[v] != ref_hard[v]);
        errs_sent += (got[v] != c[v]);
      end
      checks++; if (errs_ref != 0) begin failures++; $display("frame %0d: %0d bits differ from model", f, errs_ref); end
      checks++; if (n_out != 64) begin failures++; $display("frame %0d: %0d output beats", f, n_out); end
      if (f < 3) begin
        checks++; if (errs_sent != 0) begin failures++; $display("frame %0d: %0d residual errors at low noise", f, errs_sent); end
      end
      if (stalls == 0) begin
        checks++;
        if (last_cycle - first_cycle != 64 + 128 * ITER - 1) begin
          failures++; $display("frame %0d: latency %0d", f, last_cycle - first_cycle);
        end
      end
      $display("frame %0d sigma %0.2f: stalls %0d, errors vs sent %0d, vs model %0d, latency %0d", f, sigma, stalls, errs_sent, errs_ref, last_cycle - first_cycle);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
