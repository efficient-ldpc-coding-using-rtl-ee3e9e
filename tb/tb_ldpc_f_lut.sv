// tb_ldpc_f_lut: checks the F function table for every magnitude and both
// signs against phi(x) = -ln(tanh(x/2)) computed in real arithmetic.
module tb_ldpc_f_lut;
  import ldpc_pkg::*;
  msg_t din, dout;
  int checks = 0, failures = 0;

  ldpc_f_lut dut (.din(din), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++)
      for (int k = 0; k < 16; k++) begin
        int expect_mag;
        real v;
        din.sign = 1'(s);
        din.mag  = 4'(k);
        #1;
        if (k == 0) expect_mag = 15;
        else begin
          v = -$ln($tanh(real'(k) * 0.25 / 2.0)) / 0.25;
          expect_mag = (v > 15.0) ? 15 : int'(v);
        end
        checks++;
        if (dout.mag != 4'(expect_mag) || dout.sign != din.sign) begin
          failures++;
          $display("phi(%0d) = %0d, expected %0d", k, dout.mag, expect_mag);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
