// tb_ldpc_llr_lut: checks the LLR table for every 6-bit sample at two gains
// against sign(y) and min(15, round(|y| * gain / 16)).
module tb_ldpc_llr_lut;
  import ldpc_pkg::*;
  logic signed [5:0] y;
  msg_t llr_a, llr_b;
  int checks = 0, failures = 0;

  ldpc_llr_lut #(.IN_W(6), .LLR_GAIN(32)) dut_a (.y(y), .llr(llr_a));
  ldpc_llr_lut #(.IN_W(6), .LLR_GAIN(10)) dut_b (.y(y), .llr(llr_b));

  function automatic int expect_mag(input int v, input int g);
    real m = real'((v < 0) ? -v : v) * real'(g) / 16.0;
    int r = int'($floor(m + 0.5));
    return (r > 15) ? 15 : r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -32; v < 32; v++) begin
      y = 6'(v);
      #1;
      checks += 2;
      if (llr_a.sign != (v < 0) || int'(llr_a.mag) != expect_mag(v, 32)) begin
        failures++; $display("gain 32, y %0d: %0b/%0d", v, llr_a.sign, llr_a.mag);
      end
      if (llr_b.sign != (v < 0) || int'(llr_b.mag) != expect_mag(v, 10)) begin
        failures++; $display("gain 10, y %0d: %0b/%0d", v, llr_b.sign, llr_b.mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
