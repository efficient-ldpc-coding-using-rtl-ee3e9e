// tb_ldpc_cnu: random test of the five-edge check node unit against the
// update computed here: magnitude = min(15, sum of the other edges' phi
// values), sign = XOR of the other edges' signs; with the last edge
// disabled as in row 0.
module tb_ldpc_cnu;
  import ldpc_pkg::*;
  msg_t [4:0] q, r;
  logic [4:0] en;
  int checks = 0, failures = 0;

  ldpc_cnu #(.DEG(5)) dut (.q(q), .en(en), .r(r));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      for (int e = 0; e < 5; e++) q[e] = msg_t'($urandom_range(0, 31));
      // small magnitudes often, so that the unsaturated range is exercised
      if (n % 2 == 0) for (int e = 0; e < 5; e++) q[e].mag = 4'($urandom_range(0, 4));
      en = ($urandom_range(0, 3) == 0) ? 5'b01111 : 5'b11111;
      #1;
      for (int e = 0; e < 5; e++) if (en[e]) begin
        int s;
        bit sg;
        s = 0;
        sg = 0;
        for (int o = 0; o < 5; o++) if (o != e && en[o]) begin
          s += int'(q[o].mag);
          sg ^= q[o].sign;
        end
        if (s > 15) s = 15;
        checks++;
        if (int'(r[e].mag) != s || r[e].sign != sg) begin
          failures++;
          if (failures < 10) $display("edge %0d: got %0b/%0d want %0b/%0d", e, r[e].sign, r[e].mag, sg, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
