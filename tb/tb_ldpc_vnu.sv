// tb_ldpc_vnu: random test of the variable node unit in both sizes used,
// three edges (Hd columns) and two edges (Hp columns, second edge switchable),
// against integer arithmetic done here: posterior = channel + sum of check
// messages, outgoing = posterior - own message saturated to +-15, hard
// decision = posterior < 0, and the initial pass ignoring check messages.
module tb_ldpc_vnu;
  import ldpc_pkg::*;
  msg_t lch;
  msg_t [2:0] cv3, vc3;
  msg_t [1:0] cv2, vc2;
  logic [2:0] en3;
  logic [1:0] en2;
  logic first, hard3, hard2;
  int checks = 0, failures = 0;

  ldpc_vnu #(.DEG(3)) dut3 (.lch(lch), .cv(cv3), .en(en3), .first(first), .vc(vc3), .hard(hard3));
  ldpc_vnu #(.DEG(2)) dut2 (.lch(lch), .cv(cv2), .en(en2), .first(first), .vc(vc2), .hard(hard2));

  function automatic int val(input msg_t m);
    return m.sign ? -int'(m.mag) : int'(m.mag);
  endfunction

  function automatic bit same(input msg_t m, input int v);
    int s = (v > 15) ? 15 : ((v < -15) ? -15 : v);
    return (m.sign == (s < 0)) && (int'(m.mag) == ((s < 0) ? -s : s));
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int tot3, tot2, term;
      lch = msg_t'($urandom_range(0, 31));
      for (int e = 0; e < 3; e++) cv3[e] = msg_t'($urandom_range(0, 31));
      for (int e = 0; e < 2; e++) cv2[e] = msg_t'($urandom_range(0, 31));
      en3 = 3'b111;
      en2 = {1'($urandom_range(0, 1)), 1'b1};
      first = ($urandom_range(0, 9) == 0);
      #1;
      tot3 = val(lch);
      if (!first) for (int e = 0; e < 3; e++) tot3 += val(cv3[e]);
      tot2 = val(lch);
      if (!first) for (int e = 0; e < 2; e++) if (en2[e]) tot2 += val(cv2[e]);
      checks += 2;
      if (hard3 != (tot3 < 0)) failures++;
      if (hard2 != (tot2 < 0)) failures++;
      for (int e = 0; e < 3; e++) begin
        term = first ? 0 : val(cv3[e]);
        checks++;
        if (!same(vc3[e], tot3 - term)) begin failures++; $display("deg3 edge %0d: got %0b/%0d want %0d", e, vc3[e].sign, vc3[e].mag, tot3 - term); end
      end
      for (int e = 0; e < 2; e++) if (en2[e]) begin
        term = first ? 0 : val(cv2[e]);
        checks++;
        if (!same(vc2[e], tot2 - term)) begin failures++; $display("deg2 edge %0d mismatch", e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
