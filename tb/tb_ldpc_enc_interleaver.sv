// tb_ldpc_enc_interleaver: self-checking testbench of the encoder's Hd
// interleaver. A random information word is modelled as the buffer behind
// the interleaver; for every parity row the XOR it forms must equal the XOR
// of the information bits in that row of the reference H.
module tb_ldpc_enc_interleaver;
  import ldpc_tb_pkg::*;
  logic [8:0] row;
  logic [7:0][5:0] raddr;
  logic [7:0] rbit;
  logic hd_sum;
  int checks = 0, failures = 0;
  bit word [512];

  ldpc_enc_interleaver dut (.row(row), .raddr(raddr), .rbit(rbit), .hd_sum(hd_sum));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_h();
    for (int pass = 0; pass < 8; pass++) begin
      for (int j = 0; j < 512; j++) word[j] = bit'($urandom_range(0, 1));
      for (int i = 0; i < 512; i++) begin
        bit s;
        row = 9'(i);
        #1;
        for (int b = 0; b < 8; b++) rbit[b] = word[b * 64 + raddr[b]];
        #1;
        s = 0;
        for (int e = 0; e < 3; e++) s ^= word[row_cols[i][e]];
        checks++;
        if (hd_sum != s) begin failures++; if (failures < 5) $display("row %0d: %0b expected %0b", i, hd_sum, s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
