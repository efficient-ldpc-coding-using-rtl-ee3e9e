// tb_ldpc_dec_mem: random read-modify-write traffic on all 40 message banks
// and the 16 channel banks, compared with a memory model kept here. Every
// bank has its own address each cycle and writes only when enabled.
module tb_ldpc_dec_mem;
  import ldpc_pkg::*;
  logic clk = 0;
  logic [39:0][5:0] addr;
  logic [39:0] we;
  msg_t [39:0] wdata, rdata;
  logic [5:0] ch_addr;
  logic ch_we;
  msg_t [15:0] ch_wdata, ch_rdata;
  int checks = 0, failures = 0;
  msg_t model [40][64];
  msg_t ch_model [16][64];

  always #5 clk = ~clk;

  ldpc_dec_mem dut (.clk(clk), .addr(addr), .we(we), .wdata(wdata), .rdata(rdata),
                    .ch_addr(ch_addr), .ch_we(ch_we), .ch_wdata(ch_wdata), .ch_rdata(ch_rdata));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill everything
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      for (int b = 0; b < 40; b++) begin
        addr[b] = 6'(a); we[b] = 1; wdata[b] = msg_t'($urandom_range(0, 31)); model[b][a] = wdata[b];
      end
      ch_addr = 6'(a); ch_we = 1;
      for (int b = 0; b < 16; b++) begin ch_wdata[b] = msg_t'($urandom_range(0, 31)); ch_model[b][a] = ch_wdata[b]; end
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int b = 0; b < 40; b++) begin
        addr[b] = 6'($urandom_range(0, 63)); we[b] = 1'($urandom_range(0, 1)); wdata[b] = msg_t'($urandom_range(0, 31));
      end
      ch_addr = 6'($urandom_range(0, 63)); ch_we = 1'($urandom_range(0, 1));
      for (int b = 0; b < 16; b++) ch_wdata[b] = msg_t'($urandom_range(0, 31));
      #1;
      for (int b = 0; b < 40; b++) begin
        checks++;
        if (rdata[b] != model[b][addr[b]]) failures++;
        if (we[b]) model[b][addr[b]] = wdata[b];
      end
      for (int b = 0; b < 16; b++) begin
        checks++;
        if (ch_rdata[b] != ch_model[b][ch_addr]) failures++;
        if (ch_we) ch_model[b][ch_addr] = ch_wdata[b];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
