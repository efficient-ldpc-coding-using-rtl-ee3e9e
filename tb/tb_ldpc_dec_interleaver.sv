// tb_ldpc_dec_interleaver: checks the decoder's interleaver, deinterleaver
// and memory switches against H without knowing the bank layout.
//
// Variable pass: for every column offset t and every VNU edge output, one
// output at a time is made non-zero; exactly one bank must be written, and
// the column that edge belongs to is recorded for that bank slot. The VNU
// must also read that edge from the same slot. Check pass: for every row
// offset t, one bank at a time returns a non-zero word; the CNU input it
// reaches gives the row, and the columns so collected for each row must be
// exactly the columns of that row of H. The CNU must write back to the slot
// it read. Missing edges (row 0, last parity column) must be disabled.
module tb_ldpc_dec_interleaver;
  import ldpc_pkg::*;
  import ldpc_tb_pkg::build_h, ldpc_tb_pkg::row_cols, ldpc_tb_pkg::row_deg;

  logic phase_v, act;
  logic [5:0] t;
  msg_t [7:0][2:0] vnu_hd_out, vnu_hd_in;
  msg_t [7:0][1:0] vnu_hp_out, vnu_hp_in;
  logic [7:0][1:0] vnu_hp_en;
  msg_t [7:0][4:0] cnu_out, cnu_in;
  logic [7:0][4:0] cnu_en;
  logic [39:0][5:0] mem_addr;
  logic [39:0] mem_we;
  msg_t [39:0] mem_wdata, mem_rdata;
  int checks = 0, failures = 0;
  int slot_col [40][64];       // column stored in each slot, -1 = none
  localparam msg_t ONE = 5'h1f;

  ldpc_dec_interleaver dut (
    .phase_v(phase_v), .act(act), .t(t),
    .vnu_hd_out(vnu_hd_out), .vnu_hp_out(vnu_hp_out), .vnu_hd_in(vnu_hd_in),
    .vnu_hp_in(vnu_hp_in), .vnu_hp_en(vnu_hp_en), .cnu_out(cnu_out),
    .cnu_in(cnu_in), .cnu_en(cnu_en), .mem_addr(mem_addr), .mem_we(mem_we),
    .mem_wdata(mem_wdata), .mem_rdata(mem_rdata)
  );

  function automatic void fail(input string what);
    failures++;
    if (failures < 10) $display("%s", what);
  endfunction

  // Which bank is written with a non-zero word; -1 if none, -2 if several.
  function automatic int written_bank();
    int b = -1;
    for (int i = 0; i < 40; i++)
      if (mem_we[i] && mem_wdata[i] != '0) b = (b == -1) ? i : -2;
    return b;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got [512][5];
    msg_t [7:0][2:0] hd_tmp;
    msg_t [7:0][1:0] hp_tmp;
    int ngot [512];
    build_h();
    for (int b = 0; b < 40; b++) for (int a = 0; a < 64; a++) slot_col[b][a] = -1;
    act = 1;
    vnu_hd_out = '0; vnu_hp_out = '0; cnu_out = '0; mem_rdata = '0;
    // ---------------- variable pass ----------------
    phase_v = 1;
    #1;
    for (int tt = 0; tt < 64; tt++) begin
      t = 6'(tt);
      for (int u = 0; u < 16; u++)
        for (int e = 0; e < ((u < 8) ? 3 : 2); e++) begin
          int col, b;
          col = (u < 8) ? u * 64 + tt : 512 + (u - 8) * 64 + tt;
          hd_tmp = '0; hp_tmp = '0;
          if (u < 8) hd_tmp[u][e] = ONE; else hp_tmp[u - 8][e] = ONE;
          vnu_hd_out = hd_tmp; vnu_hp_out = hp_tmp;
          #1;
          b = written_bank();
          if (u == 15 && e == 1 && tt == 63) begin
            checks++;
            if (b != -1 || vnu_hp_en[7][1]) fail("last parity column has a second edge");
          end else begin
            if (u >= 8) begin
              checks++;
              if (!vnu_hp_en[u - 8][e]) fail($sformatf("column %0d edge %0d disabled", col, e));
            end
            checks++;
            if (b < 0) fail($sformatf("column %0d edge %0d: %0d banks written", col, e, b));
            else begin
              checks++;
              if (slot_col[b][mem_addr[b]] != -1) fail($sformatf("slot %0d/%0d written twice", b, mem_addr[b]));
              slot_col[b][mem_addr[b]] = col;
              // the VNU must read the same slot
              vnu_hd_out = '0; vnu_hp_out = '0;
              mem_rdata = '0;
              mem_rdata[b] = ONE;
              #1;
              checks++;
              if ((u < 8 && vnu_hd_in[u][e] != ONE) || (u >= 8 && vnu_hp_in[u - 8][e] != ONE))
                fail($sformatf("column %0d edge %0d reads another slot", col, e));
              mem_rdata = '0;
            end
          end
        end
    end
    // ---------------- check pass ----------------
    phase_v = 0;
    #1;
    for (int i = 0; i < 512; i++) ngot[i] = 0;
    for (int tt = 0; tt < 64; tt++) begin
      t = 6'(tt);
      for (int b = 0; b < 40; b++) begin
        int hits;
        hits = 0;
        mem_rdata = '0;
        mem_rdata[b] = ONE;
        #1;
        for (int br = 0; br < 8; br++)
          for (int e = 0; e < 5; e++)
            if (cnu_en[br][e] && cnu_in[br][e] == ONE) begin
              int row;
              row = br * 64 + tt;
              hits++;
              checks++;
              if (mem_addr[b] != 6'(tt)) fail("check pass address is not t");
              if (ngot[row] < 5) got[row][ngot[row]] = slot_col[b][tt];
              ngot[row]++;
              // the CNU writes back to the slot it read
              mem_rdata = '0;
              cnu_out = '0;
              cnu_out[br][e] = ONE;
              #1;
              checks++;
              if (written_bank() != b) fail($sformatf("row %0d edge %0d writes bank %0d, read %0d", row, e, written_bank(), b));
              cnu_out = '0;
              mem_rdata[b] = ONE;
              #1;
            end
        checks++;
        if (hits > 1) fail("one slot feeds several CNU inputs");
      end
    end
    for (int i = 0; i < 512; i++) begin
      checks++;
      if (ngot[i] != row_deg[i]) begin fail($sformatf("row %0d has %0d edges, H has %0d", i, ngot[i], row_deg[i])); continue; end
      for (int e = 0; e < row_deg[i]; e++) begin
        bit found;
        found = 0;
        for (int g = 0; g < ngot[i]; g++) if (got[i][g] == row_cols[i][e]) found = 1;
        checks++;
        if (!found) fail($sformatf("row %0d misses column %0d", i, row_cols[i][e]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
