// ldpc_decoder: partially parallel decoder for the (1024,512) hybrid
// H-matrix code.
//
// Eight CNUs (one per block row) and sixteen VNUs (eight VNU(Hd) with three
// edges, one per block column of Hd, and eight VNU(Hp) with two edges, one
// per block column of Hp) share one message memory through the interleaver
// and deinterleaver. Decoding is log-domain belief propagation with the
// flooding schedule, time-multiplexed over p = 64 cycles per pass:
//  * load pass (64 beats): beat t carries the 16 received samples of code
//    bits 64k + t (k = 0..7 information, k = 8..15 parity, i.e. bit
//    512 + 64(k-8) + t). The LLR tables convert them; the LLRs are stored and
//    also go straight into the VNUs (the input switch), which write the
//    initial variable-to-check messages. in_ready is high, a gap in in_valid
//    stalls the pass.
//  * check pass (64 cycles): in cycle t every CNU processes row t of its
//    block row and writes check-to-variable messages back.
//  * variable pass (64 cycles): in cycle t every VNU processes column t of
//    its block column, reading the stored channel LLR.
// One iteration is a check pass plus a variable pass, 2p = 128 cycles. After
// MAX_ITER iterations the last variable pass streams the hard decisions,
// 16 bits per cycle (out_valid, out_bits, out_t, out_last) in the input order;
// the sink is assumed always ready. From the first input beat to the last
// output beat takes 64 + 128 * MAX_ITER cycles, after which a new codeword
// can be loaded. Units, memory, tables and the 2p-cycle iteration follow the
// published architecture; the schedule details, the handshake, the fixed
// iteration count and the quantisation are this design's choices.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int MAX_ITER = 10,
  parameter int IN_W     = 6,
  parameter int LLR_GAIN = 32
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  output logic                           in_ready,
  input  logic [NB+MB-1:0][IN_W-1:0]     in_y,       // received samples
  output logic                           out_valid,
  output logic [NB+MB-1:0]               out_bits,   // hard decisions
  output logic [AW-1:0]                  out_t,
  output logic                           out_last,
  output logic                           busy
);

  localparam int NBANK = NHD + 2 * MB;
  localparam int NCH   = NB + MB;
  localparam int IW    = $clog2(MAX_ITER + 1);

  typedef enum logic [1:0] {LOAD, CHECK, VAR} state_t;
  state_t        state;
  logic [AW-1:0] t;
  logic [IW-1:0] iter;
  logic          act, phase_v, first, final_pass;

  assign in_ready   = (state == LOAD);
  assign first      = (state == LOAD);
  assign phase_v    = (state != CHECK);
  assign act        = (state == LOAD) ? in_valid : 1'b1;
  assign final_pass = (state == VAR) && (iter == IW'(MAX_ITER));
  assign busy       = (state != LOAD) || (t != '0);

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= LOAD;
      t     <= '0;
      iter  <= '0;
    end else if (act) begin
      t <= t + 1'b1;
      if (t == AW'(P - 1)) begin
        case (state)
          LOAD:  begin state <= CHECK; iter <= IW'(1); end
          CHECK: state <= VAR;
          default: begin
            if (iter == IW'(MAX_ITER)) begin
              state <= LOAD;
              iter  <= '0;
            end else begin
              state <= CHECK;
              iter  <= iter + 1'b1;
            end
          end
        endcase
      end
    end
  end

  // ---------------- LLR tables and channel memory ----------------
  msg_t [NCH-1:0] lut_llr, ch_rdata, lch;
  for (genvar k = 0; k < NCH; k++) begin : g_llr
    ldpc_llr_lut #(.IN_W(IN_W), .LLR_GAIN(LLR_GAIN)) u_llr (
      .y   (in_y[k]),
      .llr (lut_llr[k])
    );
  end
  assign lch = first ? lut_llr : ch_rdata;

  // ---------------- memory and interleaver ----------------
  logic [NBANK-1:0][AW-1:0] mem_addr;
  logic [NBANK-1:0]         mem_we;
  msg_t [NBANK-1:0]         mem_wdata, mem_rdata;

  msg_t [NB-1:0][DV_HD-1:0] vnu_hd_in, vnu_hd_raw, vnu_hd_out;
  msg_t [MB-1:0][1:0]       vnu_hp_in, vnu_hp_raw, vnu_hp_out;
  logic [MB-1:0][1:0]       vnu_hp_en;
  msg_t [MB-1:0][DC-1:0]    cnu_in, cnu_raw, cnu_out;
  logic [MB-1:0][DC-1:0]    cnu_en;
  logic [NCH-1:0]           hard;

  ldpc_dec_mem u_mem (
    .clk      (clk),
    .addr     (mem_addr),
    .we       (mem_we),
    .wdata    (mem_wdata),
    .rdata    (mem_rdata),
    .ch_addr  (t),
    .ch_we    (first && in_valid),
    .ch_wdata (lut_llr),
    .ch_rdata (ch_rdata)
  );

  ldpc_dec_interleaver u_il (
    .phase_v    (phase_v),
    .act        (act),
    .t          (t),
    .vnu_hd_out (vnu_hd_out),
    .vnu_hp_out (vnu_hp_out),
    .vnu_hd_in  (vnu_hd_in),
    .vnu_hp_in  (vnu_hp_in),
    .vnu_hp_en  (vnu_hp_en),
    .cnu_out    (cnu_out),
    .cnu_in     (cnu_in),
    .cnu_en     (cnu_en),
    .mem_addr   (mem_addr),
    .mem_we     (mem_we),
    .mem_wdata  (mem_wdata),
    .mem_rdata  (mem_rdata)
  );

  // ---------------- processing units and F tables ----------------
  for (genvar k = 0; k < NB; k++) begin : g_vnu_hd
    ldpc_vnu #(.DEG(DV_HD)) u_vnu (
      .lch   (lch[k]),
      .cv    (vnu_hd_in[k]),
      .en    ('1),
      .first (first),
      .vc    (vnu_hd_raw[k]),
      .hard  (hard[k])
    );
    for (genvar e = 0; e < DV_HD; e++) begin : g_f
      ldpc_f_lut u_f (.din(vnu_hd_raw[k][e]), .dout(vnu_hd_out[k][e]));
    end
  end

  for (genvar k = 0; k < MB; k++) begin : g_vnu_hp
    ldpc_vnu #(.DEG(2)) u_vnu (
      .lch   (lch[NB + k]),
      .cv    (vnu_hp_in[k]),
      .en    (vnu_hp_en[k]),
      .first (first),
      .vc    (vnu_hp_raw[k]),
      .hard  (hard[NB + k])
    );
    for (genvar e = 0; e < 2; e++) begin : g_f
      ldpc_f_lut u_f (.din(vnu_hp_raw[k][e]), .dout(vnu_hp_out[k][e]));
    end
  end

  for (genvar k = 0; k < MB; k++) begin : g_cnu
    ldpc_cnu #(.DEG(DC)) u_cnu (
      .q  (cnu_in[k]),
      .en (cnu_en[k]),
      .r  (cnu_raw[k])
    );
    for (genvar e = 0; e < DC; e++) begin : g_f
      ldpc_f_lut u_f (.din(cnu_raw[k][e]), .dout(cnu_out[k][e]));
    end
  end

  // ---------------- output ----------------
  assign out_valid = final_pass;
  assign out_bits  = hard;
  assign out_t     = t;
  assign out_last  = final_pass && (t == AW'(P - 1));

endmodule
