// ldpc_encoder: systematic encoder for the (1024,512) hybrid H-matrix code.
//
// An input buffer, the Hd interleaver and the parity bit generator in a
// chain. Information bits enter one per cycle (in_valid/in_ready) and leave
// at once, unchanged, as the systematic part d of the codeword c = (d, p).
// After the 512th bit the encoder stops accepting input and spends 512
// cycles on the parity rows, one per cycle: the interleaver reads the three
// information bits of row i from the buffer and the generator adds their XOR
// to p_(i-1). Parity bit p_i appears on p_bit with p_valid one cycle after
// row i is computed; p_last marks p_511. Loading of the next codeword can
// begin in the cycle after the last parity row, so a codeword takes 1024
// cycles, one code bit per cycle. The sink of d and p is assumed always ready.
// The block structure follows the published encoder; the handshake and the
// timing are this design's choices.
module ldpc_encoder
  import ldpc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,
  output logic d_valid,   // systematic output, same cycle as the input
  output logic d_bit,
  output logic p_valid,   // parity output
  output logic p_bit,
  output logic p_last
);

  typedef enum logic {LOAD, PARITY} state_t;
  state_t state;
  logic [$clog2(K)-1:0] cnt;

  logic [NB-1:0][AW-1:0] raddr;
  logic [NB-1:0]         rbit;
  logic                  hd_sum;
  logic                  gen_en;

  assign in_ready = (state == LOAD);
  assign d_valid  = in_valid && in_ready;
  assign d_bit    = in_bit;
  assign gen_en   = (state == PARITY);

  ldpc_enc_input_buffer u_buf (
    .clk   (clk),
    .we    (d_valid),
    .waddr (cnt),
    .wbit  (in_bit),
    .raddr (raddr),
    .rbit  (rbit)
  );

  ldpc_enc_interleaver u_il (
    .row    (cnt),
    .raddr  (raddr),
    .rbit   (rbit),
    .hd_sum (hd_sum)
  );

  ldpc_parity_gen u_pg (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (gen_en),
    .first  (cnt == '0),
    .hd_sum (hd_sum),
    .p      (p_bit)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= LOAD;
      cnt     <= '0;
      p_valid <= 1'b0;
      p_last  <= 1'b0;
    end else begin
      p_valid <= gen_en;
      p_last  <= gen_en && (cnt == '1);
      if (state == LOAD) begin
        if (in_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == '1) state <= PARITY;
        end
      end else begin
        cnt <= cnt + 1'b1;
        if (cnt == '1) state <= LOAD;
      end
    end
  end

endmodule
