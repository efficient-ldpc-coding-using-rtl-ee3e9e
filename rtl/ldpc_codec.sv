// ldpc_codec: the hybrid H-matrix LDPC encoder and decoder side by side.
//
// The encoder and the decoder are the two ends of one link using the same
// (1024,512) rate-1/2 code, H = [Hd, Hp] with Hd the 8 x 8 base matrix
// expanded by 64 and Hp the dual-diagonal matrix. They share the clock and
// reset but no data: the encoder's codeword leaves through enc_* and a
// received word enters the decoder through dec_*. See ldpc_encoder and
// ldpc_decoder for interfaces and timing.
module ldpc_codec
  import ldpc_pkg::*;
#(
  parameter int MAX_ITER = 10,
  parameter int IN_W     = 6,
  parameter int LLR_GAIN = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // encoder
  input  logic                       enc_in_valid,
  output logic                       enc_in_ready,
  input  logic                       enc_in_bit,
  output logic                       enc_d_valid,
  output logic                       enc_d_bit,
  output logic                       enc_p_valid,
  output logic                       enc_p_bit,
  output logic                       enc_p_last,
  // decoder
  input  logic                       dec_in_valid,
  output logic                       dec_in_ready,
  input  logic [NB+MB-1:0][IN_W-1:0] dec_in_y,
  output logic                       dec_out_valid,
  output logic [NB+MB-1:0]           dec_out_bits,
  output logic [AW-1:0]              dec_out_t,
  output logic                       dec_out_last,
  output logic                       dec_busy
);

  ldpc_encoder u_enc (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (enc_in_valid),
    .in_ready (enc_in_ready),
    .in_bit   (enc_in_bit),
    .d_valid  (enc_d_valid),
    .d_bit    (enc_d_bit),
    .p_valid  (enc_p_valid),
    .p_bit    (enc_p_bit),
    .p_last   (enc_p_last)
  );

  ldpc_decoder #(
    .MAX_ITER (MAX_ITER),
    .IN_W     (IN_W),
    .LLR_GAIN (LLR_GAIN)
  ) u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (dec_in_valid),
    .in_ready  (dec_in_ready),
    .in_y      (dec_in_y),
    .out_valid (dec_out_valid),
    .out_bits  (dec_out_bits),
    .out_t     (dec_out_t),
    .out_last  (dec_out_last),
    .busy      (dec_busy)
  );

endmodule
