// anu2_top: ANU-II encryption and decryption units side by side.
//
// Both units are iterative 64-bit / 128-bit-key ANU-II engines that take 13
// clocks per block (two rounds per clock). They share clock and reset but
// have separate enables and data ports. The encryption unit's key register
// is brought out as enc_key_last: once enc_ready is high it holds the key
// after the 25th key update, which is exactly the key the decryption unit
// expects on dec_key. The two are not wired together inside so that a
// stored ciphertext/key pair can be decrypted independently.
// Each unit: hold its ctr high, pulse rst, and the result appears with the
// unit's ready flag 14 enabled clocks after rst falls (1 load + 13 rounds).
module anu2_top
  import anu2_pkg::*;
#(
  parameter int unsigned ROUNDS = NROUNDS,
  parameter int unsigned UNROLL = 2
) (
  input  logic  clk,
  input  logic  rst,
  // encryption unit
  input  logic  enc_ctr,
  input  key_t  enc_key,
  input  half_t enc_p_msb,
  input  half_t enc_p_lsb,
  output half_t enc_c_msb,
  output half_t enc_c_lsb,
  output logic  enc_ready,
  output key_t  enc_key_last,
  // decryption unit
  input  logic  dec_ctr,
  input  key_t  dec_key,
  input  half_t dec_c_msb,
  input  half_t dec_c_lsb,
  output half_t dec_p_msb,
  output half_t dec_p_lsb,
  output logic  dec_ready
);

  anu2_encrypt #(.ROUNDS(ROUNDS), .UNROLL(UNROLL)) u_enc (
    .clk, .rst, .ctr(enc_ctr), .KEY(enc_key),
    .P_MSBi(enc_p_msb), .P_LSBi(enc_p_lsb),
    .C_MSBi(enc_c_msb), .C_LSBi(enc_c_lsb),
    .ANU_Ready(enc_ready), .key_last(enc_key_last)
  );

  anu2_decrypt #(.ROUNDS(ROUNDS), .UNROLL(UNROLL)) u_dec (
    .clk, .rst, .ctr(dec_ctr), .KEY(dec_key),
    .C_MSBi(dec_c_msb), .C_LSBi(dec_c_lsb),
    .P_MSBi(dec_p_msb), .P_LSBi(dec_p_lsb),
    .ANU_Ready(dec_ready)
  );

endmodule
