// gcm_tag: message authentication code of one 32-byte block (GCM).
//
// For a block with ciphertext halves C1 (data[127:0]) and C2 (data[255:128]),
// its address A and the MAC pad E = AES_K(0..00 || cnt), the tag is
//   X1 = H*A,  X2 = H*(X1^C1),  X3 = H*(X2^C2),  MAC = X3 ^ E
// with * the GF(2^128) product and H = AES_K(0^128) the hash key. This is the
// GCM dataflow drawn in the design's description. Each multiply and each XOR
// takes one register stage, giving the six-cycle authentication delay of the
// design; the XORs that form C1/C2 from the plaintext happen upstream in
// parallel with the first multiply and are not counted here. The address is
// zero-extended into the low bits of the 128-bit GHASH input (own choice; the
// address-to-block packing is not specified).
//
// Interface: in_valid with addr/c1/c2/mac_pad; out_valid/tag exactly
// LATENCY = 6 cycles later. Fully pipelined, one block per cycle.
module gcm_tag
  import i2sems_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  aes_blk_t h,
  input  logic     in_valid,
  input  addr_t    addr,
  input  aes_blk_t c1,
  input  aes_blk_t c2,
  input  aes_blk_t mac_pad,
  output logic     out_valid,
  output aes_blk_t tag
);

  localparam int unsigned LATENCY = 6;

  logic [LATENCY-1:0] v;
  aes_blk_t x [LATENCY];       // running GHASH value after each stage
  aes_blk_t k1 [1];            // C1 carried to stage 2
  aes_blk_t k2 [3];            // C2 carried to stage 4
  aes_blk_t ke [5];            // MAC pad carried to stage 6
  aes_blk_t m0, m1, m2;

  gf128_mul u_m0 (.a(h), .b(aes_blk_t'(addr)), .p(m0));
  gf128_mul u_m1 (.a(h), .b(x[1]),             .p(m1));
  gf128_mul u_m2 (.a(h), .b(x[3]),             .p(m2));

  always_ff @(posedge clk) begin
    if (!rst_n) v <= '0;
    else        v <= {v[LATENCY-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    x[0] <= m0;               // X1 = H*A
    x[1] <= x[0] ^ k1[0];     // X1 ^ C1
    x[2] <= m1;               // X2
    x[3] <= x[2] ^ k2[2];     // X2 ^ C2
    x[4] <= m2;               // X3
    x[5] <= x[4] ^ ke[4];     // MAC
    k1[0] <= c1;
    k2[0] <= c2;
    for (int i = 1; i < 3; i++) k2[i] <= k2[i-1];
    ke[0] <= mac_pad;
    for (int i = 1; i < 5; i++) ke[i] <= ke[i-1];
  end

  assign out_valid = v[LATENCY-1];
  assign tag       = x[LATENCY-1];

endmodule
