// tls_pkg: command encodings and key-store slot numbers shared by the
// accelerator's controller, key memory and top level.
//
// A command is 6 bits: mode in [3:0] and, for MODE_MODEXP, the operation in
// [5:4]. The nine modes follow the document's count of nine operating modes
// (four storing modes, key exchange, and CBC-AES with CMAC or SHA, each for
// encryption and decryption); their numbering and the split of the modular
// exponentiation into three operations are this design's choices.
package tls_pkg;

  typedef enum logic [3:0] {
    MODE_STORE_PRIV   = 4'd0,  // private exponent (DHE secret / RSA d)
    MODE_STORE_PUB    = 4'd1,  // public exponent e, then modulus N
    MODE_STORE_PUBVAL = 4'd2,  // public value (DHE base g or peer's value, RSA ciphertext)
    MODE_STORE_SECRET = 4'd3,  // shared secret key
    MODE_MODEXP       = 4'd4,  // DHE / RSA modular exponentiation
    MODE_ENC_CMAC     = 4'd5,  // CBC-AES encryption of message || CMAC
    MODE_DEC_CMAC     = 4'd6,  // CBC-AES decryption and CMAC check
    MODE_ENC_SHA      = 4'd7,  // CBC-AES encryption of message || SHA-3 digest
    MODE_DEC_SHA      = 4'd8   // CBC-AES decryption and SHA-3 check
  } mode_e;

  typedef enum logic [1:0] {
    OP_DHE        = 2'd0,  // SECRET := PUBVAL^PRIV mod N, also sent out
    OP_RSA_ENC    = 2'd1,  // out := SECRET^E mod N
    OP_RSA_VERIFY = 2'd2   // out := PUBVAL^PRIV mod N, auth_ok := (out == SECRET)
  } modexp_op_e;

  typedef enum logic [2:0] {
    SLOT_PRIV   = 3'd0,
    SLOT_PUB_E  = 3'd1,
    SLOT_MOD    = 3'd2,
    SLOT_PUBVAL = 3'd3,
    SLOT_SECRET = 3'd4
  } slot_e;

  localparam int unsigned NSLOTS = 5;

endpackage
