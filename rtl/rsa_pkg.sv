// rsa_pkg: widths shared by the RSA engine.
//
// The engine works on 8-bit operands, the width of its inexact multiplier: messages, ciphertexts,
// the modulus used by encryption and decryption, and the exponents are all 8 bits, and a product
// of two operands is 16 bits. The key generator keeps n, phi, e and d at 16 bits so that a modulus
// too wide for the 8-bit datapath can be seen and rejected. The 8-bit multiplier and these signal
// widths follow the design description.
package rsa_pkg;
  localparam int unsigned DATA_W = 8;           // operand width of the multiplier and datapath
  localparam int unsigned PROD_W = 2 * DATA_W;  // product width
  localparam int unsigned KEY_W  = 16;          // width of n, phi, e and d in key generation

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [PROD_W-1:0] prod_t;
  typedef logic [KEY_W-1:0]  key_t;
endpackage
