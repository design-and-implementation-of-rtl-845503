// Shared constants of the partially interleaved modular Karatsuba-Ofman
// (PIKOM) multiplier and the RSA engine built on it.
//   WORD_W      width of the carry lookahead adder that every wide addition
//               reuses word by word (32 bits, as in the document's ASIC design).
//   DEFAULT_K   operand and modulus width of the full design (1024-bit RSA).
package pikom_pkg;
  localparam int unsigned WORD_W    = 32;
  localparam int unsigned DEFAULT_K = 1024;
endpackage
