// Shared types and constants of the flexible-key RSA engine.
//
// The engine supports one of six key sizes at run time, from 32 to 1024 bits
// in powers of two, selected by a 3-bit code. Every message block that flows
// through the engine carries its own key-size code next to its data, so blocks
// of different sizes can be in flight at the same time. Data words are always
// MAX_BITS wide and right-aligned: bit 0 is the least significant bit of the
// block, and bits at or above the block's size are zero.
//
// The largest key size (1024 bits) is the one the design targets; the set of
// intermediate sizes and the encoding of the code are this design's choice.
package rsa_pkg;

  // Widest key the engine handles, in bits.
  localparam int unsigned MAX_BITS = 1024;

  // Key-size code carried with each block (and on the SIZE inputs).
  typedef enum logic [2:0] {
    KEY_32   = 3'd0,
    KEY_64   = 3'd1,
    KEY_128  = 3'd2,
    KEY_256  = 3'd3,
    KEY_512  = 3'd4,
    KEY_1024 = 3'd5
  } key_size_e;

  // Number of bits of a key-size code. Codes 6 and 7 are treated as 1024.
  function automatic int unsigned key_bits(input key_size_e size);
    case (size)
      KEY_32:  return 32;
      KEY_64:  return 64;
      KEY_128: return 128;
      KEY_256: return 256;
      KEY_512: return 512;
      default: return 1024;
    endcase
  endfunction

endpackage
