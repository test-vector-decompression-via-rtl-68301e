// Shared types and code tables for cyclical-scan-chain test vector decompression.
//
// Three run-length codes are supported. Each maps a fixed-width codeword to a
// variable-length run of difference-vector bits, emitted first bit first:
//
//   CODE_COUNT3  3-bit variable-to-block code. Codeword v < 7 stands for v
//                zeros followed by a 1; 111 stands for seven zeros with no 1.
//   CODE_MOD3    modified 3-bit code, the main one of this design:
//                000->10 001->11 010->01 011->001 100->0001 101->00001
//                110->000001 111->000000. Every codeword decodes to 2..6 bits,
//                which is what lets one tester channel feed two decoders.
//   CODE_COUNT2  2-bit code of the same form as CODE_COUNT3:
//                00->1 01->01 10->001 11->000.
//
// The tables above are those of the published scheme; the package itself
// (names, enum encoding, helper functions) is this design's own.
package csd_pkg;

  typedef enum logic [1:0] {
    CODE_COUNT3 = 2'd0,
    CODE_MOD3   = 2'd1,
    CODE_COUNT2 = 2'd2
  } rl_code_e;

  // Codeword width of a code.
  function automatic int unsigned code_bits(rl_code_e c);
    return (c == CODE_COUNT2) ? 2 : 3;
  endfunction

  // Longest run one codeword decodes to, in bits (= decode cycles).
  function automatic int unsigned max_run(rl_code_e c);
    case (c)
      CODE_COUNT3: return 7;
      CODE_MOD3:   return 6;
      default:     return 3;
    endcase
  endfunction

  // Width of the left-aligned pattern register of the modified code.
  localparam int unsigned MOD3_PW = 6;

  // Number of bits a modified-code codeword decodes to.
  function automatic logic [2:0] mod3_len(logic [2:0] cw);
    case (cw)
      3'b000, 3'b001, 3'b010: return 3'd2;
      3'b011:                 return 3'd3;
      3'b100:                 return 3'd4;
      3'b101:                 return 3'd5;
      default:                return 3'd6;
    endcase
  endfunction

  // Decoded bits of a modified-code codeword, left aligned (bit 5 first).
  function automatic logic [MOD3_PW-1:0] mod3_pattern(logic [2:0] cw);
    case (cw)
      3'b000:  return 6'b10_0000;
      3'b001:  return 6'b11_0000;
      3'b010:  return 6'b01_0000;
      3'b011:  return 6'b001_000;
      3'b100:  return 6'b0001_00;
      3'b101:  return 6'b00001_0;
      3'b110:  return 6'b000001;
      default: return 6'b000000;
    endcase
  endfunction

endpackage
