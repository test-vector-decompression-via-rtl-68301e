// Testbench helpers: a software encoder for the modified 3-bit run-length
// code, written independently of the RTL decoder, and a literal packer.
// A bit stream is a queue of bits, first bit first.
package tb_csd_pkg;

  typedef bit bitq_t[$];
  typedef logic [2:0] cwq_t[$];

  // Encode with 000->10 001->11 010->01 011->001 100->0001 101->00001
  // 110->000001 111->000000. A tail that ends inside a codeword is padded
  // with zeros; those extra decoded bits follow the stream.
  function automatic cwq_t encode_mod3(bitq_t s);
    cwq_t out;
    int p = 0;
    int n = s.size();
    while (p < n) begin
      if (s[p]) begin
        bit nxt = (p + 1 < n) ? s[p + 1] : 1'b0;
        out.push_back(nxt ? 3'b001 : 3'b000);
        p += 2;
      end else begin
        int z = 0;
        while (z < 6 && p + z < n && !s[p + z]) z++;
        if (z == 6 || p + z >= n) begin
          out.push_back(3'b111);
          p += 6;
        end else begin
          // z zeros (1..5) then a 1
          out.push_back(3'(z + 1));
          p += z + 1;
        end
      end
    end
    return out;
  endfunction

  // Encode with a K-bit counting code: codeword v < 2^K-1 is v zeros then a
  // 1, the all-ones codeword is 2^K-1 zeros. Zero padded at the end.
  function automatic cwq_t encode_count(bitq_t s, int K);
    cwq_t out;
    int zmax = (1 << K) - 1;
    int p = 0;
    int n = s.size();
    while (p < n) begin
      int z = 0;
      while (z < zmax && p + z < n && !s[p + z]) z++;
      if (z == zmax || p + z >= n) begin
        out.push_back(3'(zmax));
        p += zmax;
      end else begin
        out.push_back(3'(z));
        p += z + 1;
      end
    end
    return out;
  endfunction

  // Compressed up to bit `split`, literal after it (compression turned off
  // for the rest of the stream). Codewords may run past `split`; the literal
  // part starts wherever the last codeword ended. lits[i] flags codeword i.
  function automatic cwq_t encode_mixed(bitq_t s, int split, output bitq_t lits);
    cwq_t out;
    int p = 0;
    int n = s.size();
    lits.delete();
    while (p < split && p < n) begin
      if (s[p]) begin
        bit nxt = (p + 1 < n) ? s[p + 1] : 1'b0;
        out.push_back(nxt ? 3'b001 : 3'b000);
        p += 2;
      end else begin
        int z = 0;
        while (z < 6 && p + z < n && !s[p + z]) z++;
        if (z == 6 || p + z >= n) begin
          out.push_back(3'b111);
          p += 6;
        end else begin
          out.push_back(3'(z + 1));
          p += z + 1;
        end
      end
      lits.push_back(1'b0);
    end
    for (; p < n; p += 3) begin
      logic [2:0] cw;
      for (int i = 0; i < 3; i++) cw[2 - i] = (p + i < n) ? s[p + i] : 1'b0;
      out.push_back(cw);
      lits.push_back(1'b1);
    end
    return out;
  endfunction

  // Literal mode: groups of three bits, first bit as MSB, zero padded.
  function automatic cwq_t pack_literal(bitq_t s);
    cwq_t out;
    for (int p = 0; p < s.size(); p += 3) begin
      logic [2:0] cw;
      for (int i = 0; i < 3; i++) cw[2 - i] = (p + i < s.size()) ? s[p + i] : 1'b0;
      out.push_back(cw);
    end
    return out;
  endfunction

  // Decoded length of a modified-code codeword (for schedule checks).
  function automatic int mod3_run(logic [2:0] cw);
    int t[8] = '{2, 2, 2, 3, 4, 5, 6, 6};
    return t[cw];
  endfunction

endpackage
