// tb_pkg - reference models used by the testbenches: CRC-32 (IEEE 802.3 /
// 802.11 FCS and WEP ICV, computed bit by bit from the polynomial) and RC4
// (key schedule and keystream), written independently of the RTL.
package tb_pkg;

  typedef byte unsigned bytes_t[$];

  // Standard CRC-32: preset all ones, LSB-first, final complement.
  function automatic logic [31:0] crc32_ref(input bytes_t data);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (data[n])
      for (int b = 0; b < 8; b++) begin
        logic fb = c[0] ^ data[n][b];
        c = c >> 1;
        if (fb) c = c ^ 32'hEDB8_8320;
      end
    return ~c;
  endfunction

  // RC4 keystream of n bytes for the given key.
  function automatic bytes_t rc4_ref(input bytes_t key, input int n);
    byte unsigned s[256];
    byte unsigned t;
    int i, j;
    bytes_t out;
    for (i = 0; i < 256; i++) s[i] = i[7:0];
    j = 0;
    for (i = 0; i < 256; i++) begin
      j = (j + int'(s[i]) + int'(key[i % key.size()])) % 256;
      t = s[i]; s[i] = s[j]; s[j] = t;
    end
    i = 0; j = 0;
    repeat (n) begin
      i = (i + 1) % 256;
      j = (j + int'(s[i])) % 256;
      t = s[i]; s[i] = s[j]; s[j] = t;
      out.push_back(s[(s[i] + s[j]) % 256]);
    end
    return out;
  endfunction

endpackage
