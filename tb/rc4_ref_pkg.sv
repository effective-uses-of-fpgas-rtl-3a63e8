// rc4_ref_pkg: software reference model of RC4 for the testbenches.
//
// keystream() runs the textbook RC4 key schedule on a 40-bit key (key byte
// K[0] is bits 39:32, K[4] is bits 7:0) followed by the keystream generator
// and returns the first five output bytes. It shares no code with the RTL.
package rc4_ref_pkg;

  typedef logic [7:0] ks5_t [5];

  function automatic ks5_t keystream(input logic [39:0] key);
    logic [7:0] s [256];
    logic [7:0] k [5];
    logic [7:0] j, i, tmp;
    ks5_t       out;
    for (int b = 0; b < 5; b++) k[b] = key[39 - 8*b -: 8];
    for (int n = 0; n < 256; n++) s[n] = 8'(n);
    j = 0;
    for (int n = 0; n < 256; n++) begin
      j      = j + s[n] + k[n % 5];
      tmp    = s[n];
      s[n]   = s[j];
      s[j]   = tmp;
    end
    i = 0;
    j = 0;
    for (int b = 0; b < 5; b++) begin
      i      = i + 8'd1;
      j      = j + s[i];
      tmp    = s[i];
      s[i]   = s[j];
      s[j]   = tmp;
      out[b] = s[8'(s[i] + s[j])];
    end
    return out;
  endfunction

endpackage
