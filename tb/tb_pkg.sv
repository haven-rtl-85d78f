// tb_pkg -- reference models and helpers shared by the testbenches.
//
// lookup2_ref computes Bob Jenkins' Lookup2 hash of a byte string the way the
// original C code does (whole 12-byte blocks in a loop, then a tail switch on the
// remaining length), independent of the streaming hardware.
package tb_pkg;

  function automatic logic [31:0] lookup2_ref(input logic [7:0] k [], input int len,
                                              input logic [31:0] initval);
    logic [31:0] a, b, c;
    int p, n;
    a = 32'h9e3779b9; b = 32'h9e3779b9; c = initval;
    p = 0; n = len;
    while (n >= 12) begin
      a += {k[p+3], k[p+2], k[p+1], k[p]};
      b += {k[p+7], k[p+6], k[p+5], k[p+4]};
      c += {k[p+11], k[p+10], k[p+9], k[p+8]};
      mix(a, b, c);
      p += 12; n -= 12;
    end
    c += len;
    if (n >= 11) c += {k[p+10], 24'h0};
    if (n >= 10) c += {8'h0, k[p+9], 16'h0};
    if (n >= 9)  c += {16'h0, k[p+8], 8'h0};
    if (n >= 8)  b += {k[p+7], 24'h0};
    if (n >= 7)  b += {8'h0, k[p+6], 16'h0};
    if (n >= 6)  b += {16'h0, k[p+5], 8'h0};
    if (n >= 5)  b += {24'h0, k[p+4]};
    if (n >= 4)  a += {k[p+3], 24'h0};
    if (n >= 3)  a += {8'h0, k[p+2], 16'h0};
    if (n >= 2)  a += {16'h0, k[p+1], 8'h0};
    if (n >= 1)  a += {24'h0, k[p]};
    mix(a, b, c);
    return c;
  endfunction

  function automatic void mix(inout logic [31:0] a, inout logic [31:0] b, inout logic [31:0] c);
    a -= b; a -= c; a ^= (c >> 13);
    b -= c; b -= a; b ^= (a << 8);
    c -= a; c -= b; c ^= (b >> 13);
    a -= b; a -= c; a ^= (c >> 12);
    b -= c; b -= a; b ^= (a << 16);
    c -= a; c -= b; c ^= (b >> 5);
    a -= b; a -= c; a ^= (c >> 3);
    b -= c; b -= a; b ^= (a << 10);
    c -= a; c -= b; c ^= (b >> 15);
  endfunction

endpackage
