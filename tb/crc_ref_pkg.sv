// crc_ref_pkg: reference model for the CRC testbenches.
//
// crc_aug() is plain long division over GF(2): the message followed by w zero bits
// is shifted through a w-bit remainder, subtracting (XORing) the generator whenever
// a one leaves the top. It returns Remainder(M(x)*x^w / G(x)). crc_rem() divides the
// message itself (no zeros appended), as the receiver does with a whole frame.
// Bits are given MSB (highest power of x) first.
package crc_ref_pkg;

  typedef bit bitq_t[$];

  function automatic logic [31:0] crc_rem(input bitq_t msg, input int w, input logic [31:0] poly);
    logic [31:0] r = '0;
    logic [31:0] mask = (w == 32) ? 32'hFFFF_FFFF : ((32'd1 << w) - 1);
    bit top;
    foreach (msg[i]) begin
      top = r[w-1];
      r   = ((r << 1) | 32'(msg[i])) & mask;
      if (top) r = r ^ (poly & mask);
    end
    return r;
  endfunction

  function automatic logic [31:0] crc_aug(input bitq_t msg, input int w, input logic [31:0] poly);
    bitq_t m = msg;
    for (int i = 0; i < w; i++) m.push_back(1'b0);
    return crc_rem(m, w, poly);
  endfunction

  function automatic bitq_t bytes_to_bits(input byte unsigned b[$]);
    bitq_t q;
    foreach (b[i])
      for (int k = 7; k >= 0; k--) q.push_back(b[i][k]);
    return q;
  endfunction

  function automatic bitq_t rand_bits(input int n);
    bitq_t q;
    for (int i = 0; i < n; i++) q.push_back(1'($urandom));
    return q;
  endfunction

  // Message followed by its w-bit CRC, MSB first.
  function automatic bitq_t with_crc(input bitq_t msg, input int w, input logic [31:0] poly);
    bitq_t q = msg;
    logic [31:0] c = crc_aug(msg, w, poly);
    for (int k = w - 1; k >= 0; k--) q.push_back(c[k]);
    return q;
  endfunction

endpackage
