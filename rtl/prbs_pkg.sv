// prbs_pkg: the PRBS-31 sequence (polynomial x^31 + x^28 + 1) advanced two
// bits at a time, as needed by links that carry two bits per 160 MHz clock
// cycle (320 Mb/s on DDR outputs). Shared by the generator in the octant
// serializer and the checker in the error rate test receiver, so that both
// ends agree on the sequence.
//
// State convention: s[0] is the newest bit, s[30] the oldest. The next bit of
// the sequence is s[30] ^ s[27]. In a bit pair, [1] is sent first.
package prbs_pkg;

  localparam int PRBS_W = 31;
  localparam logic [PRBS_W-1:0] PRBS_SEED = '1;

  function automatic logic [1:0] prbs31_next2(input logic [PRBS_W-1:0] s);
    logic b1, b0;
    b1 = s[30] ^ s[27];
    b0 = s[29] ^ s[26];
    return {b1, b0};
  endfunction

  function automatic logic [PRBS_W-1:0] prbs31_shift2(input logic [PRBS_W-1:0] s,
                                                      input logic [1:0] bits);
    return {s[PRBS_W-3:0], bits[1], bits[0]};
  endfunction

endpackage
