// crc8_ref: reference CRC-8 (polynomial x^8 + x^2 + x + 1, initial value 0) for the
// testbenches, computed byte-free with an explicit bit-by-bit polynomial division of
// the header bits (all but the CRC field, most significant first) followed by eight
// zero bits.
package crc8_ref;
  import edf_pkg::*;

  function automatic logic [7:0] ref_crc(hdr_t h);
    logic [HDRW-1:0] msg;   // header bits above the CRC field, then 8 zero bits
    msg = {h[HDRW-1:8], 8'h00};
    // long division by 1_0000_0111
    for (int i = HDRW - 1; i >= 8; i--)
      if (msg[i]) msg[i-:9] = msg[i-:9] ^ 9'h107;
    return msg[7:0];
  endfunction
endpackage
