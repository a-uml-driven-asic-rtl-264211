// mac_pkg: constants and the CRC-32 step shared by the MAC transmit and
// receive paths. Frames on the serial line are: seven preamble bytes 0x55,
// the start-of-frame delimiter 0xD5, a 14-byte header whose bytes 12 and 13
// hold the payload length (most significant byte first), the payload, and
// the 4-byte frame check sequence, every byte least significant bit first.
// The FCS is the IEEE 802.3 CRC-32 (reflected polynomial 0xEDB88320, preset
// to all ones, complemented, low byte sent first) over header and payload.
package mac_pkg;
  // line constants, as functions so that each user takes only what it needs
  function automatic logic [7:0] preamble_byte();
    return 8'h55;
  endfunction

  function automatic logic [7:0] sfd_byte();
    return 8'hD5;
  endfunction

  // number of preamble bytes before the delimiter
  function automatic int pre_bytes();
    return 7;
  endfunction

  // largest payload length accepted by the receiver
  function automatic int max_len();
    return 1500;
  endfunction

  function automatic logic [31:0] crc_init();
    return 32'hFFFF_FFFF;
  endfunction

  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] d);
    logic [31:0] c;
    c = crc ^ {24'd0, d};
    for (int i = 0; i < 8; i++) c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    return c;
  endfunction
endpackage
