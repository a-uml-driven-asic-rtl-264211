// mac_ref_pkg: frame builder for the MAC testbenches. It produces the full
// byte sequence on the line (preamble, delimiter, header with length, payload,
// FCS). The FCS is computed bit by bit in the order the bits are sent, with
// the IEEE 802.3 generator polynomial, independently of the RTL's byte-wise
// routine.
package mac_ref_pkg;
  function automatic logic [31:0] fcs_of(input byte unsigned b[$]);
    logic [31:0] r;
    r = 32'hFFFF_FFFF;
    foreach (b[i])
      for (int k = 0; k < 8; k++) begin
        logic fb;
        fb = r[31] ^ b[i][k];
        r = {r[30:0], 1'b0};
        if (fb) r ^= 32'h04C1_1DB7;
      end
    // transmitted FCS: complement, bit-reversed so that bit 31 goes first
    r = ~r;
    return {<<{r}};
  endfunction

  // header (14 bytes, length in bytes 12-13) + payload
  function automatic void make_body(input int len, ref byte unsigned body[$]);
    body.delete();
    for (int i = 0; i < 12; i++) body.push_back(8'($urandom));
    body.push_back(8'(len >> 8));
    body.push_back(8'(len));
    for (int i = 0; i < len; i++) body.push_back(8'($urandom));
  endfunction

  function automatic void make_line(input byte unsigned body[$], ref byte unsigned line[$]);
    logic [31:0] f;
    line.delete();
    for (int i = 0; i < 7; i++) line.push_back(8'h55);
    line.push_back(8'hD5);
    foreach (body[i]) line.push_back(body[i]);
    f = fcs_of(body);
    for (int i = 0; i < 4; i++) line.push_back(f[8*i +: 8]);
  endfunction
endpackage
