// jpeg_pkg: the run-length symbol shared by the JPEG run-length stages.
// A symbol is (rlen, size, amp): rlen zero coefficients precede a coefficient
// whose magnitude needs size bits; amp carries the coefficient in the JPEG
// convention (value itself if positive, value - 1 if negative, so that the
// low size bits are the code). (15,0) stands for sixteen zeros and (0,0) in
// an AC position is end of block.
package jpeg_pkg;
  typedef struct packed {
    logic [3:0]  rlen;
    logic [3:0]  size;
    logic [11:0] amp;
  } rle_sym_t;

  // the two special symbols, as functions so that users import only what
  // they need
  function automatic rle_sym_t sym_zrl();
    return '{rlen: 4'd15, size: 4'd0, amp: 12'd0};
  endfunction

  function automatic rle_sym_t sym_eob();
    return '{rlen: 4'd0, size: 4'd0, amp: 12'd0};
  endfunction

  // number of bits needed for |v|
  function automatic logic [3:0] size_of(input logic signed [11:0] v);
    logic [11:0] m;
    logic [3:0]  s;
    m = v[11] ? 12'(-v) : 12'(v);
    s = 4'd0;
    for (int i = 0; i < 12; i++) if (m[i]) s = 4'(i + 1);
    return s;
  endfunction

  function automatic logic [11:0] amp_of(input logic signed [11:0] v);
    return v[11] ? 12'(v - 12'sd1) : 12'(v);
  endfunction
endpackage
