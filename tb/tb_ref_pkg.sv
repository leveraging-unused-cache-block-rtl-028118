// tb_ref_pkg: reference model of the flit encoding used by the testbenches.
//
// It works on bytes, the way the flit format is drawn (byte 0 = flit type,
// bytes 1..16 = payload), independently of the packed structs of the RTL:
//   head/atomic: 1 src, 2 dst, 3 event, 4..7 address (MSB first),
//                8..9 used-vector, 10..16 spare
//   body/tail:   bytes 1+4k .. 4+4k hold word 4g+k (MSB first)
// Used-vector bit 15-i describes word i.
package tb_ref_pkg;
  import noc_pkg::*;

  typedef logic [7:0] bytes_t [17];

  function automatic flit_t pack_bytes(bytes_t b);
    flit_t f;
    for (int k = 0; k < 17; k++) f[8*(16-k) +: 8] = b[k];
    return f;
  endfunction

  function automatic bytes_t unpack_bytes(flit_t f);
    bytes_t b;
    for (int k = 0; k < 17; k++) b[k] = f[8*(16-k) +: 8];
    return b;
  endfunction

  function automatic logic [31:0] line_word(line_t d, int i);
    return d[32*i +: 32];
  endfunction

  // Flits the scheme should produce for packet c. prev holds the bytes of
  // the previous flit on the link and is updated.
  function automatic void ref_encode(pkt_cmd_t c, scheme_e s, ref bytes_t prev,
                                     ref flit_t q[$]);
    bit fd, wr, has_line;
    bit send [4];
    int last, nsend;
    bytes_t b;
    fd = (s == SCHEME_FD) || (s == SCHEME_FDWR);
    wr = (s == SCHEME_WR) || (s == SCHEME_FDWR);
    has_line = (c.ev == EV_READ_RESP) || (c.ev == EV_WRITE_REQ);
    nsend = 0; last = -1;
    for (int g = 0; g < 4; g++) begin
      bit any;
      any = 0;
      for (int k = 0; k < 4; k++) any |= c.used[15 - (4*g + k)];
      send[g] = has_line && (!fd || any);
      if (send[g]) begin nsend++; last = g; end
    end
    b[0] = (nsend == 0) ? 8'h04 : 8'h01;
    b[1] = c.src; b[2] = c.dst; b[3] = c.ev;
    b[4] = c.addr[31:24]; b[5] = c.addr[23:16]; b[6] = c.addr[15:8]; b[7] = c.addr[7:0];
    b[8] = c.used[15:8]; b[9] = c.used[7:0];
    for (int k = 10; k < 17; k++) b[k] = wr ? prev[k] : 8'h00;
    q.push_back(pack_bytes(b));
    prev = b;
    for (int g = 0; g < 4; g++) begin
      if (!send[g]) continue;
      b[0] = (g == last) ? 8'h03 : 8'h02;
      for (int k = 0; k < 4; k++) begin
        logic [31:0] w;
        int i;
        i = 4*g + k;
        w = (wr && !c.used[15 - i]) ? {prev[1+4*k], prev[2+4*k], prev[3+4*k], prev[4+4*k]}
                                    : line_word(c.data, i);
        b[1+4*k] = w[31:24]; b[2+4*k] = w[23:16]; b[3+4*k] = w[15:8]; b[4+4*k] = w[7:0];
      end
      q.push_back(pack_bytes(b));
      prev = b;
    end
  endfunction

  // Words a receiver may trust for packet c under scheme s.
  function automatic wvec_t ref_valid(pkt_cmd_t c, scheme_e s);
    wvec_t v;
    bit fd, wr;
    fd = (s == SCHEME_FD) || (s == SCHEME_FDWR);
    wr = (s == SCHEME_WR) || (s == SCHEME_FDWR);
    v = '0;
    if (!((c.ev == EV_READ_RESP) || (c.ev == EV_WRITE_REQ))) return v;
    for (int g = 0; g < 4; g++) begin
      bit any;
      any = 0;
      for (int k = 0; k < 4; k++) any |= c.used[15 - (4*g + k)];
      for (int k = 0; k < 4; k++)
        v[15 - (4*g + k)] = wr ? c.used[15 - (4*g + k)] : (!fd || any);
    end
    return v;
  endfunction

  function automatic line_t rand_line();
    line_t d;
    for (int i = 0; i < 16; i++) d[32*i +: 32] = $urandom;
    return d;
  endfunction

  function automatic int toggles(flit_t a, flit_t b);
    return $countones(a ^ b);
  endfunction

endpackage
