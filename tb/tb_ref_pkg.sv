// tb_ref_pkg: reference models used by the testbenches.
//
// Written from the arithmetic spelled out in the module headers, with plain
// integer arithmetic (and the '/' operator in place of the hardware divider),
// so that the testbenches check the RTL against an independent model.
//   ref_rot      quaternion (Q1.14) to rotation matrix (Q.14), truncating
//   ref_addr     lens-mapped destination pixel to cubemap byte address
//   ref_inside   convex polygon edge test
//   mem_word     contents of the simulated DRAM: a hash of the address
//   ref_lut      a synthetic lens map, different for the two eyes
package tb_ref_pkg;

  typedef longint rot_i_t [3][3];

  function automatic longint asr(longint v, int s);
    // arithmetic shift right (floor division by 2**s)
    return (v >= 0) ? (v / (64'sd1 << s)) : -((-v + (64'sd1 << s) - 1) / (64'sd1 << s));
  endfunction

  function automatic void ref_rot(input longint a, b, c, d, output rot_i_t r);
    r[0][0] = asr(a*a + b*b - c*c - d*d, 14);
    r[0][1] = asr(2*(b*c - a*d), 14);
    r[0][2] = asr(2*(b*d + a*c), 14);
    r[1][0] = asr(2*(b*c + a*d), 14);
    r[1][1] = asr(a*a + c*c - b*b - d*d, 14);
    r[1][2] = asr(2*(c*d - a*b), 14);
    r[2][0] = asr(2*(b*d - a*c), 14);
    r[2][1] = asr(2*(c*d + a*b), 14);
    r[2][2] = asr(a*a + d*d - b*b - c*c, 14);
  endfunction

  // Returns -1 for a skipped (black, no read) pixel.
  function automatic longint ref_addr(input bit valid, input int sx, sy,
                                      input bit ar_mode, tr_en, input int tx, ty, tz,
                                      input longint base, input rot_i_t r);
    longint p [3], v [3], ab [3], m, s, t, qs, qt, u, w;
    int face;
    if (!valid || ar_mode) return -1;
    p[0] = sx - 320; p[1] = sy - 240; p[2] = 320;
    if (tr_en) begin p[0] -= tx; p[1] -= ty; p[2] -= tz; end
    for (int i = 0; i < 3; i++) begin
      v[i] = asr(r[0][i]*p[0] + r[1][i]*p[1] + r[2][i]*p[2], 10);
      ab[i] = (v[i] < 0) ? -v[i] : v[i];
    end
    if (ab[0] >= ab[1] && ab[0] >= ab[2]) begin
      m = ab[0];
      if (v[0] >= 0) begin face = 0; s = -v[2]; t = -v[1]; end
      else           begin face = 1; s =  v[2]; t = -v[1]; end
    end else if (ab[1] >= ab[2]) begin
      m = ab[1];
      if (v[1] >= 0) begin face = 2; s = v[0]; t =  v[2]; end
      else           begin face = 3; s = v[0]; t = -v[2]; end
    end else begin
      m = ab[2];
      if (v[2] >= 0) begin face = 4; s =  v[0]; t = -v[1]; end
      else           begin face = 5; s = -v[0]; t = -v[1]; end
    end
    if (m == 0) m = 1;
    qs = ((s < 0 ? -s : s) * 500) / m;
    qt = ((t < 0 ? -t : t) * 500) / m;
    u = (s < 0) ? 500 - qs : 500 + qs;
    w = (t < 0) ? 500 - qt : 500 + qt;
    if (u > 999) u = 999;
    if (w > 999) w = 999;
    return (base + 4 * (face * 1000000 + w * 1000 + u)) & 64'hFFFF_FFFF;
  endfunction

  function automatic bit ref_inside(input int vx [4], input int vy [4], input int x, y);
    int npos, nneg;
    npos = 0; nneg = 0;
    for (int j = 0; j < 4; j++) begin
      longint e;
      int k;
      k = (j + 1) % 4;
      e = longint'(x - vx[j]) * (vy[k] - vy[j]) - longint'(y - vy[j]) * (vx[k] - vx[j]);
      if (e > 0) npos++;
      if (e < 0) nneg++;
    end
    return (npos == 0 || nneg == 0) && (npos + nneg > 0);
  endfunction

  function automatic logic [31:0] mem_word(input logic [31:0] addr);
    logic [31:0] h;
    h = addr * 32'h9E37_79B1;
    return h ^ (h >> 15) ^ (addr << 7);
  endfunction

  // Synthetic lens map: a mild bend that differs in sign between the eyes;
  // entries that fall outside the source image are invalid.
  function automatic void ref_lut(input int eye, x, y, output bit valid, output int sx, sy);
    int dy, dx;
    dy = y - 240; dx = x - 320;
    sx = x + (eye ? -1 : 1) * ((dy * dy) / 1024) + dx / 16;
    sy = y + ((dx * dx) / 2048) - 20;
    valid = (sx >= 0 && sx < 640 && sy >= 0 && sy < 480);
    if (!valid) begin sx = 0; sy = 0; end
  endfunction
endpackage
