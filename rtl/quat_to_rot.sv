// quat_to_rot: quaternion to rotation matrix, the rotational part of the
// homography H used for post-render warping.
//
// With a=qw, b=qx, c=qy, d=qz the matrix is
//   [a2+b2-c2-d2   2bc-2ad      2bd+2ac    ]
//   [2bc+2ad       a2+c2-b2-d2  2cd-2ab    ]
//   [2bd-2ac       2cd+2ab      a2+d2-b2-c2]
// as given with the design. Inputs are signed Q1.14 (16384 = 1.0); the ten
// products are formed at full precision, summed, and scaled back to Q.14 with
// an arithmetic shift (truncation). Outputs are signed 18-bit Q3.14 so that an
// unnormalised quaternion cannot overflow. One register stage: r follows q
// one clock later. The fixed-point formats and the register stage are this
// design's own choices.
module quat_to_rot
  import mr_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  q14_t      qw, qx, qy, qz,
  output rot_elem_t r [3][3]
);
  logic signed [31:0] aa, bb, cc, dd, ab, ac, ad, bc, bd, cd;
  logic signed [33:0] s [3][3];

  always_comb begin
    aa = qw * qw;  bb = qx * qx;  cc = qy * qy;  dd = qz * qz;
    ab = qw * qx;  ac = qw * qy;  ad = qw * qz;
    bc = qx * qy;  bd = qx * qz;  cd = qy * qz;
    s[0][0] = 34'(aa) + 34'(bb) - 34'(cc) - 34'(dd);
    s[0][1] = 2 * (34'(bc) - 34'(ad));
    s[0][2] = 2 * (34'(bd) + 34'(ac));
    s[1][0] = 2 * (34'(bc) + 34'(ad));
    s[1][1] = 34'(aa) + 34'(cc) - 34'(bb) - 34'(dd);
    s[1][2] = 2 * (34'(cd) - 34'(ab));
    s[2][0] = 2 * (34'(bd) - 34'(ac));
    s[2][1] = 2 * (34'(cd) + 34'(ab));
    s[2][2] = 34'(aa) + 34'(dd) - 34'(bb) - 34'(cc);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          r[i][j] <= (i == j) ? rot_elem_t'(16384) : '0;
    end else begin
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          r[i][j] <= rot_elem_t'(s[i][j] >>> 14);
    end
  end
endmodule
