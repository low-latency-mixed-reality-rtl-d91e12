// vector_graphics: draws flat-coloured convex polygons over the pixel stream.
//
// The processor projects the 3D objects to image coordinates; this unit only
// rasterises. For each pixel (x, y) and each enabled polygon with vertices
// v0..v3 (a triangle repeats a vertex) it evaluates the four edge (line) tests
//   E_j = (x - xj)*(y_{j+1} - yj) - (y - yj)*(x_{j+1} - xj)
// The pixel is inside when all E_j have the same sign (zero counts as either,
// so both windings work) and not all are zero. An inside pixel takes the
// polygon's colour; where polygons overlap the highest-numbered one wins.
// There is no interpolation or shading. All eight pixels of a word are tested
// in parallel. Pipeline of three stages: products, edge signs, colour select;
// valid/ready on both sides, the whole pipeline stalls on out_ready low.
// Polygon coordinates are sampled once per frame, when a word with sof=1
// enters. Line testing, no shading and a short pipeline follow the design;
// the overlap rule and zero handling are this design's choices.
module vector_graphics
  import mr_pkg::*;
#(
  parameter int NP = N_POLY
) (
  input  logic     clk,
  input  logic     rst_n,
  input  poly_t    polys [NP],
  input  logic     in_valid,
  output logic     in_ready,
  input  pixword_t in_word,
  output logic     out_valid,
  input  logic     out_ready,
  output pixword_t out_word
);
  typedef logic signed [25:0] prod_t;

  logic advance;
  poly_t pl [NP];         // snapshot for the current frame
  poly_t ps [NP];         // snapshot seen by the word entering now

  logic v1, v2;
  pixword_t w1, w2;
  prod_t m1 [LANES][NP][4], m2 [LANES][NP][4];
  logic [NP-1:0] inside2 [LANES];
  logic [NP-1:0] en1;
  rgb_t col1 [NP], col2 [NP];

  assign advance  = !(out_valid && !out_ready);
  assign in_ready = advance;

  always_comb begin
    for (int p = 0; p < NP; p++) ps[p] = in_word.sof ? polys[p] : pl[p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
      for (int p = 0; p < NP; p++) pl[p] <= '0;
    end else if (advance) begin
      v1 <= in_valid;
      v2 <= v1;
      out_valid <= v2;
      if (in_valid && in_word.sof) pl <= polys;
    end
  end

  always_ff @(posedge clk) begin
    if (advance) begin
      // stage 1: edge products
      w1 <= in_word;
      for (int p = 0; p < NP; p++) begin
        en1[p]  <= ps[p].en;
        col1[p] <= ps[p].color;
      end
      for (int l = 0; l < LANES; l++) begin
        logic signed [12:0] px, py;
        px = 13'(signed'({1'b0, in_word.x0})) + 13'(l);
        py = 13'(signed'({1'b0, in_word.y}));
        for (int p = 0; p < NP; p++)
          for (int j = 0; j < 4; j++) begin
            vertex_t a, b;
            a = ps[p].v[j];
            b = ps[p].v[(j + 1) % 4];
            m1[l][p][j] <= (px - 13'(a.x)) * (13'(b.y) - 13'(a.y));
            m2[l][p][j] <= (py - 13'(a.y)) * (13'(b.x) - 13'(a.x));
          end
      end
      // stage 2: edge signs
      w2   <= w1;
      col2 <= col1;
      for (int l = 0; l < LANES; l++)
        for (int p = 0; p < NP; p++) begin
          logic ge, le, nz;
          ge = 1'b1; le = 1'b1; nz = 1'b0;
          for (int j = 0; j < 4; j++) begin
            logic signed [26:0] e;
            e = 27'(m1[l][p][j]) - 27'(m2[l][p][j]);
            if (e < 0) ge = 1'b0;
            if (e > 0) le = 1'b0;
            if (e != 0) nz = 1'b1;
          end
          inside2[l][p] <= en1[p] && (ge || le) && nz;
        end
      // stage 3: colour select
      out_word <= w2;
      for (int l = 0; l < LANES; l++)
        for (int p = 0; p < NP; p++)
          if (inside2[l][p]) out_word.pix[l] <= col2[p];
    end
  end
endmodule
