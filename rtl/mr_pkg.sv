// mr_pkg: types and constants shared by the mixed-reality pixel streaming design.
//
// The design streams a warped, lens-corrected 640x480 RGB image to each of two
// 240 Hz displays. Each display is fed by a pixel streaming engine with eight
// parallel lanes; one 8-pixel word carries the pixels x0..x0+7 of one scanline.
// Resolution, frame size, lane count, cube face size and fill time follow the
// design description; every fixed-point format below is this design's choice.
package mr_pkg;

  // Video format: 640x480 active inside an 800x525 frame (9.92 ns pixel clock at 240 Hz).
  localparam int H_ACTIVE = 640;
  localparam int V_ACTIVE = 480;
  localparam int H_TOTAL  = 800;
  localparam int V_TOTAL  = 525;
  // Porches and sync widths of the standard 640x480 timing.
  localparam int H_FP = 16, H_SYNC = 96;
  localparam int V_FP = 10, V_SYNC = 2;

  localparam int LANES   = 8;                  // pixels per clock word
  localparam int WORDS_PER_LINE = H_ACTIVE / LANES;

  localparam int N_POLY  = 9;                  // polygons per eye for the vector graphics

  typedef logic [23:0] rgb_t;                  // R[23:16] G[15:8] B[7:0]

  // One lens-map entry: source column and row of a destination pixel.
  typedef struct packed {
    logic       valid;     // 0: destination pixel lies outside the corrected view, shown black
    logic [8:0] y;
    logic [9:0] x;
  } lut_entry_t;

  // Quaternion component, signed Q1.14 (16384 = 1.0).
  typedef logic signed [15:0] q14_t;
  // Rotation matrix element, signed Q3.14.
  typedef logic signed [17:0] rot_elem_t;
  typedef rot_elem_t rot_t [3][3];             // rot[row][col]

  typedef struct packed {
    logic signed [11:0] x;
    logic signed [11:0] y;
  } vertex_t;

  typedef struct packed {
    logic       en;
    rgb_t       color;
    vertex_t [3:0] v;      // triangle: repeat one vertex
  } poly_t;

  // Per-frame configuration of one pixel streaming engine.
  typedef struct packed {
    logic               enable;   // start streaming
    logic               ar_mode;  // 1: no memory reads, black background (AR overlay)
    logic               tr_en;    // apply translation before rotation
    logic [31:0]        base;     // byte address of cubemap face 0
    logic signed [11:0] tx, ty, tz;
  } stream_cfg_t;

  // Source-pixel request produced by an index calculation unit.
  typedef struct packed {
    logic        skip;     // no memory read: pixel is black
    logic [31:0] addr;     // byte address of a 32-bit pixel
  } idx_t;

  // 8-pixel word with its raster position, as carried to the video FIFO.
  typedef struct packed {
    logic            sof;  // first word of a frame
    logic [8:0]      y;
    logic [9:0]      x0;
    rgb_t [LANES-1:0] pix; // pix[i] is pixel x0+i
  } pixword_t;

  // Word stored in the video FIFO.
  typedef struct packed {
    logic            sof;
    rgb_t [LANES-1:0] pix;
  } vword_t;

endpackage
