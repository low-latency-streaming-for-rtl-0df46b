// sdisp_pkg: types and constants shared by the spherical-display streaming
// pipeline.
//
// Video moves between blocks as a push stream of active pixels, one beat per
// clock at most, with no back-pressure: a beat carries a valid strobe, a
// start-of-frame flag on pixel (0,0), an end-of-line flag on the last pixel of
// every line and a 24-bit RGB value (R in bits 23:16, G in 15:8, B in 7:0).
// Full-HD geometry (1920 x 1080), 24-bit pixels, the 12x12 compression block,
// the five compression stages and the ten buffer regions follow the design
// description; the stream format itself is this design's own choice.
package sdisp_pkg;


  // side of the gaze-compression block in pixels
  localparam int unsigned CBLK = 12;
  // number of compression stages: 1/1, 1/4, 1/9, 1/16, 1/36
  localparam int unsigned NLEVELS = 5;

  // ten vertical regions of the distortion-correction buffer
  localparam int unsigned NREG_DEF = 10;
  // ring depth in lines of each region, centre regions shallow, edge regions
  // deep: the largest displacement of the region plus four lines of slack
  localparam int unsigned DEPTH_DEF [NREG_DEF] = '{304, 244, 184, 124, 64, 64, 124, 184, 244, 304};

  // lines grouped per correction-map row
  localparam int unsigned MAP_GROUP = 3;
  // width of the displacement alpha (maximum 300 fits in 9 bits)
  localparam int unsigned ALPHA_W = 9;

  typedef logic [23:0] rgb_t;

  typedef struct packed {
    logic valid;
    logic sof;
    logic eol;
    rgb_t rgb;
  } vid_t;

  typedef logic [2:0] level_t;

  // side K of the KxK square averaged by a compression stage
  function automatic int unsigned level_k(input int unsigned lvl);
    case (lvl)
      0: return 1;
      1: return 2;
      2: return 3;
      3: return 4;
      default: return 6;
    endcase
  endfunction

endpackage
