// adm_pkg: constants and types shared by the adaptive delta modulator (ADM)
// video codecs.
//
// The default sizes follow the one-dimensional encoder: the estimate is a
// 7-bit code spanning the peak-to-peak video signal, so the smallest step
// Ymin (1/128 of peak-to-peak) is one code and the largest step Ymax (1/8 of
// peak-to-peak) is 16 codes. The line length of the two-dimensional codec is
// this design's choice: at 16 Mb/s and 2 bits per pixel a 63.5 us television
// line holds about 508 pixels, rounded up to 512.
//
// A delta bit is carried as one logic bit: 1 stands for E = +1, 0 for E = -1.
package adm_pkg;

  localparam int unsigned ADM_VIDEO_W  = 7;    // estimate / sample code width
  localparam int unsigned ADM_YMIN     = 1;    // 1/128 of peak-to-peak
  localparam int unsigned ADM_YMAX     = 16;   // 1/8 of peak-to-peak
  localparam int unsigned ADM_LINE_LEN = 512;  // pixels per line (2-D codec)

  // Prediction direction chosen by the two-dimensional encoder; it is sent
  // as the second bit of every pixel.
  typedef enum logic {
    DIR_H = 1'b0,   // predicted from the previous pixel of the same line
    DIR_V = 1'b1    // predicted from the pixel above
  } dir_e;

  // One two-dimensional channel symbol: two transmitted bits per pixel plus
  // the pixel timing that travels with them.
  typedef struct packed {
    logic valid;    // a symbol is present this cycle
    logic sof;      // first pixel of a frame
    logic sol;      // first pixel of a line
    dir_e dir;      // direction bit
    logic e;        // delta bit, 1 = +1
  } adm2d_sym_t;

endpackage
