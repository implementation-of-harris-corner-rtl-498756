// harris_pkg: widths and record types shared by the Harris corner pipeline.
//
// The pipeline carries 8-bit grey pixels of a 256x256 image (the frame size
// the design targets). Every later width follows from that by worst-case
// range: a Sobel gradient of 8-bit pixels lies in [-1020, 1020] (11 bits
// signed), a gradient product in [-1040400, 1040400] (22 bits signed), and the
// Harris response of smoothed products stays below 2^42 in magnitude, so 44
// bits signed hold it. The pixel width and frame size follow the source
// design; the derived widths are this implementation's choice.
package harris_pkg;

  localparam int unsigned PIX_W  = 8;   // grey pixel
  localparam int unsigned GRAD_W = 11;  // Sobel gradient, signed
  localparam int unsigned PROD_W = 22;  // gradient product, signed
  localparam int unsigned R_W    = 44;  // Harris response, signed
  localparam int unsigned IMG_W  = 256; // default frame width
  localparam int unsigned IMG_H  = 256; // default frame height

  // Coordinates are kept 8 bits wide at the default frame size; modules use
  // $clog2 of their own size parameters for internal counters.
  localparam int unsigned COORD_W = 8;

  typedef logic signed [R_W-1:0] resp_t;

  // One detected corner as stored in the corner memories.
  typedef struct packed {
    resp_t              r;
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
  } corner_t;

  // Coordinate pair as pushed into the matched-corner FIFOs.
  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
  } coord_t;

endpackage
