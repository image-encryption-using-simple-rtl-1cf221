// sop_pkg: types and constants shared by the SOP image-encryption display.
//
// A pixel is 3 bits, one per colour gun, red in bit 2, green in bit 1 and
// blue in bit 0, giving the eight colours of the 3-bit VGA palette below.
// The key has the width of a pixel so that every pixel bit has its own key
// bit. The 4-bit DAC width and the 10-bit raster coordinates follow the port
// widths of the VGA controller; the colour coding follows the palette table
// of the design. Nothing here is clocked.
package sop_pkg;

  localparam int unsigned PIXEL_W = 3;   // bits per pixel (one per colour)
  localparam int unsigned DAC_W   = 4;   // bits per colour gun at the VGA port
  localparam int unsigned COORD_W = 10;  // width of the col/row raster coordinates

  typedef logic [PIXEL_W-1:0] pixel_t;
  typedef logic [DAC_W-1:0]   dac_t;
  typedef logic [COORD_W-1:0] coord_t;

  // 3-bit palette: {red, green, blue}
  typedef enum logic [PIXEL_W-1:0] {
    BLACK   = 3'b000,
    BLUE    = 3'b001,
    GREEN   = 3'b010,
    CYAN    = 3'b011,
    RED     = 3'b100,
    MAGENTA = 3'b101,
    YELLOW  = 3'b110,
    WHITE   = 3'b111
  } color_e;

endpackage
