// frame_checker: runs one complete frame of the display for one image size
// and checks it pixel by pixel.
//
// Instantiates the top with an IMG_ROWS x IMG_COLS image filled with the
// address pattern (pixel i holds i mod 8), the default 640 x 480 raster and
// window origins, and key KEY. From reset it follows the raster with an
// independent model (colour shown at a visible position = colour of the
// raster position four pixel clocks earlier: plain pixel, plain XOR key, or
// black) and compares sync and colour outputs for one whole frame. It also
// counts the pixels shown from each window, which must both equal
// IMG_ROWS x IMG_COLS. done rises when the frame has been checked; the
// clock and the tallies are shared with the enclosing testbench.
module frame_checker
  import sop_pkg::*;
#(
  parameter int     IMG_ROWS = 1,
  parameter int     IMG_COLS = 1,
  parameter pixel_t KEY      = MAGENTA
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   pixels   // pixels of the stored image shown plain
);

  localparam int PR0 = 0, PC0 = 0, CR0 = 330, CC0 = 330;
  localparam int HV = 640, HF = 16, HS = 96, HB = 48, HT = HV+HF+HS+HB;
  localparam int VV = 480, VF = 10, VS = 2, VB = 33, VT = VV+VF+VS+VB;
  localparam int LAT = 4;

  logic reset;
  pixel_t dec_plain;
  logic hsync, vsync;
  dac_t VGA_out_red, VGA_out_green, VGA_out_blue;

  main #(.INIT_PATTERN(1'b1), .IMG_ROWS(IMG_ROWS), .IMG_COLS(IMG_COLS)) dut (
    .clk(clk), .reset(reset), .U(KEY), .hsync(hsync), .vsync(vsync),
    .VGA_out_red(VGA_out_red), .VGA_out_green(VGA_out_green),
    .VGA_out_blue(VGA_out_blue), .dec_cipher(BLACK), .dec_plain(dec_plain)
  );

  function automatic pixel_t color_at(int h, int v);
    if (v >= PR0 && v < PR0+IMG_ROWS && h >= PC0 && h < PC0+IMG_COLS)
      return pixel_t'(((v-PR0)*IMG_COLS + (h-PC0)) % 8);
    if (v >= CR0 && v < CR0+IMG_ROWS && h >= CC0 && h < CC0+IMG_COLS)
      return pixel_t'(((v-CR0)*IMG_COLS + (h-CC0)) % 8) ^ KEY;
    return BLACK;
  endfunction

  initial begin
    pixel_t hist[$];
    pixel_t want;
    int cipher_px, sh;
    logic vis;
    done = 1'b0; checks = 0; failures = 0; pixels = 0; cipher_px = 0;
    reset = 1'b1;
    repeat (5) @(posedge dut.pclk);
    @(negedge dut.pclk);
    reset = 1'b0;
    hist = '{BLACK, BLACK, BLACK, BLACK};
    for (int v = 0; v < VT; v++) begin
      for (int h = 0; h < HT; h++) begin
        @(posedge dut.pclk);
        vis  = (h < HV) && (v < VV);
        want = vis ? hist[0] : BLACK;
        hist.push_back(color_at(h, v));
        void'(hist.pop_front());
        #1;
        checks++;
        if (hsync !== !(h >= HV+HF && h < HV+HF+HS) || vsync !== !(v >= VV+VF && v < VV+VF+VS) ||
            {VGA_out_red, VGA_out_green, VGA_out_blue} !==
            {3'b000, want[2], 3'b000, want[1], 3'b000, want[0]}) begin
          failures++;
          if (failures < 5)
            $display("FAIL %0dx%0d at %0d,%0d: want %b", IMG_ROWS, IMG_COLS, h, v, want);
        end
        sh = h - LAT;
        if (vis && sh >= PC0 && sh < PC0+IMG_COLS && v >= PR0 && v < PR0+IMG_ROWS) pixels++;
        if (vis && sh >= CC0 && sh < CC0+IMG_COLS && v >= CR0 && v < CR0+IMG_ROWS) cipher_px++;
      end
    end
    checks++;
    if (pixels != IMG_ROWS*IMG_COLS || cipher_px != IMG_ROWS*IMG_COLS) begin
      failures++;
      $display("FAIL %0dx%0d: %0d plain and %0d cipher pixels shown",
               IMG_ROWS, IMG_COLS, pixels, cipher_px);
    end
    done = 1'b1;
  end

endmodule
