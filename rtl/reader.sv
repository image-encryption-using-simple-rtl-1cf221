// reader: maps the VGA raster position onto the stored image.
//
// The screen carries two windows of IMG_ROWS x IMG_COLS pixels: the plain
// image with its top-left corner at (PLAIN_ROW0, PLAIN_COL0) and the
// encrypted image at (CIPHER_ROW0, CIPHER_COL0). Both show the same stored
// image, pixel C_mn of the cipher window sitting at the same row m and
// column n of its window as A_mn in the plain window. For each raster
// position (row, col) the reader
//   stage 1: decides which window, if any, holds it, and registers the
//            row-major memory address (m * IMG_COLS + n) and the window flag;
//   stage 2: waits while the memory reads that address (one clock);
//   stage 3: registers the pixel from the memory (datain) onto dataout
//            together with ennormal (plain window) or enencryp (cipher
//            window), so that data and flag leave aligned.
// dataout feeds both the mux and the encryption block; the mux picks plain
// or cipher by the flags. Latency is three clocks from (row, col) to
// dataout; one position is accepted every clock.
//
// The reader's ports are the design's; the window placement (plain top-left,
// cipher bottom-right), window size and pipelining are this design's
// choices. The default size 150 x 300 is the largest image size the design
// was timed with. Reset is synchronous and clears the flags.
module reader
  import sop_pkg::*;
#(
  parameter int unsigned ADDR_W      = 16,
  parameter int unsigned IMG_ROWS    = 150,
  parameter int unsigned IMG_COLS    = 300,
  parameter int unsigned PLAIN_ROW0  = 0,
  parameter int unsigned PLAIN_COL0  = 0,
  parameter int unsigned CIPHER_ROW0 = 330,
  parameter int unsigned CIPHER_COL0 = 330
) (
  input  logic              clk,
  input  logic              reset,
  input  coord_t            col,
  input  coord_t            row,
  input  pixel_t            datain,    // pixel read from the image memory
  output logic [ADDR_W-1:0] addr,      // image memory address
  output pixel_t            dataout,   // pixel handed to mux and encryption
  output logic              enencryp,  // dataout belongs to the cipher window
  output logic              ennormal   // dataout belongs to the plain window
);

  // window membership of the current raster position
  logic in_plain, in_cipher;
  logic [COORD_W-1:0] m, n;  // row and column inside the window

  always_comb begin
    // an unsigned difference below the window size means inside the window
    // (a position left of or above the window wraps to a large number)
    in_plain  = (32'(row) - PLAIN_ROW0  < IMG_ROWS) && (32'(col) - PLAIN_COL0  < IMG_COLS);
    in_cipher = (32'(row) - CIPHER_ROW0 < IMG_ROWS) && (32'(col) - CIPHER_COL0 < IMG_COLS);
    if (in_cipher) begin
      m = COORD_W'(32'(row) - CIPHER_ROW0);
      n = COORD_W'(32'(col) - CIPHER_COL0);
    end else begin
      m = COORD_W'(32'(row) - PLAIN_ROW0);
      n = COORD_W'(32'(col) - PLAIN_COL0);
    end
  end

  logic s1_plain, s1_cipher;  // stage 1: address issued
  logic s2_plain, s2_cipher;  // stage 2: memory read in flight

  always_ff @(posedge clk) begin
    if (reset) begin
      addr      <= '0;
      s1_plain  <= 1'b0;
      s1_cipher <= 1'b0;
      s2_plain  <= 1'b0;
      s2_cipher <= 1'b0;
      ennormal  <= 1'b0;
      enencryp  <= 1'b0;
      dataout   <= BLACK;
    end else begin
      // stage 1
      s1_plain  <= in_plain && !in_cipher;
      s1_cipher <= in_cipher;
      addr      <= (in_plain || in_cipher)
                   ? ADDR_W'(32'(m) * IMG_COLS + 32'(n)) : '0;
      // stage 2
      s2_plain  <= s1_plain;
      s2_cipher <= s1_cipher;
      // stage 3
      ennormal  <= s2_plain;
      enencryp  <= s2_cipher;
      dataout   <= datain;
    end
  end

  // the windows are disjoint, so at most one flag is set
  a_one_window: assert property (@(posedge clk) disable iff (reset) !(ennormal && enencryp))
    else $error("reader: ennormal and enencryp both set");

  initial begin
    assert (IMG_ROWS * IMG_COLS <= 2 ** ADDR_W)
      else $fatal(1, "reader: image does not fit the address space");
  end

endmodule
