// main: SOP image encryption shown on a VGA monitor.
//
// A stored 3-bit-per-pixel image is displayed twice on a 640 x 480 screen:
// unchanged in a window at the top left, and encrypted with the key U in a
// window at the bottom right. The key is set on three push buttons and
// takes effect on the next pixel; pressing reset restarts the raster.
//
// Data path, all on the divided pixel clock pclk:
//   vga_controller (col, row) -> reader (window test, address)
//   -> mymemory (synchronous read) -> reader (dataout, ennormal/enencryp)
//   -> encryption (combinational SOP with U) and mux (plain / cipher /
//   black, registered) -> colour bits 2..0 into bit 0 of the red, green
//   and blue inputs of the vga_controller, whose upper three bits are tied
//   to zero -> registered, blanked VGA outputs.
// From raster position to colour the pipeline is four pixel clocks deep
// (three in the reader, one in the mux), so both windows appear four
// columns to the right of the positions set in the reader.
//
// The block set, their names and the connections follow the design's RTL
// schematic and port table. The decryption block of the overall
// encrypt/transfer/decrypt flow has no connection in that schematic; it is
// carried here with its own ports (dec_cipher in, dec_plain out), decrypting
// with the same key U. Board pins: clk A8, reset BTN0, U[0..2] BTN1..BTN3,
// hsync R6, vsync R7.
module main
  import sop_pkg::*;
#(
  parameter int unsigned CNT_W        = 2,
  parameter int unsigned ADDR_W       = 16,
  parameter bit          INIT_PATTERN = 1'b0,
  parameter pixel_t      INIT_COLOR   = RED,
  parameter int unsigned IMG_ROWS     = 150,
  parameter int unsigned IMG_COLS     = 300,
  parameter int unsigned PLAIN_ROW0   = 0,
  parameter int unsigned PLAIN_COL0   = 0,
  parameter int unsigned CIPHER_ROW0  = 330,
  parameter int unsigned CIPHER_COL0  = 330,
  parameter int unsigned H_VISIBLE    = 640,
  parameter int unsigned H_FP         = 16,
  parameter int unsigned H_SYNC       = 96,
  parameter int unsigned H_BP         = 48,
  parameter int unsigned V_VISIBLE    = 480,
  parameter int unsigned V_FP         = 10,
  parameter int unsigned V_SYNC       = 2,
  parameter int unsigned V_BP         = 33
) (
  input  logic   clk,
  input  logic   reset,
  input  pixel_t U,
  output logic   hsync,
  output logic   vsync,
  output dac_t   VGA_out_red,
  output dac_t   VGA_out_green,
  output dac_t   VGA_out_blue,
  input  pixel_t dec_cipher,
  output pixel_t dec_plain
);

  logic              pclk;
  coord_t            cols, rows;
  logic [ADDR_W-1:0] addr;
  pixel_t            douta, dataread, dataencryp, colors;
  logic              enormal, eencryp;

  clk_divider #(.CNT_W(CNT_W)) u_clk_divider (
    .clk     (clk),
    .clk_out (pclk)
  );

  mymemory #(
    .ADDR_W       (ADDR_W),
    .INIT_PATTERN (INIT_PATTERN),
    .INIT_COLOR   (INIT_COLOR)
  ) U2 (
    .clka  (pclk),
    .addra (addr),
    .douta (douta)
  );

  reader #(
    .ADDR_W      (ADDR_W),
    .IMG_ROWS    (IMG_ROWS),
    .IMG_COLS    (IMG_COLS),
    .PLAIN_ROW0  (PLAIN_ROW0),
    .PLAIN_COL0  (PLAIN_COL0),
    .CIPHER_ROW0 (CIPHER_ROW0),
    .CIPHER_COL0 (CIPHER_COL0)
  ) U1 (
    .clk      (pclk),
    .reset    (reset),
    .col      (cols),
    .row      (rows),
    .datain   (douta),
    .addr     (addr),
    .dataout  (dataread),
    .enencryp (eencryp),
    .ennormal (enormal)
  );

  encryption U3 (
    .P (dataread),
    .U (U),
    .O (dataencryp)
  );

  mux U4 (
    .clk         (pclk),
    .ennormal    (enormal),
    .enencryp    (eencryp),
    .data_normal (dataread),
    .data_encryp (dataencryp),
    .dataout     (colors)
  );

  vga_controller #(
    .H_VISIBLE (H_VISIBLE), .H_FP (H_FP), .H_SYNC (H_SYNC), .H_BP (H_BP),
    .V_VISIBLE (V_VISIBLE), .V_FP (V_FP), .V_SYNC (V_SYNC), .V_BP (V_BP)
  ) U5 (
    .clk           (pclk),
    .reset         (reset),
    .VGA_in_red    ({3'b000, colors[2]}),
    .VGA_in_green  ({3'b000, colors[1]}),
    .VGA_in_blue   ({3'b000, colors[0]}),
    .col           (cols),
    .row           (rows),
    .VGA_out_red   (VGA_out_red),
    .VGA_out_green (VGA_out_green),
    .VGA_out_blue  (VGA_out_blue),
    .hsync         (hsync),
    .vsync         (vsync)
  );

  decryption u_decryption (
    .C (dec_cipher),
    .U (U),
    .P (dec_plain)
  );

endmodule
