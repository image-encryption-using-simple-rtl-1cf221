// vga_controller: 640 x 480 raster generator and colour output stage.
//
// A horizontal counter runs over H_VISIBLE + H_FP + H_SYNC + H_BP pixel
// clocks per line and a vertical counter over V_VISIBLE + V_FP + V_SYNC +
// V_BP lines per frame. col and row are the two counters: the raster
// position the rest of the system must supply a colour for. On every clock
// the output stage registers, from the current counters, hsync and vsync
// (low during the sync pulse) and the three 4-bit colour inputs, forced to
// zero outside the visible area. Colours therefore appear one clock after
// they are presented, in step with the syncs.
//
// The port list (4-bit colour inputs and outputs, col, row, hsync, vsync,
// clk, reset) is the design's; the timing parameters are the standard
// 640 x 480 at 60 Hz mode with a 25 MHz pixel clock and negative sync
// pulses, chosen here. Reset is synchronous: counters go to zero, syncs
// inactive, colours black.
module vga_controller
  import sop_pkg::*;
#(
  parameter int unsigned H_VISIBLE = 640,
  parameter int unsigned H_FP      = 16,
  parameter int unsigned H_SYNC    = 96,
  parameter int unsigned H_BP      = 48,
  parameter int unsigned V_VISIBLE = 480,
  parameter int unsigned V_FP      = 10,
  parameter int unsigned V_SYNC    = 2,
  parameter int unsigned V_BP      = 33
) (
  input  logic   clk,
  input  logic   reset,
  input  dac_t   VGA_in_red,
  input  dac_t   VGA_in_green,
  input  dac_t   VGA_in_blue,
  output coord_t col,
  output coord_t row,
  output dac_t   VGA_out_red,
  output dac_t   VGA_out_green,
  output dac_t   VGA_out_blue,
  output logic   hsync,
  output logic   vsync
);

  localparam int unsigned H_TOTAL = H_VISIBLE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_VISIBLE + V_FP + V_SYNC + V_BP;

  logic visible, hs_active, vs_active;

  always_comb begin
    visible   = (32'(col) < H_VISIBLE) && (32'(row) < V_VISIBLE);
    hs_active = (32'(col) >= H_VISIBLE + H_FP) && (32'(col) < H_VISIBLE + H_FP + H_SYNC);
    vs_active = (32'(row) >= V_VISIBLE + V_FP) && (32'(row) < V_VISIBLE + V_FP + V_SYNC);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      col           <= '0;
      row           <= '0;
      hsync         <= 1'b1;
      vsync         <= 1'b1;
      VGA_out_red   <= '0;
      VGA_out_green <= '0;
      VGA_out_blue  <= '0;
    end else begin
      if (32'(col) == H_TOTAL - 1) begin
        col <= '0;
        row <= (32'(row) == V_TOTAL - 1) ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
      hsync         <= !hs_active;
      vsync         <= !vs_active;
      VGA_out_red   <= visible ? VGA_in_red   : '0;
      VGA_out_green <= visible ? VGA_in_green : '0;
      VGA_out_blue  <= visible ? VGA_in_blue  : '0;
    end
  end

  initial begin
    assert (H_TOTAL <= 2 ** COORD_W && V_TOTAL <= 2 ** COORD_W)
      else $fatal(1, "vga_controller: timing does not fit the coordinate width");
  end

endmodule
