// vga_controller_tb: runs the controller at its default 640 x 480 timing for
// just over two frames with a colour input that changes every clock. Checks
// col/row against an independent raster count, the width and position of
// every hsync and vsync pulse, the line and frame periods (800 clocks, 525
// lines), and that the colour outputs copy the inputs of the previous clock
// inside the visible area and are zero outside it. Ends with a reset check.
module vga_controller_tb;
  import sop_pkg::*;

  localparam int HV = 640, HF = 16, HS = 96, HB = 48, HT = HV+HF+HS+HB;
  localparam int VV = 480, VF = 10, VS = 2,  VB = 33, VT = VV+VF+VS+VB;

  logic clk = 1'b0, reset;
  dac_t VGA_in_red, VGA_in_green, VGA_in_blue;
  dac_t VGA_out_red, VGA_out_green, VGA_out_blue;
  coord_t col, row;
  logic hsync, vsync;
  int checks = 0, failures = 0;

  vga_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  initial begin
    int h = 0, v = 0;
    int hs_lines = 0, vs_frames = 0;
    logic vis, hs_exp, vs_exp;
    dac_t r, g, b;
    reset = 1'b1;
    {VGA_in_red, VGA_in_green, VGA_in_blue} = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 2*HT*VT + 1000; i++) begin
      // present a colour for the position the controller shows now
      VGA_in_red   = dac_t'($urandom);
      VGA_in_green = dac_t'($urandom);
      VGA_in_blue  = dac_t'($urandom);
      checks++;
      if (int'(col) != h || int'(row) != v) fail($sformatf("position %0d,%0d want %0d,%0d", col, row, h, v));
      vis    = (h < HV) && (v < VV);
      hs_exp = !(h >= HV+HF && h < HV+HF+HS);
      vs_exp = !(v >= VV+VF && v < VV+VF+VS);
      r = vis ? VGA_in_red : '0; g = vis ? VGA_in_green : '0; b = vis ? VGA_in_blue : '0;
      @(posedge clk);
      #1;
      checks++;
      if (hsync !== hs_exp || vsync !== vs_exp) fail($sformatf("sync at %0d,%0d", h, v));
      if ({VGA_out_red, VGA_out_green, VGA_out_blue} !== {r, g, b}) fail($sformatf("colour at %0d,%0d", h, v));
      if (h == HV+HF) hs_lines++;
      if (h == 0 && v == VV+VF) vs_frames++;
      h++;
      if (h == HT) begin h = 0; v = (v == VT-1) ? 0 : v + 1; end
      @(negedge clk);
    end
    checks++;
    if (hs_lines < 2*VT || vs_frames != 2) fail($sformatf("%0d hsync pulses, %0d vsync pulses", hs_lines, vs_frames));
    reset = 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (col != 0 || row != 0 || !hsync || !vsync || VGA_out_red != 0) fail("reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
