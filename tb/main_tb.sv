// main_tb: end-to-end test of the whole display on a reduced raster.
//
// The top runs with a 32 x 16 pixel raster (24 x 12 visible), a 3 x 5 pixel
// image filled with the address pattern (pixel i holds i mod 8), the plain
// window at row 1 col 2 and the cipher window at row 6 col 12. An
// independent model follows the raster from reset: for every pixel clock it
// predicts hsync, vsync and the three colour outputs, where the colour of a
// visible position is that of the raster position four pixels earlier
// (plain pixel, plain XOR key, or black). The key changes in the vertical
// blanking between frames (covering the four worked examples' key 101 and
// others), reset is pressed once in the middle of a frame, and the
// decryption port is driven with random cipher pixels. The frame period is
// checked in board clocks (4 per pixel). Each mechanism (plain pixels,
// cipher pixels, black background, hsync, vsync, key change, reset,
// decryption) must occur at least once.
module main_tb;
  import sop_pkg::*;

  localparam int ROWS = 3, COLS = 5, PR0 = 1, PC0 = 2, CR0 = 6, CC0 = 12;
  localparam int HV = 24, HF = 2, HS = 3, HB = 3, HT = HV+HF+HS+HB;
  localparam int VV = 12, VF = 1, VS = 2, VB = 1, VT = VV+VF+VS+VB;
  localparam int LAT = 4;     // raster position to colour, pixel clocks
  localparam int DIV = 4;     // board clocks per pixel clock
  localparam int FRAMES = 6;

  logic clk = 1'b0, reset;
  pixel_t U, dec_cipher, dec_plain;
  logic hsync, vsync;
  dac_t VGA_out_red, VGA_out_green, VGA_out_blue;

  int checks = 0, failures = 0;
  int n_plain = 0, n_cipher = 0, n_black = 0, n_hsync = 0, n_vsync = 0;
  int n_key = 0, n_reset = 0, n_dec = 0;
  longint n_clk = 0;

  main #(
    .CNT_W(2), .INIT_PATTERN(1'b1),
    .IMG_ROWS(ROWS), .IMG_COLS(COLS), .PLAIN_ROW0(PR0), .PLAIN_COL0(PC0),
    .CIPHER_ROW0(CR0), .CIPHER_COL0(CC0),
    .H_VISIBLE(HV), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
    .V_VISIBLE(VV), .V_FP(VF), .V_SYNC(VS), .V_BP(VB)
  ) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) n_clk++;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // colour the display should show for raster position (h, v) under key k
  function automatic pixel_t color_at(int h, int v, pixel_t k);
    if (v >= PR0 && v < PR0+ROWS && h >= PC0 && h < PC0+COLS)
      return pixel_t'(((v-PR0)*COLS + (h-PC0)) % 8);
    if (v >= CR0 && v < CR0+ROWS && h >= CC0 && h < CC0+COLS)
      return pixel_t'(((v-CR0)*COLS + (h-CC0)) % 8) ^ k;
    return BLACK;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // decryption port: random cipher pixels, checked against cipher XOR key
  always @(negedge dut.pclk) begin
    dec_cipher = pixel_t'($urandom);
    #1;
    checks++;
    n_dec++;
    if (dec_plain !== (dec_cipher ^ U)) fail("decryption");
  end

  initial begin
    pixel_t hist[$];
    pixel_t keys[FRAMES] = '{MAGENTA, BLACK, WHITE, MAGENTA, GREEN, RED};
    int h, v, frame;
    logic vis;
    pixel_t want;
    longint last_vs = -1;
    logic vs_prev = 1'b1, hs_prev = 1'b1;
    bit reset_done = 1'b0;

    reset = 1'b1;
    U = keys[0];
    repeat (5) @(posedge dut.pclk);
    @(negedge dut.pclk);
    reset = 1'b0;
    h = 0; v = 0; frame = 0;
    hist = '{BLACK, BLACK, BLACK, BLACK};
    while (frame < FRAMES) begin
      @(posedge dut.pclk);
      // position (h, v) is being output by this edge
      vis  = (h < HV) && (v < VV);
      want = vis ? hist[0] : BLACK;
      hist.push_back(color_at(h, v, U));
      void'(hist.pop_front());
      #1;
      checks++;
      if (hsync !== !(h >= HV+HF && h < HV+HF+HS) || vsync !== !(v >= VV+VF && v < VV+VF+VS))
        fail($sformatf("sync at %0d,%0d frame %0d", h, v, frame));
      if (VGA_out_red !== {3'b000, want[2]} || VGA_out_green !== {3'b000, want[1]} ||
          VGA_out_blue !== {3'b000, want[0]})
        fail($sformatf("colour at %0d,%0d frame %0d: %h%h%h want %b", h, v, frame,
                       VGA_out_red, VGA_out_green, VGA_out_blue, want));
      // mechanisms, by the position whose colour is being shown
      if (vis) begin
        int sh;
        sh = h - LAT;
        if (sh >= PC0 && sh < PC0+COLS && v >= PR0 && v < PR0+ROWS) n_plain++;
        else if (sh >= CC0 && sh < CC0+COLS && v >= CR0 && v < CR0+ROWS) n_cipher++;
        else n_black++;
      end
      if (hs_prev && !hsync) n_hsync++;
      if (vs_prev && !vsync) begin
        n_vsync++;
        // frame period in board clocks, between two falls of vsync
        if (last_vs >= 0) begin
          checks++;
          if (n_clk - last_vs != longint'(HT*VT*DIV))
            fail($sformatf("frame period %0d board clocks", n_clk - last_vs));
        end
        last_vs = n_clk;
      end
      hs_prev = hsync; vs_prev = vsync;
      // advance the model raster
      h++;
      if (h == HT) begin
        h = 0;
        v = (v == VT-1) ? 0 : v + 1;
        if (v == VV) begin
          // vertical blanking: next frame, next key
          frame++;
          if (frame < FRAMES) begin
            @(negedge dut.pclk);
            if (U != keys[frame]) n_key++;
            U = keys[frame];
          end
        end
      end
      // press reset once, in the middle of frame 2
      if (frame == 2 && v == CR0+1 && h == 5 && !reset_done) begin
        reset_done = 1'b1;
        @(negedge dut.pclk);
        reset = 1'b1;
        repeat (3) @(posedge dut.pclk);
        #1;
        checks++;
        if (VGA_out_red !== '0 || !hsync || !vsync) fail("outputs during reset");
        @(negedge dut.pclk);
        reset = 1'b0;
        n_reset++;
        h = 0; v = 0;
        hist = '{BLACK, BLACK, BLACK, BLACK};
        last_vs = -1;
        vs_prev = 1'b1; hs_prev = 1'b1;
      end
    end
    $display("plain %0d cipher %0d black %0d hsync %0d vsync %0d key changes %0d resets %0d decrypts %0d",
             n_plain, n_cipher, n_black, n_hsync, n_vsync, n_key, n_reset, n_dec);
    checks++;
    if (n_plain == 0 || n_cipher == 0 || n_black == 0 || n_hsync == 0 || n_vsync < 2 ||
        n_key == 0 || n_reset == 0 || n_dec == 0)
      fail("a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
