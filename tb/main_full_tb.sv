// main_full_tb: the whole display at its default parameters.
//
// The top is instantiated without overrides: 640 x 480 raster at 800 x 525
// pixel clocks, pixel clock one quarter of the board clock, a 150 x 300
// pixel one-colour red image, plain window at the top left and cipher window
// at row 330 col 330. Four frames are shown with the keys 101, 000, 011 and
// 111; with key 101 this is the first worked example (red plain image, blue
// cipher image). An independent model predicts every sync and colour output
// as in the reduced end-to-end test, the frame period is checked in board
// clocks, and for every frame the number of red pixels (plain window) and of
// pixels in the cipher colour must each be 150 x 300 = 45000 (one frame is
// one complete operation: every stored pixel shown plain and encrypted).
module main_full_tb;
  import sop_pkg::*;

  localparam int ROWS = 150, COLS = 300, PR0 = 0, PC0 = 0, CR0 = 330, CC0 = 330;
  localparam int HV = 640, HF = 16, HS = 96, HB = 48, HT = HV+HF+HS+HB;
  localparam int VV = 480, VF = 10, VS = 2, VB = 33, VT = VV+VF+VS+VB;
  localparam int LAT = 4;     // raster position to colour, pixel clocks
  localparam int DIV = 4;     // board clocks per pixel clock
  localparam int FRAMES = 4;

  logic clk = 1'b0, reset;
  pixel_t U, dec_cipher, dec_plain;
  logic hsync, vsync;
  dac_t VGA_out_red, VGA_out_green, VGA_out_blue;

  int checks = 0, failures = 0;
  int n_plain = 0, n_cipher = 0, n_black = 0, n_hsync = 0, n_vsync = 0;
  int n_key = 0, n_reset = 0, n_dec = 0;
  longint n_clk = 0;

  main dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) n_clk++;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // colour the display should show for raster position (h, v) under key k
  function automatic pixel_t color_at(int h, int v, pixel_t k);
    if (v >= PR0 && v < PR0+ROWS && h >= PC0 && h < PC0+COLS)
      return RED;
    if (v >= CR0 && v < CR0+ROWS && h >= CC0 && h < CC0+COLS)
      return RED ^ k;
    return BLACK;
  endfunction

  initial begin
    #100000000;
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
    pixel_t keys[FRAMES] = '{MAGENTA, BLACK, CYAN, WHITE};
    int n_red, n_ciph;
    int h, v, frame;
    logic vis;
    pixel_t want;
    longint last_vs = -1;
    logic vs_prev = 1'b1, hs_prev = 1'b1;

    reset = 1'b1;
    U = keys[0];
    repeat (5) @(posedge dut.pclk);
    @(negedge dut.pclk);
    reset = 1'b0;
    h = 0; v = 0; frame = 0; n_red = 0; n_ciph = 0;
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
      if (vis && {VGA_out_red[0], VGA_out_green[0], VGA_out_blue[0]} == RED) n_red++;
      if (vis && {VGA_out_red[0], VGA_out_green[0], VGA_out_blue[0]} == (RED ^ U)) n_ciph++;
      // advance the model raster
      h++;
      if (h == HT) begin
        h = 0;
        v = (v == VT-1) ? 0 : v + 1;
        if (v == VV) begin
          // vertical blanking: check this frame's pixel counts, next key
          checks++;
          if ((U != BLACK && (n_red != ROWS*COLS || n_ciph != ROWS*COLS)) ||
              (U == BLACK && n_red != 2*ROWS*COLS))
            fail($sformatf("frame %0d key %b: %0d red, %0d cipher-coloured pixels",
                           frame, U, n_red, n_ciph));
          n_red = 0; n_ciph = 0;
          frame++;
          if (frame < FRAMES) begin
            @(negedge dut.pclk);
            if (U != keys[frame]) n_key++;
            U = keys[frame];
          end
        end
      end
    end
    $display("plain %0d cipher %0d black %0d hsync %0d vsync %0d key changes %0d decrypts %0d",
             n_plain, n_cipher, n_black, n_hsync, n_vsync, n_key, n_dec);
    checks++;
    if (n_plain == 0 || n_cipher == 0 || n_black == 0 || n_hsync == 0 || n_vsync < 2 ||
        n_key == 0 || n_dec == 0)
      fail("a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
