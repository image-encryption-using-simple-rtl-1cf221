// image_sizes_tb: the fifteen image sizes of the timing measurements, from
// 1 x 1 to 150 x 300 pixels (rows x columns), each displayed for one full
// 640 x 480 frame by its own instance of the top with key 101 and checked
// pixel by pixel. Every size must show all of its pixels once plain and once
// encrypted. The display needs one pixel clock per pixel shown in each
// window, whatever the image size; the testbench reports the frame time in
// board clocks.
module image_sizes_tb;
  import sop_pkg::*;

  localparam int N = 15;
  // rows and columns of each size, entry 0 last in the list
  localparam logic [N-1:0][15:0] ROWS = {
    16'd150, 16'd100, 16'd100, 16'd75, 16'd75, 16'd50, 16'd50, 16'd40,
    16'd40, 16'd20, 16'd20, 16'd10, 16'd10, 16'd10, 16'd1};
  localparam logic [N-1:0][15:0] COLS = {
    16'd300, 16'd250, 16'd200, 16'd200, 16'd150, 16'd150, 16'd100, 16'd100,
    16'd90, 16'd80, 16'd50, 16'd10, 16'd5, 16'd1, 16'd1};

  logic clk = 1'b0;
  logic [N-1:0] done;
  int chk [N], fl [N], px [N];
  int checks = 0, failures = 0;
  longint n_clk = 0;

  always #5 clk = ~clk;
  always @(posedge clk) n_clk++;

  for (genvar i = 0; i < N; i++) begin : g_size
    frame_checker #(.IMG_ROWS(int'(ROWS[i])), .IMG_COLS(int'(COLS[i]))) u_chk (
      .clk(clk), .done(done[i]), .checks(chk[i]), .failures(fl[i]), .pixels(px[i]));
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (&done);
    for (int i = 0; i < N; i++) begin
      $display("%0d x %0d: %0d pixels shown plain and encrypted, %0d failures",
               ROWS[i], COLS[i], px[i], fl[i]);
      checks += chk[i];
      failures += fl[i];
    end
    $display("frame of 800 x 525 pixel clocks done after %0d board clocks", n_clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
