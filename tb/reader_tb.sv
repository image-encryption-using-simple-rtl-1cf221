// reader_tb: drives random raster positions into a reader with small windows
// (3 x 4 pixels, plain at row 1 col 2, cipher at row 5 col 7) and a
// behavioural synchronous memory holding random pixels. Three clocks after
// each position the flags must say which window it lay in, and inside a
// window dataout must be the stored pixel at the row-major position inside
// that window. Also checks that reset clears both flags.
module reader_tb;
  import sop_pkg::*;

  localparam int ROWS = 3, COLS = 4, PR0 = 1, PC0 = 2, CR0 = 5, CC0 = 7;

  logic clk = 1'b0, reset;
  coord_t col, row;
  pixel_t datain, dataout;
  logic [15:0] addr;
  logic enencryp, ennormal;
  int checks = 0, failures = 0;
  int n_plain = 0, n_cipher = 0, n_out = 0;

  pixel_t img [ROWS*COLS];

  reader #(.IMG_ROWS(ROWS), .IMG_COLS(COLS), .PLAIN_ROW0(PR0), .PLAIN_COL0(PC0),
           .CIPHER_ROW0(CR0), .CIPHER_COL0(CC0)) dut (.*);

  // behavioural image memory, one clock read latency
  always_ff @(posedge clk)
    datain <= (addr < ROWS*COLS) ? img[addr] : BLACK;

  always #5 clk = ~clk;

  typedef struct { logic plain; logic cipher; pixel_t pix; } exp_t;
  exp_t pipe[$];

  function automatic exp_t expect_at(int r, int c);
    exp_t e;
    e.plain  = (r >= PR0 && r < PR0+ROWS && c >= PC0 && c < PC0+COLS);
    e.cipher = (r >= CR0 && r < CR0+ROWS && c >= CC0 && c < CC0+COLS);
    e.pix    = e.plain  ? img[(r-PR0)*COLS + (c-PC0)] :
               e.cipher ? img[(r-CR0)*COLS + (c-CC0)] : BLACK;
    return e;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_t e;
    foreach (img[i]) img[i] = pixel_t'($urandom);
    reset = 1'b1; row = '0; col = '0;
    repeat (4) @(posedge clk);
    #1;
    checks++;
    if (ennormal || enencryp) begin failures++; $display("FAIL flags set in reset"); end
    @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      // sequential raster scan for the first part, random positions afterwards
      if (i < 256) begin row = coord_t'(i / 16); col = coord_t'(i % 16); end
      else begin row = coord_t'($urandom_range(10)); col = coord_t'($urandom_range(13)); end
      pipe.push_back(expect_at(int'(row), int'(col)));
      @(posedge clk);
      #1;
      if (pipe.size() >= 3) begin
        e = pipe.pop_front();
        checks++;
        if (ennormal !== e.plain || enencryp !== e.cipher ||
            ((e.plain || e.cipher) && dataout !== e.pix)) begin
          failures++;
          $display("FAIL step %0d: flags %b%b data %b, want %b%b %b", i,
                   ennormal, enencryp, dataout, e.plain, e.cipher, e.pix);
        end
        if (e.plain) n_plain++;
        if (e.cipher) n_cipher++;
        if (!e.plain && !e.cipher) n_out++;
      end
      @(negedge clk);
    end
    if (n_plain == 0 || n_cipher == 0 || n_out == 0) begin
      failures++;
      $display("FAIL window coverage %0d %0d %0d", n_plain, n_cipher, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
