// encryption_tb: checks the SOP cipher against the exclusive OR of plain
// pixel and key for all 64 pixel/key pairs, then the four worked examples of
// the design (key 101: red->blue, magenta->black, yellow->cyan,
// white->green).
module encryption_tb;
  import sop_pkg::*;

  pixel_t P, U, O;
  int checks = 0, failures = 0;

  encryption dut (.P(P), .U(U), .O(O));

  task automatic check(pixel_t p, pixel_t k, pixel_t want);
    P = p; U = k;
    #1;
    checks++;
    if (O !== want) begin
      failures++;
      $display("FAIL P=%b U=%b O=%b want %b", p, k, O, want);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 8; p++)
      for (int k = 0; k < 8; k++)
        check(pixel_t'(p), pixel_t'(k), pixel_t'(p ^ k));
    check(RED,     MAGENTA, BLUE);
    check(MAGENTA, MAGENTA, BLACK);
    check(YELLOW,  MAGENTA, CYAN);
    check(WHITE,   MAGENTA, GREEN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
