// decryption_tb: checks that decryption recovers the plain pixel: for all 64
// plain/key pairs the cipher p XOR k is fed in and p must come out; then the
// four worked examples of the design are undone (key 101).
module decryption_tb;
  import sop_pkg::*;

  pixel_t C, U, P;
  int checks = 0, failures = 0;

  decryption dut (.C(C), .U(U), .P(P));

  task automatic check(pixel_t c, pixel_t k, pixel_t want);
    C = c; U = k;
    #1;
    checks++;
    if (P !== want) begin
      failures++;
      $display("FAIL C=%b U=%b P=%b want %b", c, k, P, want);
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
        check(pixel_t'(p ^ k), pixel_t'(k), pixel_t'(p));
    check(BLUE,  MAGENTA, RED);
    check(BLACK, MAGENTA, MAGENTA);
    check(CYAN,  MAGENTA, YELLOW);
    check(GREEN, MAGENTA, WHITE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
