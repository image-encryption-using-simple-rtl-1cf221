// clk_divider_tb: counts board-clock edges between edges of the divided
// clock. With the default 2-bit counter every rising edge of clk_out must
// be 4 board clocks after the previous one, and clk_out must stay high for
// exactly 2 board clocks.
module clk_divider_tb;
  logic clk = 1'b0;
  logic clk_out;
  int checks = 0, failures = 0;
  int n_clk = 0, last_rise = -1, last_fall = -1;

  clk_divider dut (.clk(clk), .clk_out(clk_out));

  always #5 clk = ~clk;
  always @(posedge clk) n_clk++;

  always @(posedge clk_out) begin
    if (last_rise >= 0) begin
      checks++;
      if (n_clk - last_rise != 4) begin
        failures++;
        $display("FAIL period %0d board clocks", n_clk - last_rise);
      end
    end
    last_rise = n_clk;
  end

  always @(negedge clk_out) begin
    if (last_rise >= 0) begin
      checks++;
      if (n_clk - last_rise != 2) begin
        failures++;
        $display("FAIL high time %0d board clocks", n_clk - last_rise);
      end
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400) @(posedge clk);
    if (checks < 150) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
