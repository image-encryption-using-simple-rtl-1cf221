// mymemory_tb: reads a memory filled with the address pattern (word i holds
// i mod 8) at random addresses and checks each word one clock after its
// address, then reads a default memory (one-colour red image) at random
// addresses over the full 16-bit range.
module mymemory_tb;
  import sop_pkg::*;

  logic clk = 1'b0;
  logic [15:0] addr_p, addr_u;
  pixel_t dout_p, dout_u;
  int checks = 0, failures = 0;

  mymemory #(.INIT_PATTERN(1'b1)) dut_pattern (.clka(clk), .addra(addr_p), .douta(dout_p));
  mymemory                        dut_uniform (.clka(clk), .addra(addr_u), .douta(dout_u));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      addr_p = (i < 20) ? 16'(i) : 16'($urandom);
      addr_u = 16'($urandom);
      @(posedge clk);
      #1;
      checks += 2;
      if (dout_p !== pixel_t'(addr_p % 8)) begin
        failures++;
        $display("FAIL pattern addr %0d got %b", addr_p, dout_p);
      end
      if (dout_u !== RED) begin
        failures++;
        $display("FAIL uniform addr %0d got %b", addr_u, dout_u);
      end
      // the output must not follow a new address before the next edge
      @(negedge clk);
      addr_p = addr_p + 16'd1;
      #1;
      checks++;
      if (dout_p !== pixel_t'((addr_p - 16'd1) % 8)) begin
        failures++;
        $display("FAIL read is not synchronous at addr %0d", addr_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
