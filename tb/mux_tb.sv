// mux_tb: drives random plain and cipher pixels with random window flags
// (never both set) and checks that one clock later the output holds the
// plain pixel, the cipher pixel or black as the flags selected.
module mux_tb;
  import sop_pkg::*;

  logic   clk = 1'b0;
  logic   ennormal, enencryp;
  pixel_t data_normal, data_encryp, dataout, want;
  int checks = 0, failures = 0;
  int n_norm = 0, n_enc = 0, n_black = 0;

  mux dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      case ($urandom_range(2))
        0: begin ennormal = 1'b1; enencryp = 1'b0; end
        1: begin ennormal = 1'b0; enencryp = 1'b1; end
        default: begin ennormal = 1'b0; enencryp = 1'b0; end
      endcase
      data_normal = pixel_t'($urandom);
      data_encryp = pixel_t'($urandom);
      want = ennormal ? data_normal : enencryp ? data_encryp : BLACK;
      if (ennormal) n_norm++; else if (enencryp) n_enc++; else n_black++;
      @(posedge clk);
      #1;
      checks++;
      if (dataout !== want) begin
        failures++;
        $display("FAIL en=%b%b out=%b want %b", ennormal, enencryp, dataout, want);
      end
    end
    if (n_norm == 0 || n_enc == 0 || n_black == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
