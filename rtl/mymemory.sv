// mymemory: plain-image memory.
//
// A single-port memory of DEPTH 3-bit words holding the plain image A_mn in
// row-major order (address = m * image width + n). It is read synchronously:
// the word at addra is on douta one clka edge later, the behaviour of an FPGA
// block RAM. The design shows the memory only as a read port (clka, addra,
// douta), so its contents are fixed at configuration time. Here they are
// built by an initial loop: with INIT_PATTERN = 0 every word holds
// INIT_COLOR (a one-colour plain image, red by default, like the test
// images of the design); with INIT_PATTERN = 1 word i holds i mod 8, which
// cycles through all eight colours and makes the scan order visible. The
// initial contents are this design's choice.
//
// Interface: clka, addra (ADDR_W bits), douta (3 bits), one cycle latency.
module mymemory
  import sop_pkg::*;
#(
  parameter int unsigned ADDR_W       = 16,
  parameter int unsigned DEPTH        = 2 ** ADDR_W,
  parameter bit          INIT_PATTERN = 1'b0,
  parameter pixel_t      INIT_COLOR   = RED
) (
  input  logic              clka,
  input  logic [ADDR_W-1:0] addra,
  output pixel_t            douta
);

  pixel_t mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++)
      mem[i] = INIT_PATTERN ? pixel_t'(i % 8) : INIT_COLOR;
  end

  always_ff @(posedge clka)
    douta <= mem[addra];

endmodule
