// clk_divider: pixel clock generator.
//
// A CNT_W-bit register (default 2 bits) is incremented by an adder on every
// rising edge of the board clock; its most significant bit is the divided
// clock that drives the image memory, reader, mux and VGA controller. With
// the default width the output runs at one quarter of the board clock with a
// 50 % duty cycle (100 MHz in, 25 MHz VGA pixel clock out). The adder and
// the counter register are the design's; taking the MSB as the output and
// the counter width of 2 follow the 2-bit adder of the schematic, while the
// input frequency is not fixed by the design.
//
// Interface: clk in, clk_out out. The counter has no reset, as in the
// schematic: it starts from whatever value it powers up with (zero on an
// FPGA), which only shifts the phase of the divided clock.
module clk_divider #(
  parameter int unsigned CNT_W = 2
) (
  input  logic clk,
  output logic clk_out
);

  logic [CNT_W-1:0] count;

  always_ff @(posedge clk)
    count <= count + 1'b1;

  assign clk_out = count[CNT_W-1];

endmodule
