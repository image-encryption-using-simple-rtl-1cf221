// mux: colour selector in front of the VGA controller.
//
// On every pixel clock the output register takes the plain pixel
// (data_normal) when ennormal is set, the cipher pixel (data_encryp) when
// enencryp is set, and black otherwise, so that the screen is dark outside
// the two image windows. The two enables come from the reader, which never
// sets both (the reader asserts this); should both be set, the plain pixel
// wins. The registered output and the
// priority of ennormal are this design's choices; the selection itself is
// the design's.
//
// Interface: clk, ennormal, enencryp, data_normal, data_encryp in; dataout
// out, valid one clock after its inputs.
module mux
  import sop_pkg::*;
(
  input  logic   clk,
  input  logic   ennormal,
  input  logic   enencryp,
  input  pixel_t data_normal,
  input  pixel_t data_encryp,
  output pixel_t dataout
);

  always_ff @(posedge clk) begin
    if (ennormal)      dataout <= data_normal;
    else if (enencryp) dataout <= data_encryp;
    else               dataout <= BLACK;
  end

endmodule
