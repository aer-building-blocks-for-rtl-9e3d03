// conv_y_decoder: row decoder of the pixel array. While en is high, exactly
// the bit of the addressed pixel row is set, selecting the row whose weight
// registers take the kernel row being copied. Combinational.
module conv_y_decoder #(
  parameter int N = 32
) (
  input  logic                 en,
  input  logic [$clog2(N)-1:0] row,
  output logic [N-1:0]         row_en
);
  always_comb begin
    row_en = '0;
    if (en) row_en[row] = 1'b1;
  end
endmodule
