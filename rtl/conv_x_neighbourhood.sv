// conv_x_neighbourhood: displaces one kernel row in x before it is written
// into a row of the pixel array. Pixel column px receives kernel column
// px + shift when that index lies inside the kernel (0 .. K-1) and zero
// weight otherwise, so the kernel lands centred on the event's column.
// Purely combinational. The chip's block performs "a displacement of the
// kernel in the x direction"; the barrel-shift form is this design's choice.
module conv_x_neighbourhood #(
  parameter int N     = 32,
  parameter int K     = 32,
  parameter int WBITS = 4,
  parameter int SW    = 10
) (
  input  logic signed [WBITS-1:0] kin  [K],
  input  logic signed [SW-1:0]    shift,
  output logic signed [WBITS-1:0] wout [N]
);
  always_comb begin
    for (int px = 0; px < N; px++) begin
      int idx;
      idx = px + int'(shift);
      wout[px] = (idx >= 0 && idx < K) ? kin[idx] : '0;
    end
  end
endmodule
