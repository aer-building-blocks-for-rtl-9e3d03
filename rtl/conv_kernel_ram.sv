// conv_kernel_ram: kernel storage of the convolution chip, K x K signed
// weights of WBITS bits (32 x 32 x 4 bits by default, as on the chip).
// Written one weight at a time by the host (we, wrow, wcol, wdata, taking
// effect at the next clock edge); read one whole kernel row at a time,
// combinationally (rrow -> rdata), because the controller copies the kernel
// into the pixel array row by row, one row per clock. Contents are not reset:
// the kernel must be programmed before use.
module conv_kernel_ram #(
  parameter int K     = 32,
  parameter int WBITS = 4
) (
  input  logic                    clk,
  input  logic                    we,
  input  logic [$clog2(K)-1:0]    wrow,
  input  logic [$clog2(K)-1:0]    wcol,
  input  logic signed [WBITS-1:0] wdata,
  input  logic [$clog2(K)-1:0]    rrow,
  output logic signed [WBITS-1:0] rdata [K]
);
  logic signed [WBITS-1:0] mem [K][K];

  always_ff @(posedge clk)
    if (we) mem[wrow][wcol] <= wdata;

  always_comb
    for (int c = 0; c < K; c++) rdata[c] = mem[rrow][c];
endmodule
