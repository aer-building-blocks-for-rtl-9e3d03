// conv_pixel_array: N x N signed integrate-and-fire pixels of the
// convolution chip, as a digital equivalent of the analog array.
// Each pixel holds a kernel weight register, written a whole row at a time
// (row_en, row_w), and a signed integrator. In every cycle of the integration
// pulse each integrator adds its weight (saturating at the VBITS range); on
// 'erase' all weight registers clear. A pixel whose integrator is at or above
// +thresh raises fire_pos, at or below -thresh fire_neg. The output arbiter
// resets the integrators of a row given by rst_row / rst_mask; a reset and an
// integration in the same cycle give the reset value plus the weight.
// There is no leak, as on the chip. Digital saturation is this design's own.
module conv_pixel_array #(
  parameter int N     = 32,
  parameter int WBITS = 4,
  parameter int VBITS = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N-1:0]            row_en,
  input  logic signed [WBITS-1:0] row_w [N],
  input  logic                    integ,
  input  logic                    erase,
  input  logic [VBITS-2:0]        thresh,
  input  logic                    rst_en,
  input  logic [$clog2(N)-1:0]    rst_row,
  input  logic [N-1:0]            rst_mask,
  output logic [N-1:0]            fire_pos [N],
  output logic [N-1:0]            fire_neg [N]
);
  localparam logic signed [VBITS:0] VMAX = (VBITS+1)'(2**(VBITS-1) - 1);
  localparam logic signed [VBITS:0] VMIN = -(VBITS+1)'(2**(VBITS-1) - 1);
  logic signed [WBITS-1:0] w [N][N];
  logic signed [VBITS-1:0] v [N][N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          w[r][c] <= '0;
          v[r][c] <= '0;
        end
    end else begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          logic signed [VBITS:0] nv;
          nv = (rst_en && rst_row == $clog2(N)'(r) && rst_mask[c]) ? '0 : (VBITS+1)'(v[r][c]);
          if (integ) nv = nv + (VBITS+1)'(w[r][c]);
          if (nv > VMAX) nv = VMAX;
          if (nv < VMIN) nv = VMIN;
          v[r][c] <= nv[VBITS-1:0];
          if (erase)          w[r][c] <= '0;
          else if (row_en[r]) w[r][c] <= row_w[c];
        end
    end
  end

  always_comb
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        fire_pos[r][c] = (v[r][c] >= signed'({1'b0, thresh}));
        fire_neg[r][c] = (v[r][c] <= -signed'({1'b0, thresh}));
      end
endmodule
