// conv_control: the digital controller of the convolution chip.
// In the cycle an input event is accepted it latches the (x, y) address and
// computes, relative to the pixel array (input coordinate minus X_OFF/Y_OFF),
// the x shift applied to every kernel row and the first and last pixel rows
// the kernel covers (kernel centre at index KC). It then copies one kernel
// row per cycle: it addresses kernel row ky = py - y + KC, passes the shift to
// the x-neighbourhood block and enables pixel row py. After the last row it
// triggers the monostable; during the pulse the pixels integrate, and on its
// last cycle the weights are erased and the next event may be accepted.
// An event of which no kernel row falls on the array is acknowledged and
// dropped at once. Per event this takes 2 + n_k cycles, n_k being the number
// of kernel rows copied (with PULSE = 1): at 50 MHz, 40 + 20 n_k ns.
// The sequence follows the chip; one row per cycle is this design's timing.
module conv_control #(
  parameter int N       = 32,
  parameter int K       = 32,
  parameter int IN_BITS = 7,
  parameter int X_OFF   = 16,
  parameter int Y_OFF   = 16,
  parameter int KC      = 16,
  parameter int SW      = 10
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [IN_BITS-1:0]     in_x,
  input  logic [IN_BITS-1:0]     in_y,
  output logic                   in_ready,
  output logic [$clog2(K)-1:0]   k_row,
  output logic signed [SW-1:0]   x_shift,
  output logic                   row_we,
  output logic [$clog2(N)-1:0]   p_row,
  output logic                   mono_trig,
  input  logic                   mono_last,
  output logic                   erase
);
  typedef enum logic [1:0] {IDLE, COPY, INTEG} st_t;
  st_t st;
  logic signed [SW-1:0] yr_c, lo_c, hi_c, hi, py, yr;

  // limits computed combinationally from the incoming address
  always_comb begin
    yr_c = SW'(signed'({1'b0, in_y})) - SW'(Y_OFF);
    lo_c = yr_c - SW'(KC);
    hi_c = lo_c + SW'(K - 1);
    if (lo_c < 0) lo_c = '0;
    if (hi_c > SW'(N - 1)) hi_c = SW'(N - 1);
  end

  assign in_ready  = (st == IDLE);
  assign row_we    = (st == COPY);
  assign p_row     = py[$clog2(N)-1:0];
  assign k_row     = $clog2(K)'(py - yr + SW'(KC));
  assign mono_trig = (st == COPY) && (py == hi);
  assign erase     = (st == INTEG) && mono_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; hi <= '0; py <= '0; yr <= '0; x_shift <= '0;
    end else begin
      unique case (st)
        IDLE: if (in_valid) begin
          yr      <= yr_c;
          hi      <= hi_c;
          py      <= lo_c;
          x_shift <= SW'(KC) - (SW'(signed'({1'b0, in_x})) - SW'(X_OFF));
          if (lo_c <= hi_c) st <= COPY;
        end
        COPY: if (py == hi) st <= INTEG;
              else          py <= py + 1'b1;
        INTEG: if (mono_last) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end
endmodule
