// conv_chip: AER convolution chip. For every input event the kernel stored
// in the kernel RAM is splatted, centred on the event, onto an N x N array of
// signed integrate-and-fire pixels; pixels that reach +/-thresh send signed
// output events.
// Structure (as on the chip): control block, kernel RAM, x-neighbourhood
// shifter, y-decoder, monostable, pixel array and burst-mode AER output.
// Input address: x = in_addr[IN_BITS-1:0], y = in_addr[2*IN_BITS-1:IN_BITS]
// in a 128 x 128 space; the array covers input columns X_OFF .. X_OFF+N-1 and
// rows Y_OFF .. Y_OFF+N-1 (the centre of a 64 x 64 retina by default).
// Output address: {neg, y[4:0], x[4:0]} in array coordinates.
// Kernel programming: kcfg_we writes weight kcfg_w at (kcfg_row, kcfg_col);
// kernel row KC, column KC is the centre.
// Timing: one input event every 2 + n_k cycles, n_k the number of kernel rows
// that fall on the array; the output side runs concurrently.
module conv_chip #(
  parameter int N       = 32,
  parameter int K       = 32,
  parameter int WBITS   = 4,
  parameter int VBITS   = 8,
  parameter int IN_BITS = 7,
  parameter int X_OFF   = 16,
  parameter int Y_OFF   = 16,
  parameter int PULSE   = 1,
  parameter int AW      = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [AW-1:0]           in_addr,
  output logic                    in_ready,
  output logic                    out_valid,
  output logic [AW-1:0]           out_addr,
  input  logic                    out_ready,
  input  logic                    kcfg_we,
  input  logic [$clog2(K)-1:0]    kcfg_row,
  input  logic [$clog2(K)-1:0]    kcfg_col,
  input  logic signed [WBITS-1:0] kcfg_w,
  input  logic [VBITS-2:0]        thresh
);
  localparam int SW = 10;
  localparam int KC = K / 2;

  logic [$clog2(K)-1:0]    k_row;
  logic signed [SW-1:0]    x_shift;
  logic                    row_we, mono_trig, mono_pulse, mono_last, erase;
  logic [$clog2(N)-1:0]    p_row;
  logic signed [WBITS-1:0] krow [K];
  logic signed [WBITS-1:0] prow [N];
  logic [N-1:0]            row_en;
  logic [N-1:0]            fire_pos [N];
  logic [N-1:0]            fire_neg [N];
  logic                    rst_en;
  logic [$clog2(N)-1:0]    rst_row;
  logic [N-1:0]            rst_mask;

  conv_control #(.N(N), .K(K), .IN_BITS(IN_BITS), .X_OFF(X_OFF), .Y_OFF(Y_OFF), .KC(KC), .SW(SW)) u_ctrl (
    .clk, .rst_n, .in_valid,
    .in_x(in_addr[IN_BITS-1:0]), .in_y(in_addr[2*IN_BITS-1:IN_BITS]),
    .in_ready, .k_row, .x_shift, .row_we, .p_row, .mono_trig, .mono_last, .erase);

  conv_kernel_ram #(.K(K), .WBITS(WBITS)) u_kram (
    .clk, .we(kcfg_we), .wrow(kcfg_row), .wcol(kcfg_col), .wdata(kcfg_w),
    .rrow(k_row), .rdata(krow));

  conv_x_neighbourhood #(.N(N), .K(K), .WBITS(WBITS), .SW(SW)) u_xn (
    .kin(krow), .shift(x_shift), .wout(prow));

  conv_y_decoder #(.N(N)) u_yd (.en(row_we), .row(p_row), .row_en);

  conv_monostable #(.PULSE(PULSE)) u_mono (
    .clk, .rst_n, .trig(mono_trig), .pulse(mono_pulse), .last(mono_last));

  conv_pixel_array #(.N(N), .WBITS(WBITS), .VBITS(VBITS)) u_pix (
    .clk, .rst_n, .row_en, .row_w(prow), .integ(mono_pulse), .erase, .thresh,
    .rst_en, .rst_row, .rst_mask, .fire_pos, .fire_neg);

  conv_aer_out #(.N(N), .AW(AW)) u_out (
    .clk, .rst_n, .fire_pos, .fire_neg, .rst_en, .rst_row, .rst_mask,
    .out_valid, .out_addr, .out_ready);
endmodule
