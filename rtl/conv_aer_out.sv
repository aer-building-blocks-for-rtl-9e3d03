// conv_aer_out: burst-mode output of the convolution chip (row arbiter,
// line buffer with column arbiter, output encoder).
// When the line buffer is empty, the row arbiter picks the lowest-numbered
// row that has a firing pixel, copies that row's firing flags and signs into
// the line buffer and, in the same cycle, resets those pixels. The column
// arbiter then sends one event per buffered pixel, lowest column first, one
// per cycle while out_ready is high: address {neg, y, x}. A new row is
// fetched in the cycle after the buffer empties.
// Burst-mode arbitration is the chip's; the fixed priorities are this
// design's choice.
module conv_aer_out #(
  parameter int N  = 32,
  parameter int AW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         fire_pos [N],
  input  logic [N-1:0]         fire_neg [N],
  output logic                 rst_en,
  output logic [$clog2(N)-1:0] rst_row,
  output logic [N-1:0]         rst_mask,
  output logic                 out_valid,
  output logic [AW-1:0]        out_addr,
  input  logic                 out_ready
);
  localparam int LW = $clog2(N);
  logic [N-1:0]  buf_v, buf_neg;
  logic [LW-1:0] buf_row;
  logic          row_any;
  logic [LW-1:0] row_sel, col_sel;

  // row arbiter: lowest row with any firing pixel
  always_comb begin
    row_any = 1'b0;
    row_sel = '0;
    for (int r = N - 1; r >= 0; r--)
      if ((fire_pos[r] | fire_neg[r]) != '0) begin
        row_any = 1'b1;
        row_sel = LW'(r);
      end
    rst_en   = (buf_v == '0) && row_any;
    rst_row  = row_sel;
    rst_mask = fire_pos[row_sel] | fire_neg[row_sel];
  end

  // column arbiter: lowest buffered column
  always_comb begin
    col_sel = '0;
    for (int c = N - 1; c >= 0; c--)
      if (buf_v[c]) col_sel = LW'(c);
  end

  assign out_valid = (buf_v != '0);
  assign out_addr  = AW'({buf_neg[col_sel], buf_row, col_sel});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_v <= '0; buf_neg <= '0; buf_row <= '0;
    end else if (rst_en) begin
      buf_v   <= rst_mask;
      buf_neg <= fire_neg[row_sel] & ~fire_pos[row_sel];
      buf_row <= row_sel;
    end else if (out_valid && out_ready) begin
      buf_v[col_sel] <= 1'b0;
    end
  end

  // a buffered event is held until taken
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_addr));
endmodule
