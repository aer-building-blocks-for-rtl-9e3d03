// delay_line_chip: one cascade of ELEMS delay elements, each a chain of
// STAGES monostables, that turns time into space: a pulse inserted at an
// element travels down the cascade, and every element it leaves sends an
// output event carrying that element's number.
// Each monostable is one bit of a shift register that advances once every
// MONO_CYCLES clocks, so a pulse needs STAGES * MONO_CYCLES clocks per element.
// An input event with address e (< ELEMS) inserts a pulse at the first
// monostable of element e at the next advance. Break bits, written through
// brk_we / brk_idx / brk_val and cleared by reset, interrupt the cascade
// after an element: its pulses then leave as events but go no further.
// Output: one flag per element holds a pending event; flags are sent lowest
// element first, one per cycle. A pulse that leaves an element whose flag is
// still set is merged with it and counted in 'dropped'.
// Sizes (880 elements of 16 monostables) are the chip's; the clocked shift
// register, the arbitration and the monostable time are this design's.
module delay_line_chip #(
  parameter int ELEMS       = 880,
  parameter int STAGES      = 16,
  parameter int MONO_CYCLES = 4,
  parameter int AW          = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [AW-1:0]            in_addr,
  output logic                     in_ready,
  output logic                     out_valid,
  output logic [AW-1:0]            out_addr,
  input  logic                     out_ready,
  input  logic                     brk_we,
  input  logic [$clog2(ELEMS)-1:0] brk_idx,
  input  logic                     brk_val,
  output logic [15:0]              dropped
);
  localparam int EB = $clog2(ELEMS);
  localparam int TB = (MONO_CYCLES > 1) ? $clog2(MONO_CYCLES) : 1;

  logic [STAGES-1:0] sr   [ELEMS];
  logic [ELEMS-1:0]  brk, inj, pend;
  logic [TB-1:0]     div;
  logic              tick;
  logic [EB-1:0]     sel;

  assign tick     = (div == TB'(MONO_CYCLES - 1));
  assign in_ready = 1'b1;

  always_comb begin
    sel = '0;
    for (int e = ELEMS - 1; e >= 0; e--) if (pend[e]) sel = EB'(e);
  end
  assign out_valid = (pend != '0);
  assign out_addr  = AW'(sel);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ELEMS; e++) sr[e] <= '0;
      brk <= '0; inj <= '0; pend <= '0; div <= '0; dropped <= '0;
    end else begin
      logic [ELEMS-1:0] p, n_inj;
      logic [15:0]      d;
      p = pend;
      d = dropped;
      n_inj = inj;
      if (out_valid && out_ready) p[sel] = 1'b0;
      div <= tick ? '0 : div + 1'b1;
      if (tick) begin
        for (int e = 0; e < ELEMS; e++) begin
          logic carry_in;
          carry_in = (e > 0) ? (sr[(e > 0) ? e - 1 : 0][STAGES-1] && !brk[(e > 0) ? e - 1 : 0]) : 1'b0;
          sr[e] <= {sr[e][STAGES-2:0], carry_in | inj[e]};
          if (sr[e][STAGES-1]) begin
            if (p[e]) d = d + 1'b1;
            p[e] = 1'b1;
          end
        end
        n_inj = '0;
      end
      if (in_valid && in_addr < AW'(ELEMS)) n_inj[in_addr[EB-1:0]] = 1'b1;
      inj <= n_inj;
      pend <= p;
      dropped <= d;
      if (brk_we) brk[brk_idx] <= brk_val;
    end
  end
endmodule
