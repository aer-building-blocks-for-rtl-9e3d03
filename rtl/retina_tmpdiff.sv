// retina_tmpdiff: behavioural model of the 64 x 64 temporal-contrast
// silicon retina. Behavioural: the analog pixel (log photoreceptor,
// switched-capacitor change amplifier, ON/OFF comparators) is replaced by
// log-intensity samples given as numbers, one pixel per sample.
// Each pixel remembers the log intensity at its last event. A sample that
// has risen by at least 'thresh' since then gives an ON event, one that has
// fallen by at least 'thresh' an OFF event, and the remembered level is set
// to the sample (the change amplifier is rebalanced after each event); a
// smaller change gives nothing, so a static scene is silent. The first sample
// of a pixel after reset only sets its level.
// Address out: {3'b0, y[5:0], x[5:0], on}. A sample is taken when pix_ready
// is high; an event is offered the next cycle and held until taken. After
// reset the pixel memory is cleared, one pixel per cycle (pix_ready low).
module retina_tmpdiff #(
  parameter int W      = 64,
  parameter int H      = 64,
  parameter int LOGI_W = 8,
  parameter int AW     = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pix_valid,
  input  logic [$clog2(W)-1:0] pix_x,
  input  logic [$clog2(H)-1:0] pix_y,
  input  logic [LOGI_W-1:0]    pix_logi,
  output logic                 pix_ready,
  input  logic [LOGI_W-1:0]    thresh,
  output logic                 out_valid,
  output logic [AW-1:0]        out_addr,
  input  logic                 out_ready
);
  localparam int PB = $clog2(W) + $clog2(H);
  typedef struct packed {
    logic              seen;
    logic [LOGI_W-1:0] level;
  } pix_t;

  pix_t          mem [W*H];
  logic          clearing;
  logic [PB-1:0] clr;
  logic [PB-1:0] pidx;
  pix_t          cur;
  logic          on_ev, off_ev;

  assign pidx      = {pix_y, pix_x};
  assign cur       = mem[pidx];
  assign pix_ready = !clearing && (!out_valid || out_ready);
  assign on_ev  = cur.seen && ({1'b0, pix_logi} >= {1'b0, cur.level} + {1'b0, thresh});
  assign off_ev = cur.seen && ({1'b0, cur.level} >= {1'b0, pix_logi} + {1'b0, thresh});

  always_ff @(posedge clk) begin
    if (clearing) mem[clr] <= '0;
    else if (pix_valid && pix_ready && (!cur.seen || on_ev || off_ev))
      mem[pidx] <= '{seen: 1'b1, level: pix_logi};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b1; clr <= '0; out_valid <= 1'b0; out_addr <= '0;
    end else begin
      if (clearing) begin
        clr <= clr + 1'b1;
        if (clr == PB'(W*H - 1)) clearing <= 1'b0;
      end
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (pix_valid && pix_ready && (on_ev || off_ev)) begin
        out_valid <= 1'b1;
        out_addr  <= AW'({pix_y, pix_x, on_ev});
      end
    end
  end
endmodule
