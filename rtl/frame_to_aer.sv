// frame_to_aer: turns a frame of pixel intensities into a rate-coded AER
// event stream in real time (the frames-to-AER function of the USB-AER
// board). The host writes intensities (fr_we / fr_x / fr_y / fr_i). While
// 'run' is high the pixels are scanned in raster order, one per cycle; each
// visit adds the pixel's intensity to its IBITS-bit phase accumulator, and a
// carry out sends one event {y, x, 1} in the retina's address format. A
// pixel of intensity I thus sends I events per 2**IBITS scans, evenly spread.
// The scan waits while an event is not taken. Raising 'run' first clears
// the accumulators (one per cycle). The accumulator method is this design's
// choice.
module frame_to_aer #(
  parameter int W     = 64,
  parameter int H     = 64,
  parameter int IBITS = 8,
  parameter int AW    = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 fr_we,
  input  logic [$clog2(W)-1:0] fr_x,
  input  logic [$clog2(H)-1:0] fr_y,
  input  logic [IBITS-1:0]     fr_i,
  input  logic                 run,
  output logic                 out_valid,
  output logic [AW-1:0]        out_addr,
  input  logic                 out_ready,
  output logic [31:0]          scans
);
  localparam int XB = $clog2(W);
  localparam int YB = $clog2(H);
  localparam int PB = XB + YB;

  logic [IBITS-1:0] inten [W*H];
  logic [IBITS-1:0] acc   [W*H];
  typedef enum logic [1:0] {STOP, CLEAR, SCAN} st_t;
  st_t st;
  logic [PB-1:0] p;
  logic [IBITS:0] s;

  assign s = {1'b0, acc[p]} + {1'b0, inten[p]};

  always_ff @(posedge clk) begin
    if (fr_we) inten[{fr_y, fr_x}] <= fr_i;
    if (st == CLEAR) acc[p] <= '0;
    else if (st == SCAN && !(out_valid && !out_ready)) acc[p] <= s[IBITS-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= STOP; p <= '0; out_valid <= 1'b0; out_addr <= '0; scans <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      unique case (st)
        STOP: if (run) begin st <= CLEAR; p <= '0; scans <= '0; end
        CLEAR: begin
          p <= p + 1'b1;
          if (p == PB'(W*H - 1)) st <= SCAN;
        end
        SCAN: if (!(out_valid && !out_ready)) begin
          if (s[IBITS]) begin
            out_valid <= 1'b1;
            out_addr  <= AW'({p, 1'b1});
          end
          p <= p + 1'b1;
          if (p == PB'(W*H - 1)) scans <= scans + 1'b1;
          if (!run) st <= STOP;
        end
        default: st <= STOP;
      endcase
    end
  end
endmodule
