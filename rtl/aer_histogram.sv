// aer_histogram: pass-through bus monitor that histograms events into a
// frame (the "AER to frames" function of the USB-AER board, used to view
// the convolution outputs).
// Events pass from input to output unchanged. Each event that passes adds
// one to the bin of its low ADDR_BITS address bits (saturating at CW bits).
// The host reads a bin with rd_en / rd_addr; rd_data is valid the next
// cycle, and the bin is cleared by the read, so one pass over all bins reads
// out a frame and starts the next. An event hitting the bin being read in
// the same cycle is kept (the bin restarts at 1).
// After reset all bins are cleared, one per cycle, while busy is high.
// Bin count and width are this design's choice.
module aer_histogram #(
  parameter int AW        = 16,
  parameter int ADDR_BITS = 11,
  parameter int CW        = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [AW-1:0]        in_addr,
  output logic                 in_ready,
  output logic                 out_valid,
  output logic [AW-1:0]        out_addr,
  input  logic                 out_ready,
  input  logic                 rd_en,
  input  logic [ADDR_BITS-1:0] rd_addr,
  output logic [CW-1:0]        rd_data,
  output logic                 busy
);
  localparam int BINS = 2 ** ADDR_BITS;
  logic [CW-1:0]        hist [BINS];
  logic [ADDR_BITS-1:0] clr;
  logic                 fire;
  logic [ADDR_BITS-1:0] ia;
  logic [CW-1:0]        cur;

  assign out_valid = in_valid;
  assign out_addr  = in_addr;
  assign in_ready  = out_ready;
  assign fire      = in_valid && out_ready && !busy;
  assign ia        = in_addr[ADDR_BITS-1:0];
  assign cur       = hist[ia];

  always_ff @(posedge clk) begin
    if (busy) hist[clr] <= '0;
    else begin
      if (rd_en) begin
        rd_data <= hist[rd_addr];
        hist[rd_addr] <= '0;
      end
      if (fire) begin
        if (rd_en && rd_addr == ia) hist[ia] <= CW'(1);
        else if (cur != '1)         hist[ia] <= cur + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b1; clr <= '0;
    end else if (busy) begin
      clr <= clr + 1'b1;
      if (clr == '1) busy <= 1'b0;
    end
  end
endmodule
