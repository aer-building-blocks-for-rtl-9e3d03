// aer_monitor: pass-through bus monitor that captures timestamped events
// (the capture function of the USB-AER and PCI-AER boards).
// Events pass from input to output unchanged (combinational valid/ready).
// Each event that passes is written, with the value of a free-running cycle
// counter, into a DEPTH-entry FIFO that the host drains through rd_en /
// rd_valid / rd_ts / rd_addr (show-ahead: the head entry is visible while
// rd_valid is high; rd_en pops it). When the FIFO is full the event still
// passes and 'overflow' counts the lost capture. The monitor never stalls
// the bus. FIFO depth and timestamp width are this design's choice.
module aer_monitor #(
  parameter int AW    = 16,
  parameter int TS_W  = 32,
  parameter int DEPTH = 1024
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [AW-1:0]   in_addr,
  output logic            in_ready,
  output logic            out_valid,
  output logic [AW-1:0]   out_addr,
  input  logic            out_ready,
  input  logic            rd_en,
  output logic            rd_valid,
  output logic [TS_W-1:0] rd_ts,
  output logic [AW-1:0]   rd_addr,
  output logic [15:0]     overflow
);
  localparam int PB = $clog2(DEPTH);
  typedef struct packed {
    logic [TS_W-1:0] ts;
    logic [AW-1:0]   addr;
  } rec_t;

  rec_t          fifo [DEPTH];
  logic [PB:0]   wp, rp;
  logic [TS_W-1:0] now;
  logic          fire, full, pop;

  assign out_valid = in_valid;
  assign out_addr  = in_addr;
  assign in_ready  = out_ready;
  assign fire      = in_valid && out_ready;
  assign full      = (wp - rp) == (PB+1)'(DEPTH);
  assign rd_valid  = (wp != rp);
  assign pop       = rd_en && rd_valid;
  assign rd_ts     = fifo[rp[PB-1:0]].ts;
  assign rd_addr   = fifo[rp[PB-1:0]].addr;

  always_ff @(posedge clk)
    if (fire && !full) fifo[wp[PB-1:0]] <= '{ts: now, addr: in_addr};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; now <= '0; overflow <= '0;
    end else begin
      now <= now + 1'b1;
      if (fire) begin
        if (!full) wp <= wp + 1'b1;
        else       overflow <= overflow + 1'b1;
      end
      if (pop) rp <= rp + 1'b1;
    end
  end
endmodule
