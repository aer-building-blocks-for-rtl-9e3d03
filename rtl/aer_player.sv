// aer_player: reproduces a recorded sequence of timestamped events in real
// time (the sequencer function of the USB-AER and PCI-AER boards).
// The host loads up to DEPTH records {timestamp, address} with ld_we /
// ld_idx / ld_ts / ld_addr, then pulses start with the record count in
// count. From start a cycle counter runs; record i is offered on the output
// once the counter has reached its timestamp (timestamps are counted from
// start and must not decrease). If the bus is stalled, later events go out
// as soon as it frees, keeping their order. 'done' is high when all records
// have been sent. 'late' counts events sent after their time.
module aer_player #(
  parameter int AW    = 16,
  parameter int TS_W  = 32,
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ld_we,
  input  logic [$clog2(DEPTH)-1:0] ld_idx,
  input  logic [TS_W-1:0]          ld_ts,
  input  logic [AW-1:0]            ld_addr,
  input  logic                     start,
  input  logic [$clog2(DEPTH):0]   count,
  output logic                     out_valid,
  output logic [AW-1:0]            out_addr,
  input  logic                     out_ready,
  output logic                     done,
  output logic [15:0]              late
);
  localparam int PB = $clog2(DEPTH);
  logic [TS_W-1:0] ts_mem   [DEPTH];
  logic [AW-1:0]   addr_mem [DEPTH];
  logic [PB:0]     idx, n;
  logic [TS_W-1:0] now;
  logic            running, due;

  always_ff @(posedge clk)
    if (ld_we) begin
      ts_mem[ld_idx]   <= ld_ts;
      addr_mem[ld_idx] <= ld_addr;
    end

  assign due       = running && (idx != n) && (now >= ts_mem[idx[PB-1:0]]);
  assign out_valid = due;
  assign out_addr  = addr_mem[idx[PB-1:0]];
  assign done      = !running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; idx <= '0; n <= '0; now <= '0; late <= '0;
    end else if (start) begin
      running <= (count != '0); idx <= '0; n <= count; now <= '0; late <= '0;
    end else if (running) begin
      now <= now + 1'b1;
      if (due && out_ready) begin
        if (now != ts_mem[idx[PB-1:0]]) late <= late + 1'b1;
        idx <= idx + 1'b1;
        if (idx + 1'b1 == n) running <= 1'b0;
      end
    end
  end
endmodule
