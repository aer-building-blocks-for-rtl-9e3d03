// aer_mapper: look-up-table address remapper of the USB-AER board.
// Two tables: the input table, indexed by the incoming address, holds
// {count, pointer}; the output table, indexed by pointer .. pointer+count-1,
// holds the addresses to emit. An input address with count 0 is discarded,
// count 1 is a plain remap, larger counts fan one event out to many (as needed
// to feed one delay-line tap to the same synapse of every learning neuron).
// Timing: an accepted event is looked up in the next cycle, then one output
// event per cycle while out_ready is high. After reset the mapper clears its
// input table, one entry per cycle, and holds busy high (no input accepted,
// configuration writes ignored) for TAB_DEPTH cycles.
// Configuration: cfg_we1 writes input-table entry cfg_addr with
// {count, pointer} = cfg_data[CNT_W+AW-1:0]; cfg_we2 writes output-table entry
// cfg_addr with address cfg_data[AW-1:0].
// The look-up-table remapping is the board's function; the two-level table
// and its sizes are this design's choice.
module aer_mapper #(
  parameter int AW        = 16,
  parameter int TAB_DEPTH = 65536,
  parameter int CNT_W     = 7
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [AW-1:0]       in_addr,
  output logic                in_ready,
  output logic                out_valid,
  output logic [AW-1:0]       out_addr,
  input  logic                out_ready,
  input  logic                cfg_we1,
  input  logic                cfg_we2,
  input  logic [AW-1:0]       cfg_addr,
  input  logic [CNT_W+AW-1:0] cfg_data,
  output logic                busy
);
  localparam int TW = $clog2(TAB_DEPTH);
  typedef struct packed {
    logic [CNT_W-1:0] cnt;
    logic [AW-1:0]    ptr;
  } entry_t;

  entry_t          in_tab  [TAB_DEPTH];
  logic [AW-1:0]   out_tab [TAB_DEPTH];

  typedef enum logic [1:0] {CLEAR, IDLE, LOOKUP, EMIT} st_t;
  st_t st;
  logic [TW-1:0]    clr_idx;
  logic [AW-1:0]    lat_addr;
  logic [CNT_W-1:0] remain;
  logic [AW-1:0]    ptr;
  entry_t           ent;

  assign busy     = (st == CLEAR);
  assign in_ready = (st == IDLE);
  assign ent      = in_tab[lat_addr[TW-1:0]];
  assign out_valid = (st == EMIT);
  assign out_addr  = out_tab[ptr[TW-1:0]];

  // table writes: clear sweep or host configuration
  always_ff @(posedge clk) begin
    if (st == CLEAR)
      in_tab[clr_idx] <= '0;
    else if (cfg_we1)
      in_tab[cfg_addr[TW-1:0]] <= entry_t'(cfg_data);
    if (cfg_we2 && st != CLEAR)
      out_tab[cfg_addr[TW-1:0]] <= cfg_data[AW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= CLEAR; clr_idx <= '0; lat_addr <= '0; remain <= '0; ptr <= '0;
    end else begin
      unique case (st)
        CLEAR: begin
          clr_idx <= clr_idx + 1'b1;
          if (clr_idx == TW'(TAB_DEPTH - 1)) st <= IDLE;
        end
        IDLE: if (in_valid) begin
          lat_addr <= in_addr; st <= LOOKUP;
        end
        LOOKUP: begin
          ptr    <= ent.ptr;
          remain <= ent.cnt;
          st     <= (ent.cnt == '0) ? IDLE : EMIT;
        end
        EMIT: if (out_ready) begin
          ptr    <= ptr + 1'b1;
          remain <= remain - 1'b1;
          if (remain == CNT_W'(1)) st <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

  // an offered output event is held until taken
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_addr));
endmodule
