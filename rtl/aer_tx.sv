// aer_tx: sends events from a synchronous valid/ready channel over a
// 4-phase (return-to-zero) AER request/acknowledge bus.
// For each event the address is driven and req raised; when ack is seen high
// (after a two-flop synchroniser) req is lowered, and when ack is seen low the
// next event may start. The input is accepted (in_ready) only in the idle
// phase, so an event costs at least the round trip of both handshake edges.
// The 4-phase protocol and active-high levels are this design's assumption;
// the chips name only Address, Rqst and Ack.
module aer_tx #(
  parameter int AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [AW-1:0] in_addr,
  output logic          in_ready,
  output logic          req,
  input  logic          ack,
  output logic [AW-1:0] addr
);
  typedef enum logic [1:0] {IDLE, WAIT_ACK_HI, WAIT_ACK_LO} st_t;
  st_t st;
  logic ack_s1, ack_s2;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) {ack_s2, ack_s1} <= '0;
    else        {ack_s2, ack_s1} <= {ack_s1, ack};

  assign in_ready = (st == IDLE) && !ack_s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; req <= 1'b0; addr <= '0;
    end else begin
      unique case (st)
        IDLE: if (in_valid && in_ready) begin
          addr <= in_addr; req <= 1'b1; st <= WAIT_ACK_HI;
        end
        WAIT_ACK_HI: if (ack_s2) begin
          req <= 1'b0; st <= WAIT_ACK_LO;
        end
        WAIT_ACK_LO: if (!ack_s2) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

  // 4-phase rules: req stays high until ack is seen, and the address is
  // stable while req is high
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    req && !ack_s2 |=> req);
  a_addr_stable: assert property (@(posedge clk) disable iff (!rst_n)
    req && $past(req) |-> $stable(addr));
endmodule
