// aer_rx: receives a 4-phase (return-to-zero) AER request/acknowledge bus and
// presents each event on a synchronous valid/ready channel.
// req is synchronised with two flip-flops; on its rising edge the address,
// stable while req is high, is captured and offered as out_valid. When the
// consumer takes it, ack is raised; when req falls, ack is lowered. Only one
// event is in flight, so the sender is throttled by the consumer.
// The protocol and active-high levels are this design's assumption.
module aer_rx #(
  parameter int AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  output logic          ack,
  input  logic [AW-1:0] addr,
  output logic          out_valid,
  output logic [AW-1:0] out_addr,
  input  logic          out_ready
);
  typedef enum logic [1:0] {IDLE, HOLD, ACKED} st_t;
  st_t st;
  logic req_s1, req_s2;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) {req_s2, req_s1} <= '0;
    else        {req_s2, req_s1} <= {req_s1, req};

  assign out_valid = (st == HOLD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; ack <= 1'b0; out_addr <= '0;
    end else begin
      unique case (st)
        IDLE: if (req_s2) begin
          out_addr <= addr; st <= HOLD;
        end
        HOLD: if (out_ready) begin
          ack <= 1'b1; st <= ACKED;
        end
        ACKED: if (!req_s2) begin
          ack <= 1'b0; st <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

  // ack only rises after a request and only falls after the request is gone
  a_ack_rise: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(ack) |-> $past(req_s2));
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_addr));
endmodule
