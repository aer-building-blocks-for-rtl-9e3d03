// aer_merger: the AER-switch board used as an N-to-1 merger (N = 2..4).
// A round-robin arbiter grants one requesting input per cycle; the granted
// event is passed on combinationally with the input port number written into
// address bits [TAG_LSB +: 2], so that a following mapper can tell the
// sources apart. The priority pointer moves past an input once its event has
// been taken, so no input can be starved. Round-robin and tagging are this
// design's choice.
module aer_merger #(
  parameter int N       = 2,
  parameter int AW      = 16,
  parameter int TAG_LSB = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  in_valid,
  input  logic [AW-1:0] in_addr [N],
  output logic [N-1:0]  in_ready,
  output logic          out_valid,
  output logic [AW-1:0] out_addr,
  input  logic          out_ready
);
  localparam int TAG_W = 2;   // room for up to four inputs
  localparam int SEL_W = (N > 1) ? $clog2(N) : 1;
  logic [SEL_W-1:0] last, gnt;
  logic             any;

  always_comb begin
    any = 1'b0;
    gnt = '0;
    // search from last+1 round to last
    for (int k = 1; k <= N; k++) begin
      int idx;
      idx = (int'(last) + k) % N;
      if (!any && in_valid[idx]) begin
        any = 1'b1;
        gnt = SEL_W'(idx);
      end
    end
    out_valid = any;
    out_addr  = in_addr[gnt];
    out_addr[TAG_LSB +: TAG_W] = TAG_W'(gnt);
    in_ready  = '0;
    in_ready[gnt] = any && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= SEL_W'(N - 1);
    else if (any && out_ready) last <= gnt;
  end
endmodule
