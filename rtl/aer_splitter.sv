// aer_splitter: the AER-switch board used as a 1-to-N splitter (N = 2..4).
// Each input event is offered to every output at once. An output that has
// taken the event sets its 'done' flag and is not offered it again; the input
// is acknowledged in the cycle in which the last outstanding output takes it,
// so a slow output stalls the input bus but never receives duplicates.
// Timing: with all outputs ready an event passes in the cycle it arrives
// (combinational path from in_valid to out_valid, from out_ready to in_ready).
module aer_splitter #(
  parameter int N  = 3,
  parameter int AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [AW-1:0] in_addr,
  output logic          in_ready,
  output logic [N-1:0]  out_valid,
  output logic [AW-1:0] out_addr [N],
  input  logic [N-1:0]  out_ready
);
  logic [N-1:0] done;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      out_valid[i] = in_valid && !done[i];
      out_addr[i]  = in_addr;
    end
    in_ready = &(done | out_ready);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done <= '0;
    else if (in_valid) begin
      if (in_ready) done <= '0;
      else          done <= done | (out_valid & out_ready);
    end
  end

  // no output is offered an event it has already taken
  a_no_duplicate: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid & done) == '0);
endmodule
