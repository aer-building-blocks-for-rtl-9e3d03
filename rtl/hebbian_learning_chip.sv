// hebbian_learning_chip: behavioural stand-in for the competitive Hebbian
// learning chip: NEURONS neurons with SYN learning synapses each, weights
// held as 2**WLEV_BITS discrete levels (the multi-level memory).
// An input event {neuron, synapse} adds 1 + the synapse's weight level to the
// neuron's potential and marks the synapse as recently active. A neuron that
// reaches thresh fires: it sends an event with its number, every neuron's
// potential is reset (competition: one winner per round), and the winner
// learns: each of its recently active synapses moves one level up, each
// inactive one one level down (saturating). All activity marks then clear.
// Weights start at a fixed pattern, level (3n + 5s) mod 2**WLEV_BITS, so that
// neurons differ before learning.
// The sizes are the chip's; neuron model, learning rule and initial weights
// are this design's, since the chip's circuits are only referenced.
// Timing: one input event per cycle; after a firing the input waits until
// the output event has been taken.
module hebbian_learning_chip #(
  parameter int NEURONS   = 32,
  parameter int SYN       = 64,
  parameter int WLEV_BITS = 3,
  parameter int PBITS     = 10,
  parameter int AW        = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [AW-1:0]    in_addr,
  output logic             in_ready,
  output logic             out_valid,
  output logic [AW-1:0]    out_addr,
  input  logic             out_ready,
  input  logic [PBITS-1:0] thresh
);
  localparam int NB = $clog2(NEURONS);
  localparam int SB = $clog2(SYN);
  localparam logic [WLEV_BITS-1:0] WMAX = '1;

  logic [WLEV_BITS-1:0] w    [NEURONS][SYN];
  logic [SYN-1:0]       act  [NEURONS];
  logic [PBITS-1:0]     pot  [NEURONS];

  logic [NB-1:0] n_in;
  logic [SB-1:0] s_in;
  logic [PBITS:0] sum;

  assign n_in = in_addr[SB +: NB];
  assign s_in = in_addr[SB-1:0];
  assign sum  = {1'b0, pot[n_in]} + (PBITS+1)'(w[n_in][s_in]) + 1'b1;
  assign in_ready = !out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NEURONS; n++) begin
        pot[n] <= '0;
        act[n] <= '0;
        for (int s = 0; s < SYN; s++) w[n][s] <= WLEV_BITS'(3 * n + 5 * s);
      end
      out_valid <= 1'b0; out_addr <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready && in_addr[AW-1:SB+NB] == '0) begin
        if (sum >= {1'b0, thresh}) begin
          for (int s = 0; s < SYN; s++) begin
            logic a;
            a = act[n_in][s] || (SB'(s) == s_in);
            if (a && w[n_in][s] != WMAX) w[n_in][s] <= w[n_in][s] + 1'b1;
            if (!a && w[n_in][s] != '0)  w[n_in][s] <= w[n_in][s] - 1'b1;
          end
          for (int n = 0; n < NEURONS; n++) begin
            pot[n] <= '0;
            act[n] <= '0;
          end
          out_valid <= 1'b1;
          out_addr  <= AW'(n_in);
        end else begin
          pot[n_in]       <= sum[PBITS-1:0];
          act[n_in][s_in] <= 1'b1;
        end
      end
    end
  end
endmodule
