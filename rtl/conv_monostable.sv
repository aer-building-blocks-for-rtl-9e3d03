// conv_monostable: produces the integration pulse of the convolution chip.
// A trigger starts a pulse that stays high for exactly PULSE clock cycles,
// starting the cycle after the trigger; 'last' marks its final cycle. The
// fixed pulse duration is the chip's; expressing it in clock cycles (default
// one) is this design's choice. A trigger during a pulse restarts it.
module conv_monostable #(
  parameter int PULSE = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trig,
  output logic pulse,
  output logic last
);
  localparam int CW = $clog2(PULSE + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)           cnt <= '0;
    else if (trig)        cnt <= CW'(PULSE);
    else if (cnt != '0)   cnt <= cnt - 1'b1;

  assign pulse = (cnt != '0);
  assign last  = (cnt == CW'(1));
endmodule
