// wta_object_chip: the competition ('object') chip, as a digital model of
// its integrate-and-fire network. MAPS feature maps of SIDE x SIDE excitatory
// neurons are laid out as one (2*SIDE) x (2*SIDE) array; map = {y[msb], x[msb]}.
// Each input event adds w_exc to the addressed neuron's membrane. A neuron
// that reaches thresh fires: it sends an event, its map's first global
// inhibitory neuron fires too (sending an inhibitory event) and resets every
// neuron of that map (hard winner-take-all), after which the winner starts
// again from self_exc (self-excitation, the hysteresis that favours the
// current winner).
// Second layer (global_en = 1): each map also has a second inhibitory
// neuron that counts the first-layer inhibitory spikes of the other maps and
// is cleared by its own map's; at inh2_thresh it fires, sends an event and
// resets its map, so only the most active map keeps firing. With
// global_en = 0 every map competes on its own.
// Addresses in: {y[3:0], x[3:0]}. Out: the same for neurons; inhibitory
// neurons {1, 5'b0, layer, map[1:0]} in bits [8:0].
// Timing: an input event is taken in one cycle when nothing fires; a firing
// event then sends its output events one per cycle (neuron, first
// inhibitory, then any second-layer ones) before the next input is taken.
// The network structure is the chip's; the digital membrane arithmetic,
// reset-style inhibition and address layout are this design's choices.
module wta_object_chip #(
  parameter int SIDE  = 8,
  parameter int MAPS  = 4,
  parameter int VBITS = 8,
  parameter int AW    = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [AW-1:0]    in_addr,
  output logic             in_ready,
  output logic             out_valid,
  output logic [AW-1:0]    out_addr,
  input  logic             out_ready,
  input  logic [VBITS-1:0] w_exc,
  input  logic [VBITS-1:0] thresh,
  input  logic [VBITS-1:0] self_exc,
  input  logic             global_en,
  input  logic [VBITS-1:0] inh2_thresh
);
  localparam int SB  = $clog2(SIDE);      // bits of a coordinate within a map
  localparam int CB  = SB + 1;            // bits of a chip coordinate
  localparam int NN  = 4 * SIDE * SIDE;   // neurons on the 2x2 map layout
  localparam int MB  = 2;

  logic [VBITS-1:0] v    [NN];
  logic [VBITS-1:0] inh2 [MAPS];

  typedef enum logic [1:0] {IDLE, EMIT_N, EMIT_I1, EMIT_I2} st_t;
  st_t st;
  logic [2*CB-1:0]  win;        // {y, x} of the firing neuron
  logic [MB-1:0]    win_map;
  logic [MAPS-1:0]  i2_pend;
  logic [MB-1:0]    i2_sel;

  logic [CB-1:0]    ix, iy;
  logic [MB-1:0]    imap;
  logic [VBITS:0]   sum;
  logic             fire;

  function automatic logic [MB-1:0] map_of(logic [2*CB-1:0] yx);
    return {yx[2*CB-1], yx[CB-1]};
  endfunction

  always_comb begin
    ix   = in_addr[CB-1:0];
    iy   = in_addr[2*CB-1:CB];
    imap = {iy[CB-1], ix[CB-1]};
    sum  = {1'b0, v[{iy, ix}]} + {1'b0, w_exc};
    fire = (sum >= {1'b0, thresh});
    in_ready = (st == IDLE);
  end

  always_comb begin
    i2_sel = '0;
    for (int m = MAPS - 1; m >= 0; m--) if (i2_pend[m]) i2_sel = MB'(m);
  end

  always_comb begin
    unique case (st)
      EMIT_N:  begin out_valid = 1'b1; out_addr = AW'(win); end
      EMIT_I1: begin out_valid = 1'b1; out_addr = AW'({1'b1, 5'b0, 1'b0, win_map}); end
      EMIT_I2: begin out_valid = 1'b1; out_addr = AW'({1'b1, 5'b0, 1'b1, i2_sel}); end
      default: begin out_valid = 1'b0; out_addr = '0; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NN; n++) v[n] <= '0;
      for (int m = 0; m < MAPS; m++) inh2[m] <= '0;
      st <= IDLE; win <= '0; win_map <= '0; i2_pend <= '0;
    end else begin
      unique case (st)
        IDLE: if (in_valid && int'(imap) < MAPS) begin
          if (!fire) begin
            v[{iy, ix}] <= sum[VBITS-1:0];
          end else begin
            logic [MAPS-1:0] p;
            // first-layer inhibition: reset the whole map, winner keeps self_exc
            for (int n = 0; n < NN; n++)
              if (map_of((2*CB)'(n)) == imap) v[n] <= '0;
            v[{iy, ix}] <= self_exc;
            win <= {iy, ix}; win_map <= imap;
            // second layer
            p = '0;
            if (global_en) begin
              for (int m = 0; m < MAPS; m++) begin
                if (MB'(m) == imap) inh2[m] <= '0;
                else if (inh2[m] + 1'b1 >= inh2_thresh) begin
                  inh2[m] <= '0;
                  p[m] = 1'b1;
                  for (int n = 0; n < NN; n++)
                    if (map_of((2*CB)'(n)) == MB'(m)) v[n] <= '0;
                end else inh2[m] <= inh2[m] + 1'b1;
              end
            end
            i2_pend <= p;
            st <= EMIT_N;
          end
        end
        EMIT_N:  if (out_ready) st <= EMIT_I1;
        EMIT_I1: if (out_ready) st <= (i2_pend != '0) ? EMIT_I2 : IDLE;
        EMIT_I2: if (out_ready) begin
          logic [MAPS-1:0] rest;
          rest = i2_pend;
          rest[i2_sel] = 1'b0;
          i2_pend <= rest;
          if (rest == '0) st <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
