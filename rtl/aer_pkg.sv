// aer_pkg: address formats shared by every AER bus of the vision chain.
// Every bus carries one 16-bit address per event (the width of the retina's
// off-chip bus). The bit layout of each address space below is this design's
// own choice; the sizes (64x64 retina with ON/OFF, 128x128 convolution input
// space, 32x32 signed convolution output, 16x16 object chip in four 8x8 maps,
// 880 delay elements, 32 neurons x 64 synapses) follow the chips described.
package aer_pkg;
  localparam int AER_W = 16;
  typedef logic [AER_W-1:0] aer_addr_t;

  // Retina: {3'b0, y[5:0], x[5:0], on}
  function automatic aer_addr_t retina_addr(logic [5:0] x, logic [5:0] y, logic on);
    return {3'b000, y, x, on};
  endfunction

  // Convolution chip input: {2'b0, y[6:0], x[6:0]} (128x128 input space)
  function automatic aer_addr_t conv_in_addr(logic [6:0] x, logic [6:0] y);
    return {2'b00, y, x};
  endfunction

  // Convolution chip output: {5'b0, neg, y[4:0], x[4:0]}
  function automatic aer_addr_t conv_out_addr(logic [4:0] x, logic [4:0] y, logic neg);
    return {5'b00000, neg, y, x};
  endfunction

  // Merger writes the number of its input port into these bits
  localparam int MERGE_TAG_LSB = 14;

  // Object chip: neurons {8'b0, y[3:0], x[3:0]}; feature map = {y[3], x[3]}.
  // Inhibitory neurons: {7'b0, 1'b1, 5'b0, layer, map[1:0]}
  localparam int OBJ_INH_BIT = 8;
  function automatic aer_addr_t obj_addr(logic [3:0] x, logic [3:0] y);
    return {8'h00, y, x};
  endfunction

  // Learning chip input: {5'b0, neuron[4:0], syn[5:0]}; output {11'b0, neuron}
  function automatic aer_addr_t learn_addr(logic [4:0] neuron, logic [5:0] syn);
    return {5'b00000, neuron, syn};
  endfunction
endpackage
