// tb_wta_object_chip: random input spikes, biased towards a few neurons in
// each of the four feature maps, are sent to the object chip first with the
// competition across maps off and then on. A reference model of the
// integrate-and-fire network (map-wide reset by the first inhibitory neuron,
// self-excitation of the winner, second-layer counters) predicts every output
// event, and the test checks that winners and both kinds of inhibitory
// events occurred.
module tb_wta_object_chip;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, global_en = 0;
  logic [15:0] in_addr = '0, out_addr;
  logic [7:0] w_exc = 8'd10, thresh = 8'd50, self_exc = 8'd20, inh2_thresh = 8'd3;
  int checks = 0, failures = 0;
  int v [256];
  int inh2 [4];
  int exp_q [$];
  int n_win = 0, n_inh1 = 0, n_inh2 = 0;

  wta_object_chip dut (.*);

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int map_of(int n);
    return ((n >> 7) & 1) * 2 + ((n >> 3) & 1);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || int'(out_addr) != exp_q[0]) begin
        failures++; $display("out %h, expected %h", out_addr, exp_q.size() ? exp_q[0] : -1);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
      if (out_addr[8] && out_addr[2]) n_inh2++;
      else if (out_addr[8]) n_inh1++;
      else n_win++;
    end
    out_ready <= ($urandom_range(3) != 0);
  end

  // competition across maps off
  task automatic spike(input int n);
    int m;
    m = map_of(n);
    in_addr = 16'(n); in_valid = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    if (v[n] + int'(w_exc) >= int'(thresh)) begin
      for (int k = 0; k < 256; k++) if (map_of(k) == m) v[k] = 0;
      v[n] = int'(self_exc);
      exp_q.push_back(n);
      exp_q.push_back(256 | m);
    end else v[n] += int'(w_exc);
    @(negedge clk); in_valid = 0;
  endtask

  // competition across maps on: second-layer firings follow, lowest map first
  task automatic spike_l2(input int n);
    int m, fired [$];
    m = map_of(n);
    in_addr = 16'(n); in_valid = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    if (v[n] + int'(w_exc) >= int'(thresh)) begin
      for (int k = 0; k < 256; k++) if (map_of(k) == m) v[k] = 0;
      v[n] = int'(self_exc);
      exp_q.push_back(n);
      exp_q.push_back(256 | m);
      for (int j = 0; j < 4; j++) begin
        if (j == m) inh2[j] = 0;
        else if (inh2[j] + 1 >= int'(inh2_thresh)) begin
          inh2[j] = 0;
          fired.push_back(j);
          for (int k = 0; k < 256; k++) if (map_of(k) == j) v[k] = 0;
        end else inh2[j]++;
      end
      foreach (fired[i]) exp_q.push_back(256 | 4 | fired[i]);
    end else v[n] += int'(w_exc);
    @(negedge clk); in_valid = 0;
  endtask

  function automatic int pick();
    int m, lx, ly, r;
    m = $urandom_range(3);
    r = $urandom_range(9);
    // neuron (2,3) of each map gets most input, (5,5) some, others rarely
    if (r < 6)      begin lx = 2; ly = 3; end
    else if (r < 9) begin lx = 5; ly = 5; end
    else            begin lx = $urandom_range(7); ly = $urandom_range(7); end
    if (m == 3 && r < 8) m = 2;   // map 3 quiet, map 2 strongest
    return (((m >> 1) * 8 + ly) << 4) | ((m & 1) * 8 + lx);
  endfunction

  initial begin
    foreach (v[i]) v[i] = 0;
    foreach (inh2[i]) inh2[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int e = 0; e < 1500; e++) spike(pick());
    global_en = 1;
    for (int e = 0; e < 1500; e++) spike_l2(pick());
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_win == 0 || n_inh1 == 0 || n_inh2 == 0) begin
      failures++;
      $display("%0d missing; winners %0d, inh1 %0d, inh2 %0d", exp_q.size(), n_win, n_inh1, n_inh2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
