// tb_hebbian_learning_chip: presents a repeated spatio-temporal pattern
// (three synapses of every neuron, as a delay-line mapper would) mixed with
// random background spikes. A reference model of the neurons and of the
// learning rule predicts every output spike. After training the pattern is
// presented alone: it must still make neurons fire, and every neuron that
// wins it must, on average, hold the pattern's synapses at least three levels
// above its other synapses.
module tb_hebbian_learning_chip;
  localparam int NN = 32, NS = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [15:0] in_addr = '0, out_addr;
  logic [9:0] thresh = 10'd20;
  int checks = 0, failures = 0;
  int w [NN][NS];
  int pot [NN];
  bit act [NN][NS];
  int exp_q [$];
  int wins [NN];
  bit recall = 0;
  int recall_wins [$];

  hebbian_learning_chip dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || int'(out_addr) != exp_q[0]) begin
        failures++; $display("spike from %0d, expected %0d", out_addr, exp_q.size() ? exp_q[0] : -1);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
    end
    out_ready <= ($urandom_range(3) != 0);
  end

  task automatic spike(input int n, input int s);
    in_addr = 16'((n << 6) | s); in_valid = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    if (pot[n] + w[n][s] + 1 >= int'(thresh)) begin
      for (int k = 0; k < NS; k++) begin
        bit a;
        a = act[n][k] || k == s;
        if (a && w[n][k] < 7) w[n][k]++;
        if (!a && w[n][k] > 0) w[n][k]--;
      end
      foreach (pot[i]) pot[i] = 0;
      foreach (act[i, k]) act[i][k] = 0;
      exp_q.push_back(n);
      wins[n]++;
      if (recall) recall_wins.push_back(n);
    end else begin
      pot[n] += w[n][s] + 1;
      act[n][s] = 1;
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    int pat [3] = '{4, 17, 42};
    foreach (w[n, s]) w[n][s] = (3 * n + 5 * s) % 8;
    foreach (pot[i]) pot[i] = 0;
    foreach (act[i, k]) act[i][k] = 0;
    foreach (wins[i]) wins[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 150; r++) begin
      foreach (pat[p]) for (int n = 0; n < NN; n++) spike(n, pat[p]);
      for (int b = 0; b < 20; b++) spike($urandom_range(NN - 1), $urandom_range(NS - 1));
    end
    // recall: the pattern alone, several times
    recall = 1;
    for (int r = 0; r < 12; r++)
      foreach (pat[p]) for (int n = 0; n < NN; n++) spike(n, pat[p]);
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d spikes missing", exp_q.size()); end
    checks++;
    if (recall_wins.size() < 5) begin failures++; $display("only %0d recall spikes", recall_wins.size()); end
    begin
      real wp = 0, wo = 0;
      int np = 0, no = 0;
      foreach (recall_wins[i])
        for (int k = 0; k < NS; k++)
          if (k == pat[0] || k == pat[1] || k == pat[2]) begin wp += dut.w[recall_wins[i]][k]; np++; end
          else begin wo += dut.w[recall_wins[i]][k]; no++; end
      if (np > 0) begin wp = wp / np; wo = wo / no; end
      checks++;
      if (wp < wo + 3.0) begin
        failures++; $display("recall winners: pattern synapses at %f, others at %f", wp, wo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
