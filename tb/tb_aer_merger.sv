// tb_aer_merger: two sources send random events into a 2-to-1 merger with
// a stalling consumer. Each merged event must carry its source's number in
// bits [15:14] and its other bits unchanged, per-source order must be kept,
// and while both sources wait the grants must alternate (round robin).
module tb_aer_merger;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] in_valid = '0, in_ready;
  logic [15:0] in_addr [2];
  logic out_valid, out_ready = 1;
  logic [15:0] out_addr;
  int checks = 0, failures = 0;
  int q [2][$];
  int got [2] = '{0, 0};
  int last = -1;
  int alternations = 0;

  aer_merger #(.N(2)) dut (.*);

  initial begin
    #500_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      int s;
      s = int'(out_addr[15:14]);
      checks++;
      if (s > 1 || q[s].size() == 0 || out_addr[13:0] != 14'(q[s][0])) begin
        failures++; $display("merged %h not expected", out_addr);
      end else void'(q[s].pop_front());
      if (s <= 1) got[s]++;
      if (&in_valid) begin
        checks++;
        if (s == last) begin failures++; $display("source %0d granted twice while both wait", s); end
        alternations++;
      end
      last = s;
    end
    out_ready <= ($urandom_range(3) != 0);
  end

  for (genvar s = 0; s < 2; s++) begin : g_src
    initial begin
      in_addr[s] = '0;
      repeat (3) @(negedge clk);
      for (int e = 0; e < 100; e++) begin
        in_addr[s] = 16'($urandom); in_valid[s] = 1;
        q[s].push_back(int'(in_addr[s][13:0]));
        @(posedge clk);
        while (!in_ready[s]) @(posedge clk);
        @(negedge clk); in_valid[s] = 0;
        if (s == 1) repeat ($urandom_range(2)) @(negedge clk);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2000) @(negedge clk);
    checks++;
    if (got[0] != 100 || got[1] != 100 || alternations == 0) begin
      failures++; $display("got %0d/%0d events, %0d contested grants", got[0], got[1], alternations);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
