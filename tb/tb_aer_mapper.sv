// tb_aer_mapper: programs random remapping lists (0 to 4 output addresses
// per input address, so discards, plain remaps and fan-out all occur), then
// sends random events under a randomly stalling consumer and compares the
// output stream with the expected concatenation of lists.
module tb_aer_mapper;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, busy;
  logic cfg_we1 = 0, cfg_we2 = 0;
  logic [15:0] in_addr = '0, out_addr, cfg_addr = '0;
  logic [22:0] cfg_data = '0;
  int checks = 0, failures = 0;
  int exp_q [$];
  int cnt [200];
  int lst [200][4];

  aer_mapper dut (.*);

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || int'(out_addr) != exp_q[0]) begin
        failures++;
        $display("out %h, expected %h", out_addr, exp_q.size() ? exp_q[0] : -1);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
    end
    out_ready <= ($urandom_range(4) != 0);
  end

  initial begin
    int ptr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    while (busy) @(negedge clk);
    for (int a = 0; a < 200; a++) begin
      cnt[a] = $urandom_range(4) > 0 ? $urandom_range(4) : 0;
      for (int j = 0; j < cnt[a]; j++) begin
        lst[a][j] = int'(16'($urandom));
        cfg_we2 = 1; cfg_addr = 16'(ptr + j); cfg_data = 23'(lst[a][j]);
        @(negedge clk);
      end
      cfg_we2 = 0;
      cfg_we1 = 1; cfg_addr = 16'(a * 97 + 3); cfg_data = {7'(cnt[a]), 16'(ptr)};
      @(negedge clk);
      cfg_we1 = 0;
      ptr += cnt[a];
    end
    for (int e = 0; e < 300; e++) begin
      int a;
      a = $urandom_range(199);
      in_addr = 16'(a * 97 + 3); in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      for (int j = 0; j < cnt[a]; j++) exp_q.push_back(lst[a][j]);
      @(negedge clk); in_valid = 0;
    end
    // an address never written must be discarded
    in_addr = 16'hFFFE; in_valid = 1;
    @(posedge clk); while (!in_ready) @(posedge clk);
    @(negedge clk); in_valid = 0;
    repeat (50) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d events missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
