// tb_aer_monitor: events pass through a capture monitor (DEPTH reduced to
// 16 so the overflow path is reached). Checks that the bus is passed through
// untouched, that captured records come out in order with the cycle count of
// their transfer as timestamp, and that events beyond a full FIFO are
// counted as overflow.
module tb_aer_monitor;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, rd_en = 0, rd_valid;
  logic [15:0] in_addr = '0, out_addr, rd_addr, overflow;
  logic [31:0] rd_ts;
  int checks = 0, failures = 0;
  longint cyc = 0;
  int ts_q [$], ad_q [$];

  aer_monitor #(.DEPTH(16)) dut (.*);

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      ts_q.push_back(int'(cyc)); ad_q.push_back(int'(in_addr));
    end
    if (rd_en && rd_valid) begin
      checks++;
      if (ts_q.size() == 0 || int'(rd_ts) != ts_q[0] || int'(rd_addr) != ad_q[0]) begin
        failures++; $display("record %h@%0d, expected %h@%0d", rd_addr, rd_ts, ad_q[0], ts_q[0]);
      end
      void'(ts_q.pop_front()); void'(ad_q.pop_front());
    end
    cyc++;
  end
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (out_valid != in_valid || out_addr != in_addr || in_ready != out_ready) begin
      failures++; $display("bus not passed through");
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // 10 events with gaps, then drain while more arrive
    for (int e = 0; e < 10; e++) begin
      in_addr = 16'($urandom); in_valid = 1; out_ready = ($urandom_range(1) == 1);
      @(negedge clk); in_valid = 0; out_ready = 1;
      repeat ($urandom_range(3)) @(negedge clk);
    end
    rd_en = 1;
    repeat (20) @(negedge clk);
    rd_en = 0;
    // 20 back-to-back events into the 16-entry FIFO: 4 are lost
    for (int e = 0; e < 20; e++) begin
      in_addr = 16'($urandom); in_valid = 1;
      @(negedge clk);
    end
    in_valid = 0;
    while (ts_q.size() > 16) begin void'(ts_q.pop_back()); void'(ad_q.pop_back()); end
    rd_en = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (overflow != 16'd4 || ts_q.size() != 0) begin
      failures++; $display("overflow %0d, %0d records unread", overflow, ts_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
