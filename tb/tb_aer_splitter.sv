// tb_aer_splitter: 1-to-3 splitting with independently stalling outputs.
// Every output must receive every input event exactly once and in order;
// the input must be acknowledged only after all outputs took the event.
module tb_aer_splitter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready;
  logic [15:0] in_addr = '0;
  logic [2:0] out_valid, out_ready = '0;
  logic [15:0] out_addr [3];
  int checks = 0, failures = 0;
  int sent [$];
  int pos [3] = '{0, 0, 0};
  int acked = 0;

  aer_splitter #(.N(3)) dut (.*);

  initial begin
    #500_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 3; i++)
      if (out_valid[i] && out_ready[i]) begin
        checks++;
        if (pos[i] >= sent.size() || int'(out_addr[i]) != sent[pos[i]]) begin
          failures++; $display("output %0d got %h out of order", i, out_addr[i]);
        end
        pos[i]++;
      end
    if (in_valid && in_ready) begin
      acked++;
      checks++;
      for (int i = 0; i < 3; i++)
        if (pos[i] + ((out_valid[i] && out_ready[i]) ? 0 : 0) < acked - 1) begin
          failures++; $display("input acknowledged before output %0d took it", i);
        end
    end
    for (int i = 0; i < 3; i++) out_ready[i] <= ($urandom_range(2) != 0);
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < 200; e++) begin
      in_addr = 16'($urandom); in_valid = 1;
      sent.push_back(int'(in_addr));
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk); in_valid = 0;
    end
    repeat (20) @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (pos[i] != 200) begin failures++; $display("output %0d got %0d events", i, pos[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
