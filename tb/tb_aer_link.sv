// tb_aer_link: sends random addresses through aer_tx, over the 4-phase
// req/ack bus, into aer_rx, with a randomly stalling consumer. Checks that
// every address arrives once and in order, that req only falls after ack
// has risen and that the address is stable while req is high.
module tb_aer_link;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, req, ack, out_valid, out_ready = 0;
  logic [15:0] in_addr = '0, addr, out_addr;
  int checks = 0, failures = 0;
  int sent [$];
  int nrecv = 0;

  aer_tx u_tx (.clk, .rst_n, .in_valid, .in_addr, .in_ready, .req, .ack, .addr);
  aer_rx u_rx (.clk, .rst_n, .req, .ack, .addr, .out_valid, .out_addr, .out_ready);

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // protocol rules of the 4-phase bus
  logic req_q = 0, ack_q = 0; logic [15:0] addr_q = '0;
  always @(posedge clk) if (rst_n) begin
    if (req_q && !req && !ack_q) begin failures++; $display("req fell before ack"); end
    if (req_q && req && addr != addr_q) begin failures++; $display("address changed under req"); end
    if (ack_q && !ack && req) begin failures++; $display("ack fell while req high"); end
    req_q <= req; ack_q <= ack; addr_q <= addr;
  end

  always @(posedge clk) if (rst_n) begin
    out_ready <= ($urandom_range(3) != 0);
    if (out_valid && out_ready) begin
      checks++;
      if (sent.size() == 0 || int'(out_addr) != sent[0]) begin
        failures++;
        $display("received %h, expected %h", out_addr, sent.size() ? sent[0] : -1);
      end
      if (sent.size()) void'(sent.pop_front());
      nrecv++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      in_addr = 16'($urandom); in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      sent.push_back(int'(in_addr));
      @(negedge clk); in_valid = 0;
      repeat ($urandom_range(3)) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    checks++;
    if (nrecv != 60) begin failures++; $display("received %0d events, expected 60", nrecv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
