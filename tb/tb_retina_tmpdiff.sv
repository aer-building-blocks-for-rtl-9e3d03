// tb_retina_tmpdiff: drives random log-intensity samples of random pixels
// (a few pixels often, so changes build up) and compares every event with a
// reference that keeps each pixel's last-event level: ON for a rise of at
// least the threshold, OFF for a fall, nothing otherwise; the first sample
// of a pixel only sets its level. A repeated static frame must be silent.
module tb_retina_tmpdiff;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pix_valid = 0, pix_ready, out_valid, out_ready = 1;
  logic [5:0] pix_x = '0, pix_y = '0;
  logic [7:0] pix_logi = '0, thresh = 8'd12;
  logic [15:0] out_addr;
  int checks = 0, failures = 0;
  int lvl [4096];
  bit seen [4096];
  int exp_q [$];
  int n_on = 0, n_off = 0;

  retina_tmpdiff dut (.*);

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || int'(out_addr) != exp_q[0]) begin
        failures++; $display("event %h, expected %h", out_addr, exp_q.size() ? exp_q[0] : -1);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
      if (out_addr[0]) n_on++; else n_off++;
    end
    out_ready <= ($urandom_range(3) != 0);
  end

  task automatic sample(input int x, input int y, input int li);
    int p;
    p = y * 64 + x;
    pix_x = 6'(x); pix_y = 6'(y); pix_logi = 8'(li); pix_valid = 1;
    @(posedge clk);
    while (!pix_ready) @(posedge clk);
    if (!seen[p]) begin seen[p] = 1; lvl[p] = li; end
    else if (li >= lvl[p] + int'(thresh)) begin exp_q.push_back((p << 1) | 1); lvl[p] = li; end
    else if (lvl[p] >= li + int'(thresh)) begin exp_q.push_back(p << 1); lvl[p] = li; end
    @(negedge clk); pix_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++)
      sample($urandom_range(7) * 9, $urandom_range(7) * 9, $urandom_range(255));
    repeat (10) @(negedge clk);
    // a static scene: the same values twice must give nothing the second time
    for (int i = 0; i < 64; i++) sample(i, 40, 100);
    repeat (10) @(negedge clk);
    begin
      int n_before;
      n_before = n_on + n_off;
      for (int i = 0; i < 64; i++) sample(i, 40, 100);
      repeat (10) @(negedge clk);
      checks++;
      if (n_on + n_off != n_before) begin failures++; $display("static scene produced events"); end
    end
    checks++;
    if (exp_q.size() != 0 || n_on == 0 || n_off == 0) begin
      failures++; $display("%0d missing, %0d ON, %0d OFF", exp_q.size(), n_on, n_off);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
