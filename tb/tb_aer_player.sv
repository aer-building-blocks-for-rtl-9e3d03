// tb_aer_player: loads a timestamped sequence (some events at the same
// time, some far apart), plays it and checks that each event leaves at its
// timestamp when the bus is free, in order, and that a stalled bus delays
// later events, which are then counted as late.
module tb_aer_player;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ld_we = 0, start = 0, out_valid, out_ready = 1, done;
  logic [9:0] ld_idx = '0;
  logic [31:0] ld_ts = '0;
  logic [15:0] ld_addr = '0, out_addr, late;
  logic [10:0] count = '0;
  int checks = 0, failures = 0;
  longint cyc = 0, t_start = 0;
  int ts [50], ad [50];
  int k = 0;
  bit stall = 0;

  aer_player dut (.*);

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (k >= 50 || int'(out_addr) != ad[k] || (!stall && cyc - t_start != longint'(ts[k]))) begin
        failures++; $display("event %0d: %h at %0d, expected %h at %0d", k, out_addr, cyc - t_start, ad[k], ts[k]);
      end
      if (stall && cyc - t_start < longint'(ts[k])) begin failures++; $display("event %0d early", k); end
      k++;
    end
    cyc++;
  end

  initial begin
    int t = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      t += (i % 7 == 0) ? 0 : $urandom_range(1, 30);
      if (i > 0 && t <= ts[i-1]) t = ts[i-1] + 1;
      ts[i] = t; ad[i] = int'(16'($urandom));
      @(negedge clk); ld_we = 1; ld_idx = 10'(i); ld_ts = 32'(t); ld_addr = 16'(ad[i]);
    end
    @(negedge clk); ld_we = 0;
    start = 1; count = 11'd50;
    @(negedge clk); start = 0;
    t_start = cyc;
    while (!done) @(negedge clk);
    checks++;
    if (k != 50 || late != 0) begin failures++; $display("%0d events, %0d late", k, late); end
    // replay with the bus stalled for a while
    k = 0; stall = 1;
    start = 1; out_ready = 0;
    @(negedge clk); start = 0;
    t_start = cyc;
    repeat (100) @(negedge clk);
    out_ready = 1;
    while (!done) @(negedge clk);
    checks++;
    if (k != 50 || late == 0) begin failures++; $display("stalled replay: %0d events, %0d late", k, late); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
