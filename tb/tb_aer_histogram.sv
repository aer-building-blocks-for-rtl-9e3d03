// tb_aer_histogram: random events pass through the histogram monitor; the
// bins are then read and compared with counts kept by the testbench
// (including saturation of a bin hit 300 times and the clearing by a read).
module tb_aer_histogram;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, rd_en = 0, busy;
  logic [15:0] in_addr = '0, out_addr;
  logic [10:0] rd_addr = '0;
  logic [7:0] rd_data;
  int checks = 0, failures = 0;
  int cnt [2048];

  aer_histogram dut (.*);

  initial begin
    #500_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && !busy && in_valid && in_ready) cnt[in_addr[10:0]]++;

  task automatic read_all();
    for (int a = 0; a < 2048; a++) begin
      @(negedge clk); rd_en = 1; rd_addr = 11'(a);
      @(negedge clk); rd_en = 0;
      checks++;
      if (int'(rd_data) != ((cnt[a] > 255) ? 255 : cnt[a])) begin
        failures++; $display("bin %0d = %0d, expected %0d", a, rd_data, cnt[a]);
      end
      cnt[a] = 0;
    end
  endtask

  initial begin
    foreach (cnt[i]) cnt[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    while (busy) @(negedge clk);
    for (int e = 0; e < 3000; e++) begin
      in_addr = (e % 10 == 0) ? 16'h0123 : 16'($urandom_range(2047)) | 16'h4000;
      in_valid = 1; out_ready = ($urandom_range(3) != 0);
      @(negedge clk);
    end
    in_valid = 0;
    read_all();
    read_all();   // all bins were cleared by the first pass
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
