// tb_frame_to_aer: writes a small test frame (W = H = 8) of varied
// intensities, runs the generator for 256 full scans and checks that every
// pixel sent exactly as many events as its intensity (the rate code), with
// the bus occasionally stalled.
module tb_frame_to_aer;
  localparam int W = 8, H = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic fr_we = 0, run = 0, out_valid, out_ready = 1;
  logic [2:0] fr_x = '0, fr_y = '0;
  logic [7:0] fr_i = '0;
  logic [15:0] out_addr;
  logic [31:0] scans;
  int checks = 0, failures = 0;
  int inten [W*H], got [W*H];

  frame_to_aer #(.W(W), .H(H)) dut (.*);

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (out_addr[0] != 1'b1 || out_addr[15:7] != '0) begin
      checks++; failures++; $display("bad address %h", out_addr);
    end
    got[out_addr[6:1]]++;
  end

  initial begin
    foreach (got[i]) got[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < W*H; p++) begin
      inten[p] = (p == 0) ? 0 : (p == 1) ? 255 : (p == 2) ? 1 : $urandom_range(255);
      @(negedge clk); fr_we = 1; fr_x = 3'(p % W); fr_y = 3'(p / W); fr_i = 8'(inten[p]);
    end
    @(negedge clk); fr_we = 0; run = 1;
    while (scans < 32'd256) begin
      @(negedge clk);
      out_ready = ($urandom_range(7) != 0);
    end
    run = 0; out_ready = 1;
    repeat (5) @(negedge clk);
    for (int p = 0; p < W*H; p++) begin
      checks++;
      if (got[p] != inten[p]) begin failures++; $display("pixel %0d: %0d events, intensity %0d", p, got[p], inten[p]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
