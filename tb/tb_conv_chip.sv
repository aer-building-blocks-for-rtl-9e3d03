// tb_conv_chip: self-checking test of the convolution chip.
// Programs a random signed 4-bit 32x32 kernel, then sends events one at a
// time at random positions of a 64x64 retina (and a few far outside the
// array). A reference model in the testbench adds the kernel, centred on each
// event, to its own integrators, fires and resets every pixel at or beyond
// the threshold, and predicts the output events in burst order (row by row,
// lowest column first). Each event's busy time is checked against 2 + n_k
// cycles, n_k being the number of kernel rows that fall on the array.
module tb_conv_chip;
  localparam int N = 32, K = 32, KC = 16, OFF = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [15:0] in_addr = '0, out_addr;
  logic        kcfg_we = 0;
  logic [4:0]  kcfg_row = '0, kcfg_col = '0;
  logic signed [3:0] kcfg_w = '0;
  logic [6:0]  thresh = 7'd20;

  conv_chip dut (.*);

  int checks = 0, failures = 0;
  int kern [K][K];
  int v [N][N];
  int exp_q [$];
  int got_q [$];

  always @(posedge clk) if (rst_n && out_valid && out_ready) got_q.push_back(int'(out_addr));

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input int x, input int y);
    int yr, lo, hi, nk, busy;
    yr = y - OFF; lo = yr - KC; hi = lo + K - 1;
    if (lo < 0) lo = 0;
    if (hi > N - 1) hi = N - 1;
    nk = (hi >= lo) ? hi - lo + 1 : 0;
    @(negedge clk);
    in_addr = {2'b0, 7'(y), 7'(x)}; in_valid = 1;
    while (!in_ready) @(negedge clk);
    @(negedge clk); in_valid = 0;
    busy = 1;
    while (!in_ready) begin busy++; @(negedge clk); end
    checks++;
    if (busy != ((nk > 0) ? 2 + nk : 1)) begin
      failures++;
      $display("event (%0d,%0d): busy %0d cycles, expected %0d", x, y, busy, 2 + nk);
    end
    // reference integration
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int kr, kc;
        kr = r - yr + KC; kc = c - (x - OFF) + KC;
        if (kr >= 0 && kr < K && kc >= 0 && kc < K) begin
          v[r][c] += kern[kr][kc];
          if (v[r][c] > 127) v[r][c] = 127;
          if (v[r][c] < -127) v[r][c] = -127;
        end
      end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        if (v[r][c] >= int'(thresh) || v[r][c] <= -int'(thresh)) begin
          exp_q.push_back(((v[r][c] < 0) << 10) | (r << 5) | c);
          v[r][c] = 0;
        end
    repeat (N * N + 2 * N + 10) @(negedge clk);
    checks++;
    if (got_q.size() != exp_q.size()) begin
      failures++;
      $display("event (%0d,%0d): %0d output events, expected %0d", x, y, got_q.size(), exp_q.size());
      foreach (got_q[i]) $display("  got %h (model v=%0d)", got_q[i], v[(got_q[i] >> 5) & 31][got_q[i] & 31]);
    end else
      foreach (exp_q[i]) if (got_q[i] != exp_q[i]) begin
        failures++;
        $display("event (%0d,%0d): output %0d = %h, expected %h", x, y, i, got_q[i], exp_q[i]);
        break;
      end
    got_q.delete(); exp_q.delete();
  endtask

  initial begin
    int total = 0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) v[r][c] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < K; r++)
      for (int c = 0; c < K; c++) begin
        @(negedge clk);
        kern[r][c] = int'($urandom_range(15)) - 8;
        kcfg_we = 1; kcfg_row = 5'(r); kcfg_col = 5'(c); kcfg_w = 4'(kern[r][c]);
      end
    @(negedge clk); kcfg_we = 0;
    for (int e = 0; e < 40; e++)
      send($urandom_range(63), $urandom_range(63));
    send(120, 120);   // far outside: no kernel row on the array
    send(0, 0);       // corner of the input space
    send(127, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
