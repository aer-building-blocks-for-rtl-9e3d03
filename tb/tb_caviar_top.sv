// tb_caviar_top: end-to-end run of the whole chain at its default sizes.
// The host programs the four mappers as in the demonstration system:
//   piece 3  drops the retina polarity and moves addresses into the
//            convolution chips' 128 x 128 input space;
//   piece 11 keeps positive convolution events, subsamples 32 x 32 to 8 x 8
//            and sends chip 5 to feature map 0 and chip 6 to feature map 1;
//   piece 14 sends object-chip winners in the left half of a map to delay
//            line element 0 and the right half to element 10 (breaks after
//            elements 9 and 19 make two separate lines);
//   piece 16 fans taps 0, 4, 9, 10, 14, 19 out to synapses 0..5 of all 32
//            learning neurons.
// Two ring-shaped kernels of different radius go into the convolution chips.
// A bright square then moves across the retina, left to right, and back.
// Checks: the capture monitor after the splitter holds exactly the mapped
// retina events; the object chip's monitor holds exactly its output events;
// the histograms hold the convolution chips' outputs; the learning chip's
// spikes arrive over the 4-phase bus; and each mechanism happened at least
// once: ON and OFF retina events, mapper discard and fan-out, splitter stall,
// positive and negative convolution events, merger contention, winners,
// first- and second-layer inhibition (competition across maps is switched on
// halfway), delay-line events at every tap, and learning-chip spikes.
// The player and frame generator beside the chain are run as well.
module tb_caviar_top;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic busy, pix_valid = 0, pix_ready;
  logic [5:0] pix_x = '0, pix_y = '0;
  logic [7:0] pix_logi = '0, retina_thresh = 8'd40;
  logic [1:0] map_sel = '0;
  logic map_we1 = 0, map_we2 = 0;
  logic [15:0] map_addr = '0;
  logic [22:0] map_data = '0;
  logic k_sel = 0, k_we = 0;
  logic [4:0] k_row = '0, k_col = '0;
  logic signed [3:0] k_w = '0;
  logic [6:0] conv_thresh = 7'd12;
  logic [7:0] wta_w_exc = 8'd16, wta_thresh = 8'd48, wta_self_exc = 8'd16, wta_inh2_thresh = 8'd2;
  logic wta_global_en = 0;
  logic dl_brk_we = 0, dl_brk_val = 0;
  logic [9:0] dl_brk_idx = '0;
  logic [15:0] dl_dropped;
  logic [9:0] learn_thresh = 10'd12;
  logic learn_req, learn_ack = 0;
  logic [15:0] learn_bus_addr;
  logic mon7_rd = 0, mon7_valid, mon13_rd = 0, mon13_valid;
  logic [31:0] mon7_ts, mon13_ts;
  logic [15:0] mon7_addr, mon7_overflow, mon13_addr, mon13_overflow;
  logic hist_rd = 0;
  logic [10:0] hist_addr = '0;
  logic [7:0] hist8_data, hist9_data;
  logic pl_we = 0, pl_start = 0, pl_valid, pl_ready = 1, pl_done;
  logic [9:0] pl_idx = '0;
  logic [31:0] pl_ts = '0;
  logic [15:0] pl_addr_in = '0, pl_addr, pl_late;
  logic [10:0] pl_count = '0;
  logic fg_we = 0, fg_run = 0, fg_valid, fg_ready = 1;
  logic [5:0] fg_x = '0, fg_y = '0;
  logic [7:0] fg_i = '0;
  logic [15:0] fg_addr;
  logic [31:0] fg_scans;

  caviar_top dut (.*);

  int checks = 0, failures = 0;
  int n_on = 0, n_off = 0, n_map_drop = 0, n_fanout = 0, n_split_stall = 0;
  int n_cpos = 0, n_cneg = 0, n_contend = 0, n_win = 0, n_inh1 = 0, n_inh2 = 0;
  int n_learn = 0, n_pl = 0, n_fg = 0, n_c5 = 0, n_c6 = 0;
  int dl_tap [20];
  int exp7 [$];
  int exp13 [$];

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- observers on the links between pieces
  always @(posedge clk) if (rst_n) begin
    if (dut.ret_v && dut.ret_r) begin
      if (dut.ret_a[0]) n_on++; else n_off++;
      exp7.push_back({2'b00, 7'(dut.ret_a[12:7]) + 7'd0, 7'(dut.ret_a[6:1])});
    end
    if (dut.u_map11.st == dut.u_map11.LOOKUP && dut.u_map11.ent.cnt == '0) n_map_drop++;
    if (dut.u_map16.st == dut.u_map16.EMIT && dut.u_map16.remain > 1 && dut.m16_r) n_fanout++;
    if (dut.m3_v && !dut.m3_r) n_split_stall++;
    if (dut.c5_v && dut.c5_r) begin n_c5++; if (dut.c5_a[10]) n_cneg++; else n_cpos++; end
    if (dut.c6_v && dut.c6_r) begin n_c6++; if (dut.c6_a[10]) n_cneg++; else n_cpos++; end
    if (&dut.mg_v) n_contend++;
    if (dut.o_v && dut.o_r) begin
      exp13.push_back(int'(dut.o_a));
      if (!dut.o_a[8]) n_win++;
      else if (dut.o_a[2]) n_inh2++;
      else n_inh1++;
    end
    if (dut.d_v && dut.d_r && dut.d_a < 20) dl_tap[dut.d_a]++;
    if (pl_valid && pl_ready) n_pl++;
    if (fg_valid && fg_ready) n_fg++;
  end

  // host side of the learning chip's 4-phase output bus
  always @(posedge clk) if (rst_n) begin
    if (learn_req && !learn_ack) begin
      learn_ack <= 1;
      n_learn++;
      checks++;
      if (learn_bus_addr > 16'd31) begin failures++; $display("learning chip sent %h", learn_bus_addr); end
    end else if (!learn_req && learn_ack) learn_ack <= 0;
  end

  // host reads capture monitor 7 continuously and compares
  always @(posedge clk) if (rst_n) begin
    mon7_rd <= 1;
    if (mon7_rd && mon7_valid) begin
      checks++;
      if (exp7.size() == 0 || int'(mon7_addr) != exp7[0]) begin
        failures++; $display("monitor 7 captured %h, expected %h", mon7_addr, exp7.size() ? exp7[0] : -1);
      end
      if (exp7.size()) void'(exp7.pop_front());
    end
    mon13_rd <= 1;
    if (mon13_rd && mon13_valid) begin
      checks++;
      if (exp13.size() == 0 || int'(mon13_addr) != exp13[0]) begin
        failures++; $display("monitor 13 captured %h, expected %h", mon13_addr, exp13.size() ? exp13[0] : -1);
      end
      if (exp13.size()) void'(exp13.pop_front());
    end
  end

  task automatic map_in(input int sel, input int a, input int cnt, input int ptr);
    @(negedge clk);
    map_sel = 2'(sel); map_we1 = 1; map_addr = 16'(a); map_data = {7'(cnt), 16'(ptr)};
    @(negedge clk); map_we1 = 0;
  endtask
  task automatic map_out(input int sel, input int p, input int a);
    @(negedge clk);
    map_sel = 2'(sel); map_we2 = 1; map_addr = 16'(p); map_data = 23'(a);
    @(negedge clk); map_we2 = 0;
  endtask

  task automatic frame(input int cx, input int cy);
    for (int y = cy - 3; y <= cy + 8; y++)
      for (int x = cx - 3; x <= cx + 8; x++) begin
        if (x < 0 || x > 63 || y < 0 || y > 63) continue;
        @(negedge clk);
        pix_x = 6'(x); pix_y = 6'(y); pix_valid = 1;
        pix_logi = (x >= cx && x < cx + 6 && y >= cy && y < cy + 6) ? 8'd200 : 8'd60;
        @(posedge clk); while (!pix_ready) @(posedge clk);
        @(negedge clk); pix_valid = 0;
      end
  endtask

  int hist_total8 = 0, hist_total9 = 0;

  initial begin
    foreach (dl_tap[i]) dl_tap[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    while (busy) @(negedge clk);
    // piece 3: retina {y,x,pol} -> conv input {y,x}; output table index = y*64+x
    for (int p = 0; p < 4096; p++) map_out(0, p, (p / 64) * 128 + (p % 64));
    for (int a = 0; a < 8192; a++) map_in(0, a, 1, a >> 1);
    // piece 11: merged conv output {tag, neg, y, x} -> object chip
    for (int m = 0; m < 2; m++)
      for (int q = 0; q < 64; q++) map_out(1, m * 64 + q, ((q / 8) << 4) | (m * 8 + q % 8));
    for (int m = 0; m < 2; m++)
      for (int a = 0; a < 1024; a++)
        map_in(1, (m << 14) | a, 1, m * 64 + ((a >> 5) / 4) * 8 + (a % 32) / 4);
    // piece 14: object winners -> delay line element 0 (left) or 10 (right)
    map_out(2, 0, 0);
    map_out(2, 1, 10);
    for (int a = 0; a < 256; a++) map_in(2, a, 1, ((a % 8) >= 4) ? 1 : 0);
    // piece 16: taps -> synapses 0..5 of all 32 learning neurons
    begin
      int taps [6] = '{0, 4, 9, 10, 14, 19};
      foreach (taps[s]) begin
        for (int n = 0; n < 32; n++) map_out(3, s * 32 + n, (n << 6) | s);
        map_in(3, taps[s], 32, s * 32);
      end
    end
    // delay line: two lines, 0..9 and 10..19
    @(negedge clk); dl_brk_we = 1; dl_brk_idx = 10'd9;  dl_brk_val = 1;
    @(negedge clk); dl_brk_idx = 10'd19;
    @(negedge clk); dl_brk_we = 0;
    // kernels: positive ring of radius ~2 (chip 5) and ~4 (chip 6), negative outside
    for (int c = 0; c < 2; c++)
      for (int r = 0; r < 32; r++)
        for (int q = 0; q < 32; q++) begin
          int d2, rad;
          rad = c ? 4 : 2;
          d2 = (r - 16) * (r - 16) + (q - 16) * (q - 16);
          @(negedge clk);
          k_sel = c[0]; k_we = 1; k_row = 5'(r); k_col = 5'(q);
          k_w = (d2 <= (rad + 1) * (rad + 1)) ? 4'sd3 : (d2 <= (rad + 3) * (rad + 3)) ? -4'sd1 : 4'sd0;
        end
    @(negedge clk); k_we = 0;
    // stimulus: left to right, then back with competition across maps
    for (int f = 0; f < 40; f++) frame(8 + f, 28);
    wta_global_en = 1;
    for (int f = 39; f >= 0; f--) frame(8 + f, 28);
    repeat (5000) @(negedge clk);
    // histograms: read all bins of both monitors
    for (int a = 0; a < 2048; a++) begin
      @(negedge clk); hist_rd = 1; hist_addr = 11'(a);
      @(negedge clk); hist_rd = 0;
      hist_total8 += int'(hist8_data); hist_total9 += int'(hist9_data);
    end
    checks++;
    if (hist_total8 != n_c5 || hist_total9 != n_c6) begin
      failures++; $display("histograms %0d/%0d, convolution events %0d/%0d", hist_total8, hist_total9, n_c5, n_c6);
    end
    // injection functions beside the chain
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); pl_we = 1; pl_idx = 10'(i); pl_ts = 32'(i * 10); pl_addr_in = 16'(i);
    end
    @(negedge clk); pl_we = 0; pl_start = 1; pl_count = 11'd8;
    @(negedge clk); pl_start = 0;
    for (int p = 0; p < 4096; p++) begin
      @(negedge clk); fg_we = 1; fg_x = 6'(p % 64); fg_y = 6'(p / 64); fg_i = (p == 4 * 64 + 3) ? 8'd128 : 8'd0;
    end
    @(negedge clk); fg_we = 0; fg_run = 1;
    repeat (4096 * 13 + 100) @(negedge clk);   // clear, then 12 scans
    fg_run = 0;
    while (!pl_done) @(negedge clk);
    repeat (10) @(negedge clk);
    // every mechanism must have happened
    begin
      int counts [19];
      string names [19];
      counts = '{n_on, n_off, n_map_drop, n_fanout, n_split_stall, n_cpos, n_cneg, n_contend,
                 n_win, n_inh1, n_inh2, dl_tap[0], dl_tap[4], dl_tap[9], dl_tap[10], dl_tap[19],
                 n_learn, n_pl, n_fg};
      names = '{"retina ON", "retina OFF", "mapper discard", "mapper fan-out", "splitter stall",
                "conv positive", "conv negative", "merger contention", "WTA winner",
                "inhibitory layer 1", "inhibitory layer 2", "delay tap 0", "delay tap 4",
                "delay tap 9", "delay tap 10", "delay tap 19", "learning spike",
                "player event", "frame-to-AER event"};
      foreach (counts[i]) begin
        checks++;
        $display("%-20s %0d", names[i], counts[i]);
        if (counts[i] == 0) begin failures++; $display("  never happened"); end
      end
      checks++;
      if (n_fg != 6 || n_pl != 8) begin failures++; $display("frame generator %0d events (6 expected), player %0d", n_fg, n_pl); end
      checks++;
      if (exp7.size() != 0 || exp13.size() != 0 || mon7_overflow != 0 || mon13_overflow != 0) begin
        failures++; $display("monitors: %0d/%0d records not captured", exp7.size(), exp13.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
