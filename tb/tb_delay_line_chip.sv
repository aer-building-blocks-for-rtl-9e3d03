// tb_delay_line_chip: full-size delay line (880 elements of 16 monostables).
// Inserts pulses at chosen elements and checks that every downstream element
// sends its event exactly STAGES * MONO_CYCLES cycles after the previous one
// (within one advance of the start), that a programmed break stops the
// pulse after its element, that the last element ends the cascade, and that
// two pulses in flight are both delivered. Address filtering: an address
// beyond the last element inserts nothing.
module tb_delay_line_chip;
  localparam int ELEMS = 880, STAGES = 16, MC = 4, T = STAGES * MC;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [15:0] in_addr = '0, out_addr, dropped;
  logic brk_we = 0, brk_val = 0;
  logic [9:0] brk_idx = '0;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint t_of [ELEMS];
  int hits [ELEMS];

  delay_line_chip dut (.*);

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid && out_ready) begin
      hits[out_addr] += 1;
      t_of[out_addr] = cyc;
    end
  end

  task automatic clear_log();
    foreach (hits[i]) begin hits[i] = 0; t_of[i] = 0; end
  endtask

  task automatic inject(input int e);
    @(negedge clk);
    in_addr = 16'(e); in_valid = 1;
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic set_break(input int e, input bit val);
    @(negedge clk);
    brk_we = 1; brk_idx = 10'(e); brk_val = val;
    @(negedge clk);
    brk_we = 0;
  endtask

  // pulse inserted at 'from' must appear at from .. to, one element per T
  task automatic expect_run(input int from, input int to);
    for (int e = 0; e < ELEMS; e++) begin
      int want;
      want = (e >= from && e <= to) ? 1 : 0;
      if (hits[e] != want) begin
        checks++; failures++;
        $display("element %0d: %0d events, expected %0d", e, hits[e], want);
      end
    end
    for (int e = from + 1; e <= to; e++) begin
      checks++;
      if (t_of[e] - t_of[e-1] != T) begin
        failures++; $display("element %0d: %0d cycles after %0d, expected %0d", e, t_of[e] - t_of[e-1], e - 1, T);
      end
    end
  endtask

  initial begin
    longint t0;
    foreach (hits[i]) begin hits[i] = 0; t_of[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1: a pulse at element 10 with a break after element 20
    set_break(20, 1);
    clear_log();
    inject(10);
    t0 = cyc;
    repeat (T * 14) @(negedge clk);
    expect_run(10, 20);
    checks++;
    if (t_of[10] - t0 < T - MC || t_of[10] - t0 > T + MC + 2) begin
      failures++; $display("first element after %0d cycles, expected about %0d", t_of[10] - t0, T);
    end
    // 2: break removed, a pulse runs to the end of the cascade
    set_break(20, 0);
    clear_log();
    inject(860);
    repeat (T * 25) @(negedge clk);
    expect_run(860, ELEMS - 1);
    // 3: two pulses in flight at once, one break between them
    set_break(400, 1);
    clear_log();
    inject(390);
    inject(395);
    repeat (T * 14) @(negedge clk);
    for (int e = 390; e <= 400; e++) begin
      checks++;
      if (hits[e] != ((e >= 395) ? 2 : 1)) begin failures++; $display("element %0d: %0d events", e, hits[e]); end
    end
    checks++;
    if (hits[401] != 0) begin failures++; $display("pulse passed the break"); end
    // 4: out-of-range address
    clear_log();
    inject(1000);
    repeat (T * 3) @(negedge clk);
    checks++;
    foreach (hits[i]) if (hits[i] != 0) begin failures++; $display("out-of-range address inserted a pulse"); break; end
    checks++;
    if (dropped != 0) begin failures++; $display("%0d events merged", dropped); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
