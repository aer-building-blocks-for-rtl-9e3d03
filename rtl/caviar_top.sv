// caviar_top: the complete multi-chip AER vision chain, numbered as its
// pieces:  2 retina -> 3 mapper -> 4 splitter -> {7 capture monitor,
// 5 convolution chip, 6 convolution chip}; 5 -> 8 histogram monitor,
// 6 -> 9 histogram monitor; 8, 9 -> 10 merger -> 11 mapper -> 12 object chip
// -> 13 capture monitor -> 14 mapper -> 15 delay line chip -> 16 mapper
// -> 17 learning chip.
// The retina's off-chip bus and the learning chip's output are 4-phase
// request/acknowledge AER buses (aer_tx / aer_rx); every other link is a
// synchronous valid/ready channel carrying a 16-bit address. The visual
// stimulus enters as log-intensity samples of single pixels (pix_*).
// Host configuration: the four mappers share one write port (map_sel picks
// 0: piece 3, 1: piece 11, 2: piece 14, 3: piece 16); kernels are written per
// convolution chip (k_sel); thresholds and the object chip's competition
// mode are plain inputs; 'busy' is high while mappers and histograms clear
// their tables after reset. The capture monitors and histograms are read by
// the host through their own ports.
// Beside the chain, and not connected to it, stand the two injection
// functions of the interface boards: a timestamped sequence player and a
// frames-to-AER generator, each with its own output bus.
// The chain and its piece numbers follow the demonstration system; the
// address formats and the configuration interface are this design's own.
module caviar_top
  import aer_pkg::*;
#(
  parameter int MAP_DEPTH = 65536
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        busy,
  // stimulus for the retina
  input  logic        pix_valid,
  input  logic [5:0]  pix_x,
  input  logic [5:0]  pix_y,
  input  logic [7:0]  pix_logi,
  output logic        pix_ready,
  input  logic [7:0]  retina_thresh,
  // mapper tables
  input  logic [1:0]  map_sel,
  input  logic        map_we1,
  input  logic        map_we2,
  input  logic [15:0] map_addr,
  input  logic [22:0] map_data,
  // convolution chips
  input  logic        k_sel,
  input  logic        k_we,
  input  logic [4:0]  k_row,
  input  logic [4:0]  k_col,
  input  logic signed [3:0] k_w,
  input  logic [6:0]  conv_thresh,
  // object chip
  input  logic [7:0]  wta_w_exc,
  input  logic [7:0]  wta_thresh,
  input  logic [7:0]  wta_self_exc,
  input  logic        wta_global_en,
  input  logic [7:0]  wta_inh2_thresh,
  // delay line chip
  input  logic        dl_brk_we,
  input  logic [9:0]  dl_brk_idx,
  input  logic        dl_brk_val,
  output logic [15:0] dl_dropped,
  // learning chip
  input  logic [9:0]  learn_thresh,
  output logic        learn_req,
  input  logic        learn_ack,
  output logic [15:0] learn_bus_addr,
  // capture monitors 7 (retina side) and 13 (object chip)
  input  logic        mon7_rd,
  output logic        mon7_valid,
  output logic [31:0] mon7_ts,
  output logic [15:0] mon7_addr,
  output logic [15:0] mon7_overflow,
  input  logic        mon13_rd,
  output logic        mon13_valid,
  output logic [31:0] mon13_ts,
  output logic [15:0] mon13_addr,
  output logic [15:0] mon13_overflow,
  // histogram monitors 8 and 9 (convolution outputs)
  input  logic        hist_rd,
  input  logic [10:0] hist_addr,
  output logic [7:0]  hist8_data,
  output logic [7:0]  hist9_data,
  // sequence player
  input  logic        pl_we,
  input  logic [9:0]  pl_idx,
  input  logic [31:0] pl_ts,
  input  logic [15:0] pl_addr_in,
  input  logic        pl_start,
  input  logic [10:0] pl_count,
  output logic        pl_valid,
  output logic [15:0] pl_addr,
  input  logic        pl_ready,
  output logic        pl_done,
  output logic [15:0] pl_late,
  // frames-to-AER generator
  input  logic        fg_we,
  input  logic [5:0]  fg_x,
  input  logic [5:0]  fg_y,
  input  logic [7:0]  fg_i,
  input  logic        fg_run,
  output logic        fg_valid,
  output logic [15:0] fg_addr,
  input  logic        fg_ready,
  output logic [31:0] fg_scans
);
  // retina and its 4-phase bus
  logic      ret_v, ret_r;  aer_addr_t ret_a;
  logic      rbus_req, rbus_ack; aer_addr_t rbus_addr;
  logic      rx_v, rx_r;    aer_addr_t rx_a;
  // mappers
  logic      m3_v, m3_r;    aer_addr_t m3_a;
  logic      m11_v, m11_r;  aer_addr_t m11_a;
  logic      m14_v, m14_r;  aer_addr_t m14_a;
  logic      m16_v, m16_r;  aer_addr_t m16_a;
  logic [3:0] map_busy;
  // splitter
  logic [2:0] sp_v, sp_r;   aer_addr_t sp_a [3];
  // convolution chips and histograms
  logic      c5_v, c5_r, c6_v, c6_r;  aer_addr_t c5_a, c6_a;
  logic [1:0] mg_v, mg_r;   aer_addr_t mg_a [2];
  logic [1:0] hist_busy;
  logic      mg_ov, mg_or;  aer_addr_t mg_oa;
  // object chip, monitor 13, delay line, learning chip
  logic      o_v, o_r;      aer_addr_t o_a;
  logic      mo_v, mo_r;    aer_addr_t mo_a;
  logic      d_v, d_r;      aer_addr_t d_a;
  logic      l_v, l_r;      aer_addr_t l_a;
  logic      m7_v;          aer_addr_t m7_a;

  assign busy = (|map_busy) || (|hist_busy);

  // 2: retina
  retina_tmpdiff u_retina (
    .clk, .rst_n, .pix_valid, .pix_x, .pix_y, .pix_logi, .pix_ready,
    .thresh(retina_thresh), .out_valid(ret_v), .out_addr(ret_a), .out_ready(ret_r));

  aer_tx u_ret_tx (.clk, .rst_n, .in_valid(ret_v), .in_addr(ret_a), .in_ready(ret_r),
                   .req(rbus_req), .ack(rbus_ack), .addr(rbus_addr));
  aer_rx u_m3_rx (.clk, .rst_n, .req(rbus_req), .ack(rbus_ack), .addr(rbus_addr),
                  .out_valid(rx_v), .out_addr(rx_a), .out_ready(rx_r));

  // 3: mapper (drops polarity, retina -> convolution input space)
  aer_mapper #(.TAB_DEPTH(MAP_DEPTH)) u_map3 (
    .clk, .rst_n, .in_valid(rx_v), .in_addr(rx_a), .in_ready(rx_r),
    .out_valid(m3_v), .out_addr(m3_a), .out_ready(m3_r),
    .cfg_we1(map_we1 && map_sel == 2'd0), .cfg_we2(map_we2 && map_sel == 2'd0),
    .cfg_addr(map_addr), .cfg_data(map_data), .busy(map_busy[0]));

  // 4: 1-to-3 splitter
  aer_splitter #(.N(3)) u_split (
    .clk, .rst_n, .in_valid(m3_v), .in_addr(m3_a), .in_ready(m3_r),
    .out_valid(sp_v), .out_addr(sp_a), .out_ready(sp_r));

  // 7: capture monitor of the retina stream (end point)
  aer_monitor u_mon7 (
    .clk, .rst_n, .in_valid(sp_v[0]), .in_addr(sp_a[0]), .in_ready(sp_r[0]),
    .out_valid(m7_v), .out_addr(m7_a), .out_ready(1'b1),
    .rd_en(mon7_rd), .rd_valid(mon7_valid), .rd_ts(mon7_ts), .rd_addr(mon7_addr),
    .overflow(mon7_overflow));

  // 5, 6: convolution chips
  conv_chip u_conv5 (
    .clk, .rst_n, .in_valid(sp_v[1]), .in_addr(sp_a[1]), .in_ready(sp_r[1]),
    .out_valid(c5_v), .out_addr(c5_a), .out_ready(c5_r),
    .kcfg_we(k_we && !k_sel), .kcfg_row(k_row), .kcfg_col(k_col), .kcfg_w(k_w),
    .thresh(conv_thresh));
  conv_chip u_conv6 (
    .clk, .rst_n, .in_valid(sp_v[2]), .in_addr(sp_a[2]), .in_ready(sp_r[2]),
    .out_valid(c6_v), .out_addr(c6_a), .out_ready(c6_r),
    .kcfg_we(k_we && k_sel), .kcfg_row(k_row), .kcfg_col(k_col), .kcfg_w(k_w),
    .thresh(conv_thresh));

  // 8, 9: histogram monitors
  aer_histogram u_hist8 (
    .clk, .rst_n, .in_valid(c5_v), .in_addr(c5_a), .in_ready(c5_r),
    .out_valid(mg_v[0]), .out_addr(mg_a[0]), .out_ready(mg_r[0]),
    .rd_en(hist_rd), .rd_addr(hist_addr), .rd_data(hist8_data), .busy(hist_busy[0]));
  aer_histogram u_hist9 (
    .clk, .rst_n, .in_valid(c6_v), .in_addr(c6_a), .in_ready(c6_r),
    .out_valid(mg_v[1]), .out_addr(mg_a[1]), .out_ready(mg_r[1]),
    .rd_en(hist_rd), .rd_addr(hist_addr), .rd_data(hist9_data), .busy(hist_busy[1]));

  // 10: merger
  aer_merger #(.N(2), .TAG_LSB(MERGE_TAG_LSB)) u_merge (
    .clk, .rst_n, .in_valid(mg_v), .in_addr(mg_a), .in_ready(mg_r),
    .out_valid(mg_ov), .out_addr(mg_oa), .out_ready(mg_or));

  // 11: mapper (convolution outputs -> object chip feature maps)
  aer_mapper #(.TAB_DEPTH(MAP_DEPTH)) u_map11 (
    .clk, .rst_n, .in_valid(mg_ov), .in_addr(mg_oa), .in_ready(mg_or),
    .out_valid(m11_v), .out_addr(m11_a), .out_ready(m11_r),
    .cfg_we1(map_we1 && map_sel == 2'd1), .cfg_we2(map_we2 && map_sel == 2'd1),
    .cfg_addr(map_addr), .cfg_data(map_data), .busy(map_busy[1]));

  // 12: object chip
  wta_object_chip u_obj (
    .clk, .rst_n, .in_valid(m11_v), .in_addr(m11_a), .in_ready(m11_r),
    .out_valid(o_v), .out_addr(o_a), .out_ready(o_r),
    .w_exc(wta_w_exc), .thresh(wta_thresh), .self_exc(wta_self_exc),
    .global_en(wta_global_en), .inh2_thresh(wta_inh2_thresh));

  // 13: capture monitor (pass-through)
  aer_monitor u_mon13 (
    .clk, .rst_n, .in_valid(o_v), .in_addr(o_a), .in_ready(o_r),
    .out_valid(mo_v), .out_addr(mo_a), .out_ready(mo_r),
    .rd_en(mon13_rd), .rd_valid(mon13_valid), .rd_ts(mon13_ts), .rd_addr(mon13_addr),
    .overflow(mon13_overflow));

  // 14: mapper (object chip -> delay line inputs)
  aer_mapper #(.TAB_DEPTH(MAP_DEPTH)) u_map14 (
    .clk, .rst_n, .in_valid(mo_v), .in_addr(mo_a), .in_ready(mo_r),
    .out_valid(m14_v), .out_addr(m14_a), .out_ready(m14_r),
    .cfg_we1(map_we1 && map_sel == 2'd2), .cfg_we2(map_we2 && map_sel == 2'd2),
    .cfg_addr(map_addr), .cfg_data(map_data), .busy(map_busy[2]));

  // 15: delay line chip
  delay_line_chip u_delay (
    .clk, .rst_n, .in_valid(m14_v), .in_addr(m14_a), .in_ready(m14_r),
    .out_valid(d_v), .out_addr(d_a), .out_ready(d_r),
    .brk_we(dl_brk_we), .brk_idx(dl_brk_idx), .brk_val(dl_brk_val), .dropped(dl_dropped));

  // 16: mapper (delay taps -> learning synapses, one to many)
  aer_mapper #(.TAB_DEPTH(MAP_DEPTH)) u_map16 (
    .clk, .rst_n, .in_valid(d_v), .in_addr(d_a), .in_ready(d_r),
    .out_valid(m16_v), .out_addr(m16_a), .out_ready(m16_r),
    .cfg_we1(map_we1 && map_sel == 2'd3), .cfg_we2(map_we2 && map_sel == 2'd3),
    .cfg_addr(map_addr), .cfg_data(map_data), .busy(map_busy[3]));

  // 17: learning chip, output on a 4-phase bus
  hebbian_learning_chip u_learn (
    .clk, .rst_n, .in_valid(m16_v), .in_addr(m16_a), .in_ready(m16_r),
    .out_valid(l_v), .out_addr(l_a), .out_ready(l_r), .thresh(learn_thresh));
  aer_tx u_learn_tx (.clk, .rst_n, .in_valid(l_v), .in_addr(l_a), .in_ready(l_r),
                     .req(learn_req), .ack(learn_ack), .addr(learn_bus_addr));

  // injection functions of the interface boards
  aer_player u_player (
    .clk, .rst_n, .ld_we(pl_we), .ld_idx(pl_idx), .ld_ts(pl_ts), .ld_addr(pl_addr_in),
    .start(pl_start), .count(pl_count), .out_valid(pl_valid), .out_addr(pl_addr),
    .out_ready(pl_ready), .done(pl_done), .late(pl_late));
  frame_to_aer u_fgen (
    .clk, .rst_n, .fr_we(fg_we), .fr_x(fg_x), .fr_y(fg_y), .fr_i(fg_i), .run(fg_run),
    .out_valid(fg_valid), .out_addr(fg_addr), .out_ready(fg_ready), .scans(fg_scans));
endmodule
