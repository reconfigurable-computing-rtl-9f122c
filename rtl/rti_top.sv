// rti_top: ray-triangle intersection kernel on a shared floating-point array.
//
// Each item is one ray/triangle pair plus the closest hit found so far for
// the ray; the kernel returns the closer of that hit and this triangle's.
// Items arrive as a stream of 17 single-precision words: T0, T1, T2 (the
// triangle's corners, x/y/z each), P0 (ray origin), PD (ray direction),
// Told and Dold (the previous hit as a numerator/denominator pair, distance
// Told/Dold; start a ray with a large Told and Dold = 1). The result is
// (T, D) of the closer hit, the four compare bits {T*Dold<Told*D, U+V>D, V<0,
// U<0} and the hit bit. Results leave in input order, one per cycle of the
// output stage, with no backpressure.
//
// Inside, 5 adders, 6 multipliers and 4 comparators are reused under a
// static 12-stage schedule (see rti_pkg). Items are grouped in strips of
// STRIP: during a stage every unit processes the same operation for all
// items of a strip, one per cycle, which hides the pipeline latency of the
// units. Two strips are in flight per 12-stage period, the second starting 2
// stages after the first, so the adders are busy 80% and the multipliers 72%
// of the time with a steady input. Intermediate values wait in chains of
// one-stage delay memories behind each unit. Throughput is 2*STRIP items per
// 12*STRIP cycles (one item every 6 cycles); latency from the first stage of
// a strip to its result is 12 stages plus 1 cycle (12*STRIP+1 cycles for an
// item). A strip may wait up to one period in its buffer for a slot.
//
// Interface: in_valid/in_ready stream with in_last to close a short strip;
// out_valid marks a result. unit_busy shows which units started a real
// item in the current cycle; slot_bubble pulses when a slot starts with no
// strip ready.
module rti_top
  import rti_pkg::*;
#(
  parameter int STRIP   = 16,
  parameter int ADD_LAT = 12,
  parameter int MUL_LAT = 10,
  parameter int CMP_LAT = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  fp32_t              in_words [N_IN],
  input  logic               in_last,
  output logic               out_valid,
  output logic               out_hit,
  output logic [3:0]         out_flags,
  output fp32_t              out_t,
  output fp32_t              out_d,
  output logic [N_UNITS-1:0] unit_busy,
  output logic               slot_bubble
);
  localparam int IW = $clog2(STRIP);
  localparam int BW = $clog2(N_BANKS);

  logic [IW-1:0]      idx;
  logic [3:0]         row;
  fp32_t              bank_words [N_BANKS][N_IN];
  logic [N_BANKS-1:0] full, release_b;
  logic [IW:0]        len [N_BANKS];
  logic [3:0]         item_valid;
  logic [BW-1:0]      tag_bank [4];
  fp32_t              tag_words [4][N_IN];
  logic [3:0]         cmp;
  fp32_t              t_new, d_new;
  logic [N_UNITS-1:0] unit_done;
  logic               res_valid;
  tag_e               res_tag;

  input_bank #(.STRIP(STRIP)) u_bank (
    .clk, .rst_n, .in_valid, .in_ready, .in_words, .in_last,
    .rd_idx(idx), .rd_words(bank_words), .full, .len, .release_b
  );

  rti_control #(.STRIP(STRIP)) u_ctl (
    .clk, .rst_n, .idx, .row, .full, .len, .release_b, .tag_valid(), .tag_bank,
    .item_valid, .slot_start(), .slot_bubble
  );

  for (genvar t = 0; t < 4; t++) begin : g_tag
    assign tag_words[t] = bank_words[tag_bank[t]];
  end

  rti_datapath #(.STRIP(STRIP), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT), .CMP_LAT(CMP_LAT)) u_dp (
    .clk, .rst_n, .idx, .row, .in_words(tag_words), .item_valid,
    .out_cmp(cmp), .out_t(t_new), .out_d(d_new), .unit_busy, .unit_done
  );

  // output stage: slot A's strip of the previous period in row 0, slot B's in row B_OFS
  assign res_tag   = (row == 4'd0) ? TAG_APREV : TAG_BPREV;
  assign res_valid = (row == 4'd0 || row == 4'(B_OFS)) && item_valid[res_tag];

  result_select u_out (
    .clk, .rst_n, .in_valid(res_valid), .cmp, .t_new, .d_new,
    .t_old(tag_words[res_tag][W_TOLD]), .d_old(tag_words[res_tag][W_DOLD]),
    .out_valid, .out_hit, .out_flags, .out_t, .out_d
  );

  // a compare result read by the output stage belongs to a real item
  a_cmp_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                res_valid |-> &unit_done[UC3:UC0]);
endmodule
