// rti_control: the sequencer of the static schedule.
//
// Two counters step through the schedule: idx counts the STRIP items of a
// stage, row counts the 12 stages of a period. The schedule table itself is
// a constant (rti_pkg::sched); this block decides which strip each of the
// four iteration tags refers to. A new period makes the current A and B
// strips the previous ones and tries to start a new A strip; two stages later
// it tries to start a new B strip. A start takes the next input buffer in
// order if it is full; otherwise the slot runs empty (a bubble) and its
// results are marked invalid, so strips that are still in flight always
// drain. A previous-period A strip is finished after row 0, a B strip after
// row 2, and the buffer is then handed back to input_bank with a one-cycle
// release pulse. For every tag the block reports whether it holds a strip,
// which buffer, and whether the item at idx is a real item of that strip.
// The counters run from reset onward; a strip waits at most one period for
// its slot. Starting empty slots rather than stalling is a choice of this
// design.
module rti_control
  import rti_pkg::*;
#(
  parameter int STRIP = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  output logic [$clog2(STRIP)-1:0]    idx,
  output logic [3:0]                  row,
  input  logic [N_BANKS-1:0]          full,
  input  logic [$clog2(STRIP):0]      len [N_BANKS],
  output logic [N_BANKS-1:0]          release_b,
  output logic [3:0]                  tag_valid,              // indexed by tag_e
  output logic [$clog2(N_BANKS)-1:0]  tag_bank [4],
  output logic [3:0]                  item_valid,             // tag holds a real item at idx
  output logic                        slot_start,             // a slot start decision this cycle
  output logic                        slot_bubble             // ... and it found no strip
);
  localparam int IW = $clog2(STRIP);
  localparam int BW = $clog2(N_BANKS);

  logic          last_item;
  logic [BW-1:0] rd_ptr;
  logic          start_a, start_b, claim_ok;

  assign last_item = (idx == IW'(STRIP - 1));
  assign start_a   = last_item && row == 4'(PERIOD - 1);
  assign start_b   = last_item && row == 4'(B_OFS - 1);
  assign claim_ok  = full[rd_ptr];
  assign slot_start  = start_a || start_b;
  assign slot_bubble = slot_start && !claim_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx       <= '0;
      row       <= '0;
      rd_ptr    <= '0;
      tag_valid <= '0;
      for (int t = 0; t < 4; t++) tag_bank[t] <= '0;
    end else begin
      idx <= last_item ? '0 : idx + 1'b1;
      if (last_item) row <= (row == 4'(PERIOD - 1)) ? '0 : row + 1'b1;
      if (start_a) begin
        tag_valid[TAG_APREV] <= tag_valid[TAG_ACUR];
        tag_bank[TAG_APREV]  <= tag_bank[TAG_ACUR];
        tag_valid[TAG_BPREV] <= tag_valid[TAG_BCUR];
        tag_bank[TAG_BPREV]  <= tag_bank[TAG_BCUR];
        tag_valid[TAG_ACUR]  <= claim_ok;
        tag_bank[TAG_ACUR]   <= rd_ptr;
        tag_valid[TAG_BCUR]  <= 1'b0;
      end
      if (start_b) begin
        tag_valid[TAG_BCUR]  <= claim_ok;
        tag_bank[TAG_BCUR]   <= rd_ptr;
      end
      if (slot_start && claim_ok) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  // buffers are handed back at the end of the output stage of their strip
  always_comb begin
    release_b = '0;
    if (last_item && row == 4'd0 && tag_valid[TAG_APREV])
      release_b[tag_bank[TAG_APREV]] = 1'b1;
    if (last_item && row == 4'(B_OFS) && tag_valid[TAG_BPREV])
      release_b[tag_bank[TAG_BPREV]] = 1'b1;
  end

  for (genvar t = 0; t < 4; t++) begin : g_iv
    assign item_valid[t] = tag_valid[t] && ({1'b0, idx} < len[tag_bank[t]]);
  end

  a_row_range: assert property (@(posedge clk) disable iff (!rst_n) row < 4'(PERIOD));
endmodule
