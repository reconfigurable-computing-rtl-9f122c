// input_bank: strip buffers for the kernel's 17 input words per item.
//
// The inputs of one item (triangle T0,T1,T2, ray origin P0, ray direction PD
// and the closest hit so far Told/Dold) are read at several stages of an
// iteration, so every strip in flight keeps its own buffer. There are
// N_BANKS buffers of STRIP items, filled in round-robin order from a
// valid/ready stream: an item is taken when in_valid and in_ready are both
// high. A buffer is closed, and marked full, when STRIP items are in it or
// when an item carries in_last (a short strip); its item count is kept in
// len. The controller reads item rd_idx of every buffer at once
// (asynchronous read) and clears a buffer's full flag with a one-cycle pulse
// on release[b] when the strip in it has left the datapath. in_ready is low
// while the next buffer in order is still full. Buffer count, the stream
// handshake and short strips are choices of this design.
module input_bank
  import rti_pkg::*;
#(
  parameter int STRIP = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  fp32_t                    in_words [N_IN],
  input  logic                     in_last,
  input  logic [$clog2(STRIP)-1:0] rd_idx,
  output fp32_t                    rd_words [N_BANKS][N_IN],
  output logic [N_BANKS-1:0]       full,
  output logic [$clog2(STRIP):0]   len [N_BANKS],
  input  logic [N_BANKS-1:0]       release_b
);
  localparam int IW = $clog2(STRIP);
  localparam int BW = $clog2(N_BANKS);

  fp32_t            mem [N_BANKS][STRIP][N_IN];
  logic [BW-1:0]    wr_bank;
  logic [IW-1:0]    wr_idx;
  logic             take, close;

  assign in_ready = !full[wr_bank];
  assign take     = in_valid && in_ready;
  assign close    = take && (in_last || wr_idx == IW'(STRIP - 1));

  always_ff @(posedge clk) begin
    if (take) mem[wr_bank][wr_idx] <= in_words;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank <= '0;
      wr_idx  <= '0;
      full    <= '0;
      for (int b = 0; b < N_BANKS; b++) len[b] <= '0;
    end else begin
      for (int b = 0; b < N_BANKS; b++)
        if (release_b[b]) full[b] <= 1'b0;
      if (take) begin
        wr_idx <= close ? '0 : wr_idx + 1'b1;
        if (close) begin
          full[wr_bank] <= 1'b1;
          len[wr_bank]  <= {1'b0, wr_idx} + 1'b1;
          wr_bank       <= wr_bank + 1'b1;
        end
      end
    end
  end

  for (genvar b = 0; b < N_BANKS; b++) begin : g_rd
    assign rd_words[b] = mem[b][rd_idx];
  end

  // a buffer being filled is never full, and a full one is never written
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n) take |-> !full[wr_bank]);
endmodule
