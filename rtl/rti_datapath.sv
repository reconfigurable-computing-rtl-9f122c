// rti_datapath: the shared floating-point array of the kernel.
//
// Five adders, six multipliers and four comparators sit between an input
// selection and the intermediate buffering. In every cycle each unit looks
// up its operation for the current schedule row (a constant ROM built from
// rti_pkg::sched), its two operand_select muxes fetch the operands, and the
// unit starts the operation. Behind every unit a pipe_delay pads its latency
// up to exactly one stage (STRIP cycles), so a result reaches tap 0 of the
// unit's chain_buffer just when the next stage processes the same item.
// The chains are as long as the schedule needs (rti_pkg::chain_depth). The
// input selection of an operation reads the input words of the iteration
// that owns it (in_words, one item per tag, already addressed by idx).
// The output-stage values (the four compare bits and the new T and D of the
// item at idx) are taken from fixed taps. unit_busy reports which units
// started a real item this cycle, unit_done which stage-aligned results of
// real items reach tap 0 (exactly STRIP cycles later). STRIP must be at least the largest unit
// latency.
module rti_datapath
  import rti_pkg::*;
#(
  parameter int STRIP   = 16,
  parameter int ADD_LAT = 12,
  parameter int MUL_LAT = 10,
  parameter int CMP_LAT = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(STRIP)-1:0] idx,
  input  logic [3:0]               row,
  input  fp32_t                    in_words [4][N_IN],   // per tag_e
  input  logic [3:0]               item_valid,           // per tag_e
  output logic [3:0]               out_cmp,              // {M0<M1, D<U+V, V<0, U<0}
  output fp32_t                    out_t,
  output fp32_t                    out_d,
  output logic [N_UNITS-1:0]       unit_busy,
  output logic [N_UNITS-1:0]       unit_done
);
  initial begin
    if (STRIP < ADD_LAT || STRIP < MUL_LAT || STRIP < CMP_LAT)
      $fatal(1, "STRIP must cover the deepest unit pipeline");
  end

  fp32_t taps [N_UNITS][MAX_TAP];

  for (genvar u = 0; u < N_UNITS; u++) begin : g_unit
    localparam int LAT   = (u < N_ADD) ? ADD_LAT : (u < N_ADD + N_MUL) ? MUL_LAT : CMP_LAT;
    localparam int DEPTH = chain_depth(u);

    op_t   cur;
    fp32_t opa, opb, res, aligned;
    logic  go, res_v, aligned_v;
    fp32_t chain [DEPTH];

    op_t   rom [PERIOD];

    // this unit's column of the schedule table, a constant ROM indexed by row
    for (genvar r = 0; r < PERIOD; r++) begin : g_rom
      localparam op_t OP = sched(r, u);
      assign rom[r] = OP;
    end
    assign cur = rom[(row < 4'(PERIOD)) ? row : 4'd0];
    assign go  = cur.en && item_valid[cur.tag];
    assign unit_busy[u] = go;
    assign unit_done[u] = aligned_v;

    operand_select u_sel_a (.sel(cur.a), .in_words(in_words[cur.tag]), .taps(taps), .y(opa));
    operand_select u_sel_b (.sel(cur.b), .in_words(in_words[cur.tag]), .taps(taps), .y(opb));

    if (u < N_ADD) begin : g_add
      fp_add #(.LAT(LAT)) u_fu (
        .clk, .rst_n, .in_valid(go), .sub(cur.sub), .a(opa), .b(opb), .out_valid(res_v), .y(res)
      );
    end else if (u < N_ADD + N_MUL) begin : g_mul
      fp_mul #(.LAT(LAT)) u_fu (
        .clk, .rst_n, .in_valid(go), .a(opa), .b(opb), .out_valid(res_v), .y(res)
      );
    end else begin : g_cmp
      fp_cmp #(.LAT(LAT)) u_fu (
        .clk, .rst_n, .in_valid(go), .a(opa), .b(opb), .out_valid(res_v), .y(res)
      );
    end

    // pad the unit's latency to one stage
    pipe_delay #(.W(32), .DEPTH(STRIP - LAT)) u_align (
      .clk, .rst_n, .in_valid(res_v), .in_data(res), .out_valid(aligned_v), .out_data(aligned)
    );

    chain_buffer #(.W(32), .STRIP(STRIP), .TAPS(DEPTH)) u_chain (
      .clk, .idx, .din(aligned), .taps(chain)
    );

    for (genvar j = 0; j < MAX_TAP; j++) begin : g_tap
      if (j < DEPTH) begin : g_used
        assign taps[u][j] = chain[j];
      end else begin : g_none
        assign taps[u][j] = '0;
      end
    end
  end

  for (genvar c = 0; c < N_CMP; c++) begin : g_out_cmp
    assign out_cmp[c] = taps[UC0 + c][0][0];
  end
  assign out_t = taps[OUT_T_UNIT][OUT_TD_TAP];
  assign out_d = taps[OUT_D_UNIT][OUT_TD_TAP];
endmodule
