// result_select: the output stage of the kernel (stage 12 of an iteration).
//
// It combines the four comparator bits of an item into a hit decision and
// outputs the closer of the new and the previous intersection. With the
// scaled barycentric coordinates U, V, the determinant D and the scaled
// distance T, the point lies inside the triangle when neither U < 0 nor
// V < 0 nor U+V > D, and it is closer than the previous hit when
// T*Dold < Told*D. On a hit the new (T, D) pair is passed on, otherwise the
// previous (Told, Dold); the distance is T/D, left to the consumer since the
// kernel has no divider. The four bits are passed on as well. Outputs are
// registered: one cycle after in_valid. Treating a miss as "keep the old
// pair" is this design's reading of the kernel's two outputs.
module result_select
  import rti_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [3:0] cmp,        // {M0<M1, D<U+V, V<0, U<0}
  input  fp32_t      t_new,
  input  fp32_t      d_new,
  input  fp32_t      t_old,
  input  fp32_t      d_old,
  output logic       out_valid,
  output logic       out_hit,
  output logic [3:0] out_flags,
  output fp32_t      out_t,
  output fp32_t      out_d
);
  logic hit;
  assign hit = !cmp[0] && !cmp[1] && !cmp[2] && cmp[3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    out_hit   <= hit;
    out_flags <= cmp;
    out_t     <= hit ? t_new : t_old;
    out_d     <= hit ? d_new : d_old;
  end
endmodule
