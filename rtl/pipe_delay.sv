// pipe_delay: a plain register pipeline that delays a word and its valid bit
// by DEPTH clock cycles (DEPTH = 0 is a wire). It gives the floating-point
// units their pipeline depth and lines their results up with the end of a
// schedule stage. The valid bits are reset; the data registers are not,
// since nothing reads them before valid data has reached them.
module pipe_delay #(
  parameter int W     = 32,
  parameter int DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);
  if (DEPTH == 0) begin : g_wire
    assign out_valid = in_valid;
    assign out_data  = in_data;
  end else begin : g_regs
    logic [W-1:0] data_q  [DEPTH];
    logic         valid_q [DEPTH];
    always_ff @(posedge clk) begin
      data_q[0] <= in_data;
      for (int i = 1; i < DEPTH; i++) data_q[i] <= data_q[i-1];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) valid_q[i] <= 1'b0;
      end else begin
        valid_q[0] <= in_valid;
        for (int i = 1; i < DEPTH; i++) valid_q[i] <= valid_q[i-1];
      end
    end
    assign out_valid = valid_q[DEPTH-1];
    assign out_data  = data_q[DEPTH-1];
  end
endmodule
