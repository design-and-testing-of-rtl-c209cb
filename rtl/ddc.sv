// ddc: digital down-conversion filter, integrate-and-dump decimator.
//
// Sums 2^DEC_LOG consecutive IQ mixing products, then outputs the sums
// shifted right by SHIFT and saturated to OUT_W bits, with a one-clock
// out_valid strobe every 2^DEC_LOG clocks. The boxcar rejects the 2*f mixing
// term exactly when the window holds a whole number of its periods and
// strongly otherwise. The controller names this stage only; the filter type
// and decimation factor are this design's choice.
module ddc #(
  parameter int IN_W    = 30,
  parameter int OUT_W   = 18,
  parameter int DEC_LOG = 6,
  parameter int SHIFT   = DEC_LOG + 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  p_i,
  input  logic signed [IN_W-1:0]  p_q,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] i_out,
  output logic signed [OUT_W-1:0] q_out
);
  localparam int AW = IN_W + DEC_LOG;

  logic signed [AW-1:0] acc_i, acc_q;
  logic [DEC_LOG-1:0]   cnt;

  function automatic logic signed [OUT_W-1:0] sat(input logic signed [AW-1:0] a);
    localparam logic signed [AW-1:0] MX = AW'((1 << (OUT_W-1)) - 1);
    logic signed [AW-1:0] s;
    s = a >>> SHIFT;
    if (s > MX)  return OUT_W'(MX);
    if (s < -MX) return OUT_W'(-MX);
    return OUT_W'(s);
  endfunction

  logic signed [AW-1:0] sum_i, sum_q;
  assign sum_i = acc_i + AW'(p_i);
  assign sum_q = acc_q + AW'(p_q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_i <= '0; acc_q <= '0; cnt <= '0;
      out_valid <= 1'b0; i_out <= '0; q_out <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        cnt <= cnt + 1'b1;
        if (&cnt) begin
          i_out <= sat(sum_i);
          q_out <= sat(sum_q);
          out_valid <= 1'b1;
          acc_i <= '0;
          acc_q <= '0;
        end else begin
          acc_i <= sum_i;
          acc_q <= sum_q;
        end
      end
    end
  end
endmodule
