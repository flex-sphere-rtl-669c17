// delay_line: N-stage register pipeline for a valid flag and a payload of
// any type. It pads a computation to its specified latency: out_valid and
// out_data equal in_valid and in_data of N cycles earlier. The valid bits
// are reset; the payload is not, as it is only read when valid. N = 0 is a
// plain wire.
module delay_line #(
  parameter type         T = logic,
  parameter int unsigned N = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  T     in_data,
  output logic out_valid,
  output T     out_data
);
  if (N == 0) begin : g_wire
    assign out_valid = in_valid;
    assign out_data  = in_data;
  end else begin : g_regs
    logic [N-1:0] v;
    T             d [N];
    always_ff @(posedge clk) begin
      if (!rst_n) v <= '0;
      else begin
        v[0] <= in_valid;
        for (int unsigned k = 1; k < N; k++) v[k] <= v[k-1];
      end
    end
    always_ff @(posedge clk) begin
      d[0] <= in_data;
      for (int unsigned k = 1; k < N; k++) d[k] <= d[k-1];
    end
    assign out_valid = v[N-1];
    assign out_data  = d[N-1];
  end
endmodule
