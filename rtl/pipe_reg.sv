// pipe_reg: one pipeline register boundary. With EN = 1 it is a bank of
// flip-flops that loads d on every rising clock edge and clears to all
// zeros on an asynchronous active-low reset; with EN = 0 it is a wire, which
// lets the multiplier drop boundaries to form its 3-stage and unpipelined
// variants. The pipeline never stalls, so there is no load enable.
// The payload type T is a parameter (one of the stage records of fpm_pkg).
module pipe_reg #(
  parameter type T  = logic [31:0],
  parameter bit  EN = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  T     d,
  output T     q
);
  if (EN) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) q <= '0;
      else        q <= d;
    end
  end else begin : g_wire
    assign q = d;
  end
endmodule
