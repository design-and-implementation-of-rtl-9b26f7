// tb_pipe_reg: the registered variant must clear on reset and present d one
// clock later; the pass-through variant must follow d at once.
module tb_pipe_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n;
  logic [31:0] d, q_reg, q_wire, prev;
  pipe_reg #(.T(logic [31:0]), .EN(1'b1)) dut_reg  (.clk(clk), .rst_n(rst_n), .d(d), .q(q_reg));
  pipe_reg #(.T(logic [31:0]), .EN(1'b0)) dut_wire (.clk(clk), .rst_n(rst_n), .d(d), .q(q_wire));
  always #5 clk = ~clk;

  initial begin
    rst_n = 0; d = 32'hDEAD_BEEF;
    #12;
    checks++;
    if (q_reg !== '0) begin failures++; $display("FAIL reset q=%h", q_reg); end
    rst_n = 1;
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      prev = d;
      d = $urandom;
      #1;
      checks++;
      if (q_wire !== d) begin failures++; $display("FAIL wire q=%h d=%h", q_wire, d); end
      @(posedge clk); #1;
      checks++;
      if (q_reg !== d) begin failures++; $display("FAIL reg q=%h d=%h", q_reg, d); end
    end
    // value held exactly one cycle: after the edge q follows the new d only
    @(negedge clk); d = 32'h1234_5678; #1;
    checks++;
    if (q_reg === d) begin failures++; $display("FAIL reg changed before the edge"); end
    rst_n = 0; #1;
    checks++;
    if (q_reg !== '0) begin failures++; $display("FAIL async reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
