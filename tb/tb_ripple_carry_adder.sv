// tb_ripple_carry_adder: checks the 8-bit (exponent) and 48-bit (final
// adder) ripple carry adders against integer addition, with corner values
// that exercise the full carry chain and random operands.
module tb_ripple_carry_adder;
  int checks = 0, failures = 0;
  logic [7:0]  a8, b8, s8;
  logic        c8i, c8o;
  logic [47:0] a48, b48, s48;
  logic        c48i, c48o;

  ripple_carry_adder #(.N(8))  dut8  (.a(a8),  .b(b8),  .cin(c8i),  .sum(s8),  .cout(c8o));
  ripple_carry_adder #(.N(48)) dut48 (.a(a48), .b(b48), .cin(c48i), .sum(s48), .cout(c48o));

  task automatic check8();
    logic [8:0] exp9;
    #1;
    exp9 = 9'(a8) + 9'(b8) + 9'(c8i);
    checks++;
    if ({c8o, s8} !== exp9) begin
      failures++; $display("FAIL8 %h+%h+%0b = %h expected %h", a8, b8, c8i, {c8o, s8}, exp9);
    end
  endtask

  task automatic check48();
    logic [48:0] exp49;
    #1;
    exp49 = 49'(a48) + 49'(b48) + 49'(c48i);
    checks++;
    if ({c48o, s48} !== exp49) begin
      failures++; $display("FAIL48 %h+%h+%0b = %h expected %h", a48, b48, c48i, {c48o, s48}, exp49);
    end
  endtask

  initial begin
    // exhaustive 8-bit with cin = 0 (the exponent adder's use)
    c8i = 0;
    for (int i = 0; i < 256; i++) for (int j = 0; j < 256; j += 5) begin
      a8 = 8'(i); b8 = 8'(j); check8();
    end
    c8i = 1; a8 = 8'hFF; b8 = 8'h00; check8();
    // 48-bit corners: full carry propagation
    c48i = 0; a48 = '1; b48 = 48'd1; check48();
    c48i = 1; a48 = '1; b48 = '0;    check48();
    c48i = 1; a48 = '1; b48 = '1;    check48();
    c48i = 0; a48 = 48'h5555_5555_5555; b48 = 48'hAAAA_AAAA_AAAB; check48();
    for (int k = 0; k < 2000; k++) begin
      a48  = {$urandom, $urandom} >> 16;
      b48  = {$urandom, $urandom} >> 16;
      c48i = 1'($urandom);
      check48();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
