// tb_fp_normalize: normalization of products with the leading one at bit 46
// or 47, the exponent increment, the overflow and underflow boundaries
// (normalized exponent 255 and 0) and the special-value overrides.
module tb_fp_normalize;
  import fpm_pkg::*;
  int checks = 0, failures = 0;
  logic              sign;
  logic signed [9:0] e1;
  logic [47:0]       prod;
  fp_special_t       spec;
  fp32_t             res;
  fp_flags_t         fl;
  fp_normalize dut (.sign(sign), .e_temp1(e1), .prod(prod), .spec(spec),
                    .result(res), .flags(fl));

  task automatic check(input logic [31:0] want_r, input logic [3:0] want_f);
    #1;
    checks++;
    if (res !== want_r || fl !== want_f) begin
      failures++;
      $display("FAIL s=%0b e=%0d p=%h spec=%b -> %h %b expected %h %b",
               sign, e1, prod, spec, res, fl, want_r, want_f);
    end
  endtask

  initial begin
    spec = '0;
    // 40 * -7.5 from the significand product 0xA00000 * 0xF00000
    sign = 1; e1 = 10'sd134; prod = 48'h9600_0000_0000;
    check({1'b1, 8'd135, 23'h16_0000}, 4'b0000);
    // leading one at bit 46: no shift
    sign = 0; e1 = 10'sd127; prod = 48'h4000_0000_0001;
    check({1'b0, 8'd127, 23'h0}, 4'b0000);
    // overflow: 254 + carry-out of normalization
    sign = 0; e1 = 10'sd254; prod = 48'h8000_0000_0000;
    check({1'b0, 8'hFF, 23'h0}, 4'b0100);
    sign = 1; e1 = 10'sd254; prod = 48'h7FFF_FFFF_FFFF;
    check({1'b1, 8'd254, 23'h7F_FFFF}, 4'b0000);
    sign = 1; e1 = 10'sd300; prod = 48'h4000_0000_0000;
    check({1'b1, 8'hFF, 23'h0}, 4'b0100);
    // underflow: E_temp1 = 0 compensated only by the normalization shift
    sign = 0; e1 = 10'sd0; prod = 48'h8000_0000_0000;
    check({1'b0, 8'd1, 23'h0}, 4'b0000);
    sign = 1; e1 = 10'sd0; prod = 48'h4000_0000_0000;
    check({1'b1, 8'd0, 23'h0}, 4'b1000);
    sign = 0; e1 = -10'sd100; prod = 48'hC000_0000_0000;
    check({1'b0, 8'd0, 23'h0}, 4'b1000);
    // special values override the datapath
    e1 = 10'sd130; prod = 48'h8000_0000_0000; sign = 1;
    spec = 4'b1000; check({1'b1, 8'hFF, 23'h40_0000}, 4'b0010);
    spec = 4'b0100; check({1'b1, 8'hFF, 23'h0}, 4'b0001);
    spec = 4'b0010; check({1'b1, 31'h0}, 4'b0000);
    spec = 4'b0011; check({1'b1, 31'h0}, 4'b1000);
    // random products in range
    spec = '0;
    for (int k = 0; k < 2000; k++) begin
      int e;
      logic [31:0] w;
      sign = 1'($urandom);
      prod = {1'b0, 1'b1, 46'({$urandom, $urandom})};
      if (k % 2) prod[47] = 1'b1;
      e1 = 10'($urandom_range(0, 400)) - 10'sd125;
      e  = int'(e1) + int'(prod[47]);
      if (e >= 255)      check({sign, 8'hFF, 23'h0}, 4'b0100);
      else if (e <= 0)   check({sign, 31'h0}, 4'b1000);
      else begin
        w = {sign, 8'(e), prod[47] ? prod[46:24] : prod[45:23]};
        check(w, 4'b0000);
      end
    end
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
