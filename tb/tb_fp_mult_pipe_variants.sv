// tb_fp_mult_pipe_variants: the 3-stage and the unpipelined configurations
// of the multiplier (STAGES = 3 and STAGES = 0) on one stream of operand
// pairs, one per clock. The 3-stage result and out_valid must appear three
// clocks after the operands; the unpipelined one in the same cycle. Results
// are compared with the integer reference model.
module tb_fp_mult_pipe_variants;
  import fpm_ref_pkg::*;
  localparam int NSLOT = 6000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [31:0] f1 = '0, f2 = '0;
  logic        v3, v0;
  logic [31:0] p3, p0;
  ref_flags_t  fl3, fl0;

  fp_mult_pipe #(.STAGES(3)) dut3 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .f1(f1), .f2(f2),
    .out_valid(v3), .prod_f(p3),
    .s_und_out(fl3.und), .s_ovf_out(fl3.ovf), .s_nan_out(fl3.nan), .s_inf_out(fl3.inf)
  );
  fp_mult_pipe #(.STAGES(0)) dut0 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .f1(f1), .f2(f2),
    .out_valid(v0), .prod_f(p0),
    .s_und_out(fl0.und), .s_ovf_out(fl0.ovf), .s_nan_out(fl0.nan), .s_inf_out(fl0.inf)
  );

  always #5 clk = ~clk;

  typedef struct {
    logic        valid;
    logic [31:0] a, b, r;
    ref_flags_t  fl;
  } exp_t;
  exp_t hist[$];
  int   n_slot = 0;
  bit   running = 0;

  function automatic logic [31:0] rnd_operand();
    logic [31:0] v;
    v = $urandom;
    case ($urandom_range(0, 9))
      0:       v[30:23] = 8'h00;
      1:       v[30:23] = 8'hFF;
      2, 3:    v[30:23] = 8'($urandom_range(1, 254));
      default: v[30:23] = 8'($urandom_range(64, 190));
    endcase
    return v;
  endfunction

  function automatic void compare(string tag, logic v, logic [31:0] p, ref_flags_t fl, exp_t e);
    checks++;
    if (v !== e.valid || (e.valid && (p !== e.r || fl !== e.fl))) begin
      failures++;
      $display("FAIL %s %h * %h: valid=%0b %h %b expected valid=%0b %h %b",
               tag, e.a, e.b, v, p, fl, e.valid, e.r, e.fl);
    end
  endfunction

  always @(negedge clk) begin
    if (running) begin
      exp_t e;
      if (n_slot >= 3 && n_slot < NSLOT + 3) compare("3-stage", v3, p3, fl3, hist[n_slot - 3]);
      if (n_slot >= NSLOT) begin
        in_valid = 1'b0;
        if (n_slot < NSLOT + 3) n_slot++;
      end else begin
        e.valid = ($urandom_range(0, 7) != 0);
        e.a = rnd_operand();
        e.b = rnd_operand();
        fp_mul_ref(e.a, e.b, e.r, e.fl);
        in_valid = e.valid; f1 = e.a; f2 = e.b;
        hist.push_back(e);
        n_slot++;
        #1;
        compare("unpipelined", v0, p0, fl0, e);
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    running = 1;
    wait (n_slot == NSLOT + 3);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (NSLOT + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
