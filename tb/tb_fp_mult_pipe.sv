// tb_fp_mult_pipe: end-to-end test of the five-stage multiplier at its
// default parameters. A new operand pair enters on every clock (with some
// idle cycles), and every result is compared with the integer reference
// model five clocks later, together with out_valid, so both the latency and
// the one-result-per-clock rate are checked. Directed cases reproduce the
// worked examples of the design description (40 x -7.5 = -300, the 7.5 x 7.5
// then 6.5 x 7.5 stream, 1.875 x 1.875*2^127 overflowing); random cases
// cover the whole exponent range and every special operand kind. Each
// mechanism (normalization shift or not, overflow, underflow, denormal
// flush, NaN, zero x infinity, infinity, zero, idle slot, back-to-back
// issue) is counted, and one that never happened counts as a failure.
module tb_fp_mult_pipe;
  import fpm_ref_pkg::*;
  localparam int LAT = 5;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [31:0] f1 = '0, f2 = '0;
  logic out_valid;
  logic [31:0] prod_f;
  logic s_und_out, s_ovf_out, s_nan_out, s_inf_out;

  fp_mult_pipe dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .f1(f1), .f2(f2),
    .out_valid(out_valid), .prod_f(prod_f),
    .s_und_out(s_und_out), .s_ovf_out(s_ovf_out),
    .s_nan_out(s_nan_out), .s_inf_out(s_inf_out)
  );

  always #5 clk = ~clk;

  typedef struct {
    logic        valid;
    logic [31:0] a, b, r;
    ref_flags_t  fl;
    logic [31:0] paper;      // result printed in the description, 0 if none
  } exp_t;

  exp_t hist[$];             // one entry per issue slot, in order
  int   n_slot = 0;

  // mechanism counters
  int c_shift, c_noshift, c_ovf, c_und, c_den, c_nan, c_zinf, c_inf, c_zero, c_idle, c_b2b;
  bit prev_valid = 0;

  function automatic logic [31:0] rnd_operand();
    logic [31:0] v;
    int kind;
    v = $urandom;
    kind = $urandom_range(0, 99);
    if      (kind < 3)  v[30:0] = 31'h0;                                // zero
    else if (kind < 6)  v[30:23] = 8'h00;                               // denormal (or zero)
    else if (kind < 8)  v[30:0] = {8'hFF, 23'h0};                       // infinity
    else if (kind < 10) begin v[30:23] = 8'hFF; v[22] = 1'b1; end       // NaN
    else if (kind < 30) v[30:23] = 8'($urandom_range(1, 254));          // any normal
    else                v[30:23] = 8'($urandom_range(64, 190));         // mid range
    return v;
  endfunction

  // Stimulus of slot k: the worked examples and directed corners first,
  // then random operand pairs with occasional idle slots, then a drain.
  localparam int NDIR  = 16;
  localparam int NRAND = 20000;
  localparam int NSLOT = NDIR + NRAND + LAT + 1;
  localparam logic [NDIR-1:0][96:0] DIRECTED = {
    {1'b1, 32'h3FC0_0000, 32'h00C0_0000, 32'h0},           // E_temp1 = 0, shift rescues
    {1'b1, 32'h3F00_0000, 32'h0100_0000, 32'h0},           // E_temp1 = 0 case
    {1'b1, 32'h7F7F_FFFF, 32'h3F80_0000, 32'h0},           // max * 1
    {1'b1, 32'h3F7F_FFFF, 32'h3F7F_FFFF, 32'h0},           // just below 1
    {1'b1, 32'h3F80_0000, 32'h3F80_0000, 32'h0},           // 1 * 1, no shift
    {1'b1, 32'h8000_0000, 32'h4000_0000, 32'h0},           // -0 * 2
    {1'b1, 32'h7FC0_0000, 32'h3F80_0000, 32'h0},           // NaN
    {1'b1, 32'hFF80_0000, 32'h4000_0000, 32'h0},           // -inf * 2
    {1'b1, 32'h7F80_0000, 32'h0000_0000, 32'h0},           // inf * 0
    {1'b1, 32'h3F80_0000, 32'h0000_0001, 32'h0},           // denormal flushed
    {1'b1, 32'h0080_0000, 32'h0080_0000, 32'h0},           // exponent underflow
    {1'b0, 32'h0,         32'h0,         32'h0},           // idle slot
    {1'b1, 32'h3FF0_0000, 32'h7F70_0000, 32'h0},           // overflow
    {1'b1, 32'h40D0_0000, 32'h40F0_0000, 32'h4243_0000},   // 6.5 * 7.5 = 48.75
    {1'b1, 32'h40F0_0000, 32'h40F0_0000, 32'h4261_0000},   // 7.5 * 7.5 = 56.25
    {1'b1, 32'h4220_0000, 32'hC0F0_0000, 32'hC396_0000}    // 40 * -7.5 = -300
  };

  function automatic exp_t stimulus(int k);
    exp_t e;
    e.paper = '0;
    if (k < NDIR) begin
      {e.valid, e.a, e.b, e.paper} = DIRECTED[k];
    end else if (k < NDIR + NRAND) begin
      e.valid = ($urandom_range(0, 15) != 0);
      e.a = rnd_operand();
      e.b = rnd_operand();
    end else begin
      e.valid = 1'b0; e.a = '0; e.b = '0;
    end
    fp_mul_ref(e.a, e.b, e.r, e.fl);
    return e;
  endfunction

  function automatic void count(exp_t e);
    longint p;
    if (!e.valid) begin c_idle++; prev_valid = 0; return; end
    if (prev_valid) c_b2b++;
    prev_valid = 1;
    p = longint'({1'b1, e.a[22:0]}) * longint'({1'b1, e.b[22:0]});
    if (e.fl == '0 && e.r[30:0] != 0) begin
      if (p[47]) c_shift++; else c_noshift++;
    end
    if (e.fl.ovf) c_ovf++;
    if (e.fl.und && e.a[30:23] != 0 && e.b[30:23] != 0) c_und++;
    if (e.fl.und && (e.a[30:23] == 0 || e.b[30:23] == 0)) c_den++;
    if (e.fl.nan && ((e.a[30:23] == 8'hFF && e.a[22:0] != 0) ||
                     (e.b[30:23] == 8'hFF && e.b[22:0] != 0))) c_nan++;
    else if (e.fl.nan) c_zinf++;
    if (e.fl.inf) c_inf++;
    if (e.fl == '0 && e.r[30:0] == 0) c_zero++;
  endfunction

  // Compare the outputs now visible with the slot issued LAT slots ago.
  function automatic void check_slot();
    exp_t e;
    if (n_slot < LAT) return;
    e = hist[n_slot - LAT];
    checks++;
    if (out_valid !== e.valid) begin
      failures++; $display("FAIL slot %0d: out_valid=%0b expected %0b", n_slot - LAT, out_valid, e.valid);
    end
    if (!e.valid) return;
    checks++;
    if (prod_f !== e.r || {s_und_out, s_ovf_out, s_nan_out, s_inf_out} !== e.fl) begin
      failures++;
      $display("FAIL %h * %h = %h und=%0b ovf=%0b nan=%0b inf=%0b expected %h %b",
               e.a, e.b, prod_f, s_und_out, s_ovf_out, s_nan_out, s_inf_out, e.r, e.fl);
    end
    if (e.paper != 0) begin
      checks++;
      if (prod_f !== e.paper) begin
        failures++; $display("FAIL worked example %h * %h = %h, described %h", e.a, e.b, prod_f, e.paper);
      end
    end
  endfunction

  // One slot per falling edge: check what is due, then drive the next pair.
  bit running = 0;
  always @(negedge clk) begin
    if (running) begin
      exp_t e;
      check_slot();
      if (n_slot < NSLOT) begin
        e = stimulus(n_slot);
        in_valid <= e.valid; f1 <= e.a; f2 <= e.b;
        hist.push_back(e);
        count(e);
        n_slot++;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    checks++;
    if (out_valid !== 1'b0 || prod_f !== '0) begin
      failures++; $display("FAIL outputs not cleared by reset");
    end
    rst_n = 1;
    running = 1;
    wait (n_slot == NSLOT);
    @(negedge clk);
    #1;
    $display("mechanisms: shift=%0d noshift=%0d ovf=%0d und=%0d denorm=%0d nan=%0d zero_x_inf=%0d inf=%0d zero=%0d idle=%0d back_to_back=%0d",
             c_shift, c_noshift, c_ovf, c_und, c_den, c_nan, c_zinf, c_inf, c_zero, c_idle, c_b2b);
    checks++;
    if (c_shift == 0 || c_noshift == 0 || c_ovf == 0 || c_und == 0 || c_den == 0 ||
        c_nan == 0 || c_zinf == 0 || c_inf == 0 || c_zero == 0 || c_idle == 0 || c_b2b == 0) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
