// tb_cmult_sr_16bit: the three-multiplier complex product at 16-bit operand
// width, the word length at which the multiplier/adder cost comparison of the
// method is made.
//
// Same procedure as tb_cmult_sr: random and extreme 16-bit operands with
// random gaps, two instances (with and without the pipeline register), every
// product compared with the direct four-multiplier form, latencies 1 and 2.
module tb_cmult_sr_16bit;
  localparam int unsigned WA = 16;
  localparam int unsigned WB = 16;
  localparam int unsigned WC = WA + WB + 1;
  localparam int unsigned N  = 2000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 in_valid;
  logic signed [WA-1:0] a_re, a_im;
  logic signed [WB-1:0] b_re, b_im;
  logic                 v0, v1;
  logic signed [WC-1:0] c0_re, c0_im, c1_re, c1_im;

  cmult_sr #(.WA(WA), .WB(WB), .PIPELINE(1'b0)) dut0 (
    .clk, .rst_n, .in_valid, .a_re, .a_im, .b_re, .b_im,
    .out_valid(v0), .c_re(c0_re), .c_im(c0_im));
  cmult_sr #(.WA(WA), .WB(WB), .PIPELINE(1'b1)) dut1 (
    .clk, .rst_n, .in_valid, .a_re, .a_im, .b_re, .b_im,
    .out_valid(v1), .c_re(c1_re), .c_im(c1_im));

  int checks = 0, failures = 0;
  longint exp_re[$], exp_im[$];    // expected products, in issue order
  int     exp_cyc[$];              // issue cycle of each
  int     q0 = 0, q1 = 0;          // read pointers for the two instances
  int     cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic longint pick(int unsigned w);
    int unsigned r = $urandom_range(0, 9);
    longint lo = -(64'sd1 <<< (w - 1));
    longint hi = (64'sd1 <<< (w - 1)) - 1;
    if (r == 0) return lo;
    if (r == 1) return hi;
    return longint'($urandom_range(0, (1 << w) - 1)) + lo;
  endfunction

  task automatic check_out(input logic signed [WC-1:0] cr, input logic signed [WC-1:0] ci,
                           inout int q, input int lat, input string tag);
    checks++;
    if (q >= exp_re.size()) begin
      failures++;
      $display("FAIL %s: unexpected output", tag);
      return;
    end
    if (longint'(cr) != exp_re[q] || longint'(ci) != exp_im[q] || cycle - exp_cyc[q] != lat) begin
      failures++;
      $display("FAIL %s #%0d: got (%0d,%0d) after %0d, expected (%0d,%0d) after %0d",
               tag, q, cr, ci, cycle - exp_cyc[q], exp_re[q], exp_im[q], lat);
    end
    q++;
  endtask

  // Outputs are compared in the cycle they are valid.
  always @(posedge clk) if (rst_n) begin
    if (v0) check_out(c0_re, c0_im, q0, 1, "nopipe");
    if (v1) check_out(c1_re, c1_im, q1, 2, "pipe");
  end

  initial begin
    longint ar, ai, br, bi;
    in_valid = 1'b0;
    a_re = '0; a_im = '0; b_re = '0; b_im = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        in_valid = 1'b0;
        a_re = WA'($urandom); b_im = WB'($urandom);   // must be ignored
        n--;
        continue;
      end
      ar = pick(WA); ai = pick(WA); br = pick(WB); bi = pick(WB);
      in_valid = 1'b1;
      a_re = WA'(ar); a_im = WA'(ai); b_re = WB'(br); b_im = WB'(bi);
      exp_re.push_back(ar * br - ai * bi);
      exp_im.push_back(ar * bi + ai * br);
      exp_cyc.push_back(cycle);  // cycle count as seen at the sampling edge
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (q0 != N || q1 != N) begin
      failures++;
      $display("FAIL: %0d / %0d of %0d products seen", q0, q1, N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
