// tb_rake_finger: self-checking test of one RAKE finger.
//
// Random chips with random idle cycles are despread over symbols of SF chips;
// the channel weight alpha* is changed to a new random value in the middle of
// every symbol, including the extreme values. Each finger output is compared
// with the reference model (plain correlation times alpha* by the direct
// complex product), and must appear exactly 2 + PIPELINE cycles after the
// symbol's last chip. The test runs once with and once without the
// multiplier's pipeline register.
module tb_rake_finger;
  import rake_ref_pkg::*;
  localparam int unsigned W_SAMPLE = 6;
  localparam int unsigned W_ALPHA  = 6;
  localparam int unsigned SF       = 16;
  localparam int unsigned WO       = W_ALPHA + W_SAMPLE + $clog2(SF) + 2;
  localparam int unsigned NSYM     = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                       chip_valid, chip_last, code;
  logic signed [W_SAMPLE-1:0] r_re, r_im;
  logic signed [W_ALPHA-1:0]  alpha_re, alpha_im;
  logic                       v0, v1;
  logic signed [WO-1:0]       o0_re, o0_im, o1_re, o1_im;

  rake_finger #(.W_SAMPLE(W_SAMPLE), .W_ALPHA(W_ALPHA), .SF(SF), .PIPELINE(1'b0)) dut0 (
    .clk, .rst_n, .chip_valid, .chip_last, .code, .r_re, .r_im, .alpha_re, .alpha_im,
    .out_valid(v0), .out_re(o0_re), .out_im(o0_im));
  rake_finger #(.W_SAMPLE(W_SAMPLE), .W_ALPHA(W_ALPHA), .SF(SF), .PIPELINE(1'b1)) dut1 (
    .clk, .rst_n, .chip_valid, .chip_last, .code, .r_re, .r_im, .alpha_re, .alpha_im,
    .out_valid(v1), .out_re(o1_re), .out_im(o1_im));

  int checks = 0, failures = 0, cycle = 0;
  int q0 = 0, q1 = 0;
  rake_user_model m;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check_out(input logic signed [WO-1:0] orr, input logic signed [WO-1:0] oi,
                           inout int q, input int lat, input string tag);
    checks++;
    if (q >= m.exp_re.size()) begin
      failures++; $display("FAIL %s: unexpected output", tag); return;
    end
    if (longint'(orr) != m.exp_re[q] || longint'(oi) != m.exp_im[q] || cycle - m.exp_cyc[q] != lat) begin
      failures++;
      $display("FAIL %s #%0d: got (%0d,%0d) after %0d, expected (%0d,%0d) after %0d",
               tag, q, orr, oi, cycle - m.exp_cyc[q], m.exp_re[q], m.exp_im[q], lat);
    end
    q++;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (v0) check_out(o0_re, o0_im, q0, 2, "nopipe");
    if (v1) check_out(o1_re, o1_im, q1, 3, "pipe");
  end

  function automatic longint rnd(int unsigned w);
    return longint'($urandom_range(0, (1 << w) - 1)) - (longint'(1) << (w - 1));
  endfunction

  initial begin
    longint rr, ri;
    m = new(1, 1);
    chip_valid = 0; chip_last = 0; code = 0; r_re = '0; r_im = '0;
    alpha_re = '0; alpha_im = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = 0; s < NSYM; s++) begin
      for (int c = 0; c < SF; c++) begin
        @(negedge clk);
        while ($urandom_range(0, 5) == 0) begin
          chip_valid = 0; r_re = W_SAMPLE'($urandom); code = 1'($urandom); chip_last = 1'($urandom);
          @(negedge clk);
        end
        if (c == SF / 2) begin
          m.a_re[0] = (s % 5 == 0) ? -(longint'(1) << (W_ALPHA - 1)) : rnd(W_ALPHA);
          m.a_im[0] = (s % 5 == 0) ? -(longint'(1) << (W_ALPHA - 1)) : rnd(W_ALPHA);
          alpha_re = W_ALPHA'(m.a_re[0]);
          alpha_im = W_ALPHA'(m.a_im[0]);
        end
        rr = (s % 5 == 0) ? -(longint'(1) << (W_SAMPLE - 1)) : rnd(W_SAMPLE);
        ri = (s % 5 == 0) ? (longint'(1) << (W_SAMPLE - 1)) - 1 : rnd(W_SAMPLE);
        chip_valid = 1;
        chip_last  = (c == SF - 1);
        code       = (s % 5 == 0) ? 1'b0 : 1'($urandom);
        r_re = W_SAMPLE'(rr); r_im = W_SAMPLE'(ri);
        m.push_sample(rr, ri);
        m.chip(code, chip_last, cycle);
      end
    end
    @(negedge clk) chip_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (q0 != NSYM || q1 != NSYM) begin
      failures++; $display("FAIL: %0d / %0d of %0d outputs", q0, q1, NSYM);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSYM * SF * 2 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
