// tb_rake_receiver: self-checking test of one user's RAKE receiver.
//
// A small configuration (3 fingers, 16-chip symbols, a 12-chip delay line,
// no multiplier pipeline register) is driven with random received samples and
// code chips, random idle cycles, and finger delays that are redrawn every
// few symbols as distinct, unevenly spaced taps. The channel weights change in
// the middle of each symbol. Every combined output is compared with the
// reference model, and must appear exactly 4 + PIPELINE cycles after the
// symbol's last chip.
module tb_rake_receiver;
  import rake_ref_pkg::*;
  localparam int unsigned L         = 3;
  localparam int unsigned W_SAMPLE  = 6;
  localparam int unsigned W_ALPHA   = 6;
  localparam int unsigned SF        = 16;
  localparam int unsigned MAX_DELAY = 12;
  localparam bit          PIPELINE  = 1'b0;
  localparam int unsigned DW        = $clog2(MAX_DELAY);
  localparam int unsigned WO        = W_ALPHA + W_SAMPLE + $clog2(SF) + 2 + $clog2(L);
  localparam int unsigned NSYM      = 200;
  localparam int          LAT       = 4 + int'(PIPELINE);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                               chip_valid, code, sym_last, sym_valid;
  logic signed [W_SAMPLE-1:0]         rx_re, rx_im;
  logic        [L-1:0][DW-1:0]        delay;
  logic signed [L-1:0][W_ALPHA-1:0]   alpha_re, alpha_im;
  logic signed [WO-1:0]               sym_re, sym_im;

  rake_receiver #(.L_FINGERS(L), .W_SAMPLE(W_SAMPLE), .W_ALPHA(W_ALPHA), .SF(SF),
                  .MAX_DELAY(MAX_DELAY), .PIPELINE(PIPELINE)) dut (.*);

  int checks = 0, failures = 0, cycle = 0, q = 0;
  int n_gap = 0, n_uneven = 0, n_redelay = 0;
  rake_user_model m;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n && sym_valid) begin
    checks++;
    if (q >= m.exp_re.size()) begin
      failures++; $display("FAIL: unexpected output");
    end else begin
      if (longint'(sym_re) != m.exp_re[q] || longint'(sym_im) != m.exp_im[q] ||
          cycle - m.exp_cyc[q] != LAT) begin
        failures++;
        $display("FAIL #%0d: got (%0d,%0d) after %0d, expected (%0d,%0d) after %0d",
                 q, sym_re, sym_im, cycle - m.exp_cyc[q], m.exp_re[q], m.exp_im[q], LAT);
      end
      q++;
    end
  end

  function automatic longint rnd(int unsigned w);
    return longint'($urandom_range(0, (1 << w) - 1)) - (longint'(1) << (w - 1));
  endfunction

  // Distinct taps; counts the sets whose spacing is uneven.
  task automatic draw_delays();
    int used[int];
    int d[L];
    for (int k = 0; k < L; k++) begin
      do d[k] = $urandom_range(0, MAX_DELAY - 1); while (used.exists(d[k]));
      used[d[k]] = 1;
      m.delay[k] = d[k];
      delay[k] = DW'(d[k]);
    end
    d.sort();
    if (L > 2 && d[1] - d[0] != d[2] - d[1]) n_uneven++;
    n_redelay++;
  endtask

  initial begin
    longint rr, ri;
    m = new(L, MAX_DELAY);
    chip_valid = 0; code = 0; sym_last = 0; rx_re = '0; rx_im = '0;
    alpha_re = '0; alpha_im = '0; delay = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = 0; s < NSYM; s++) begin
      for (int c = 0; c < SF; c++) begin
        @(negedge clk);
        while ($urandom_range(0, 5) == 0) begin
          chip_valid = 0; rx_re = W_SAMPLE'($urandom); code = 1'($urandom); sym_last = 1'($urandom);
          n_gap++;
          @(negedge clk);
        end
        // taps move only at a symbol start, weights mid-symbol
        if (c == 0 && s % 8 == 0) draw_delays();
        if (c == SF / 2) begin
          for (int k = 0; k < L; k++) begin
            m.a_re[k] = rnd(W_ALPHA); m.a_im[k] = rnd(W_ALPHA);
            alpha_re[k] = W_ALPHA'(m.a_re[k]); alpha_im[k] = W_ALPHA'(m.a_im[k]);
          end
        end
        rr = rnd(W_SAMPLE); ri = rnd(W_SAMPLE);
        chip_valid = 1;
        sym_last   = (c == SF - 1);
        code       = 1'($urandom);
        rx_re = W_SAMPLE'(rr); rx_im = W_SAMPLE'(ri);
        m.push_sample(rr, ri);
        m.chip(code, sym_last, cycle);
      end
    end
    @(negedge clk) chip_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (q != NSYM) begin
      failures++; $display("FAIL: %0d of %0d symbols", q, NSYM);
    end
    checks++;
    if (n_gap == 0 || n_uneven == 0 || n_redelay < 2) begin
      failures++; $display("FAIL: gaps %0d uneven %0d redelay %0d", n_gap, n_uneven, n_redelay);
    end
    $display("symbols=%0d idle_cycles=%0d tap_sets=%0d uneven_tap_sets=%0d", q, n_gap, n_redelay, n_uneven);
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
