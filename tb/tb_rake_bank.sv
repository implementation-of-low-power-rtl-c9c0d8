// tb_rake_bank: end-to-end test of the base-station RAKE bank at its default
// size (50 users, 5 fingers each, 64-chip symbols, 32-chip delay line,
// pipelined three-multiplier complex products).
//
// One random received chip stream is shared by all users. Every user has its
// own random code, its own symbol phase (users are asynchronous), its own
// unevenly spaced finger taps that are redrawn every few symbols, and channel
// weights redrawn in the middle of every symbol. Random idle cycles stall the
// chip stream. Each user's output is compared with its own reference model and
// must appear exactly 4 + PIPELINE cycles after that user's last chip. The
// test also counts how often each mechanism happened (symbol dumps, idle
// cycles, tap changes, uneven tap sets, weight changes, cycles in which only
// some users dump) and fails if any never did.
module tb_rake_bank;
  import rake_ref_pkg::*;
  localparam int unsigned K         = rake_pkg::K_USERS;
  localparam int unsigned L         = rake_pkg::L_FINGERS;
  localparam int unsigned W_SAMPLE  = rake_pkg::W_SAMPLE;
  localparam int unsigned W_ALPHA   = rake_pkg::W_ALPHA;
  localparam int unsigned SF        = rake_pkg::SF;
  localparam int unsigned MAX_DELAY = rake_pkg::MAX_DELAY;
  localparam int unsigned DW        = $clog2(MAX_DELAY);
  localparam int unsigned WO        = W_ALPHA + rake_pkg::corr_width(W_SAMPLE, SF) + 1 + $clog2(L);
  localparam int          LAT       = 4 + int'(rake_pkg::PIPELINE);
  localparam int unsigned NCHIP     = SF * 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                                      chip_valid;
  logic signed [W_SAMPLE-1:0]                rx_re, rx_im;
  logic        [K-1:0]                       code, sym_last, sym_valid;
  logic        [K-1:0][L-1:0][DW-1:0]        delay;
  logic signed [K-1:0][L-1:0][W_ALPHA-1:0]   alpha_re, alpha_im;
  logic signed [K-1:0][WO-1:0]               sym_re, sym_im;

  rake_bank dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_sym = 0, n_gap = 0, n_redelay = 0, n_uneven = 0, n_alpha = 0, n_partial = 0;
  int q[K];
  int phase[K];
  rake_user_model m[K];
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n) begin
    if (sym_valid != '0 && sym_valid != '1) n_partial++;
    for (int u = 0; u < K; u++) if (sym_valid[u]) begin
      checks++;
      n_sym++;
      if (q[u] >= m[u].exp_re.size()) begin
        failures++; $display("FAIL user %0d: unexpected output", u);
      end else begin
        if (longint'(signed'(sym_re[u])) != m[u].exp_re[q[u]] || longint'(signed'(sym_im[u])) != m[u].exp_im[q[u]] ||
            cycle - m[u].exp_cyc[q[u]] != LAT) begin
          failures++;
          $display("FAIL user %0d #%0d: got (%0d,%0d) after %0d, expected (%0d,%0d) after %0d",
                   u, q[u], sym_re[u], sym_im[u], cycle - m[u].exp_cyc[q[u]],
                   m[u].exp_re[q[u]], m[u].exp_im[q[u]], LAT);
        end
        q[u]++;
      end
    end
  end

  function automatic longint rnd(int unsigned w);
    return longint'($urandom_range(0, (1 << w) - 1)) - (longint'(1) << (w - 1));
  endfunction

  task automatic draw_delays(int u);
    int used[int];
    int d[L];
    bit uneven = 0;
    for (int k = 0; k < L; k++) begin
      do d[k] = $urandom_range(0, MAX_DELAY - 1); while (used.exists(d[k]));
      used[d[k]] = 1;
      m[u].delay[k] = d[k];
      delay[u][k] = DW'(d[k]);
    end
    d.sort();
    for (int k = 2; k < L; k++) if (d[k] - d[k-1] != d[1] - d[0]) uneven = 1;
    if (uneven) n_uneven++;
    n_redelay++;
  endtask

  initial begin
    longint rr, ri;
    int c;
    chip_valid = 0; rx_re = '0; rx_im = '0; code = '0; sym_last = '0;
    delay = '0; alpha_re = '0; alpha_im = '0;
    for (int u = 0; u < K; u++) begin
      m[u] = new(L, MAX_DELAY);
      q[u] = 0;
      phase[u] = $urandom_range(0, SF - 1);
      draw_delays(u);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < NCHIP; n++) begin
      @(negedge clk);
      while ($urandom_range(0, 7) == 0) begin
        chip_valid = 0; rx_re = W_SAMPLE'($urandom); code = K'({$urandom, $urandom});
        sym_last = K'({$urandom, $urandom});
        n_gap++;
        @(negedge clk);
      end
      rr = rnd(W_SAMPLE); ri = rnd(W_SAMPLE);
      chip_valid = 1;
      rx_re = W_SAMPLE'(rr); rx_im = W_SAMPLE'(ri);
      for (int u = 0; u < K; u++) begin
        c = (n + phase[u]) % SF;
        if (c == 0 && ((n + phase[u]) / SF) % 3 == 2) draw_delays(u);
        if (c == SF / 2) begin
          for (int k = 0; k < L; k++) begin
            m[u].a_re[k] = rnd(W_ALPHA); m[u].a_im[k] = rnd(W_ALPHA);
            alpha_re[u][k] = W_ALPHA'(m[u].a_re[k]); alpha_im[u][k] = W_ALPHA'(m[u].a_im[k]);
          end
          n_alpha++;
        end
        code[u]     = 1'($urandom);
        sym_last[u] = (c == SF - 1);
        m[u].push_sample(rr, ri);
        m[u].chip(code[u], sym_last[u], cycle);
      end
    end
    @(negedge clk) chip_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    for (int u = 0; u < K; u++) begin
      checks++;
      if (q[u] != m[u].nsym || q[u] == 0) begin
        failures++; $display("FAIL user %0d: %0d of %0d symbols", u, q[u], m[u].nsym);
      end
    end
    $display("symbols=%0d idle_cycles=%0d tap_sets=%0d uneven_tap_sets=%0d weight_updates=%0d partial_dump_cycles=%0d",
             n_sym, n_gap, n_redelay, n_uneven, n_alpha, n_partial);
    checks++;
    if (n_sym == 0 || n_gap == 0 || n_redelay <= K || n_uneven == 0 || n_alpha == 0 || n_partial == 0) begin
      failures++; $display("FAIL: a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCHIP * 3 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
