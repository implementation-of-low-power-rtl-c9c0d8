// tb_delay_line: self-checking test of the tapped delay line.
//
// Samples are shifted in with random gaps while every tap is moved to random
// positions, including values past the end of the line (which must read zero
// when the line length is not a power of two). The testbench keeps its own
// copy of the sample history and checks every output in every cycle.
module tb_delay_line;
  localparam int unsigned N_TAPS    = 4;
  localparam int unsigned W         = 6;
  localparam int unsigned MAX_DELAY = 20;
  localparam int unsigned DW        = $clog2(MAX_DELAY);
  localparam int unsigned NCYC      = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                            shift;
  logic signed [W-1:0]             in_re, in_im;
  logic [N_TAPS-1:0][DW-1:0]       tap;
  logic signed [N_TAPS-1:0][W-1:0] out_re, out_im;

  delay_line #(.N_TAPS(N_TAPS), .W(W), .MAX_DELAY(MAX_DELAY)) dut (.*);

  int checks = 0, failures = 0, nshift = 0, nbeyond = 0;
  logic [W-1:0] h_re[$], h_im[$];   // newest first

  initial begin
    shift = 0; in_re = '0; in_im = '0; tap = '0;
    for (int i = 0; i < MAX_DELAY; i++) begin h_re.push_back('0); h_im.push_back('0); end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      // the registers now hold the history: check every tap
      for (int k = 0; k < N_TAPS; k++) begin
        logic [W-1:0] er, ei;
        er = (int'(tap[k]) < MAX_DELAY) ? h_re[tap[k]] : '0;
        ei = (int'(tap[k]) < MAX_DELAY) ? h_im[tap[k]] : '0;
        if (int'(tap[k]) >= MAX_DELAY) nbeyond++;
        checks++;
        if (out_re[k] != er || out_im[k] != ei) begin
          failures++;
          $display("FAIL cycle %0d tap %0d=%0d: got (%0d,%0d) expected (%0d,%0d)",
                   n, k, tap[k], out_re[k], out_im[k], er, ei);
        end
      end
      // next stimulus
      shift = ($urandom_range(0, 3) != 0);
      in_re = W'($urandom); in_im = W'($urandom);
      if ($urandom_range(0, 7) == 0 || n < 2) tap = (N_TAPS * DW)'({$urandom, $urandom});
      if (shift) begin
        h_re.push_front(in_re); h_im.push_front(in_im);
        void'(h_re.pop_back()); void'(h_im.pop_back());
        nshift++;
      end
    end
    checks++;
    if (nshift == 0 || nbeyond == 0) begin
      failures++; $display("FAIL: shifts %0d, out-of-range taps %0d", nshift, nbeyond);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
