// tb_rake_combiner: self-checking test of the finger combiner.
//
// Random finger outputs, with full-scale values of equal sign in some cycles
// to exercise the growth bits, are presented with random valid gaps. The
// testbench sums them itself and checks each result, and that it is valid
// exactly one cycle after its inputs were sampled.
module tb_rake_combiner;
  localparam int unsigned L  = 5;
  localparam int unsigned W  = 12;
  localparam int unsigned WO = W + $clog2(L);
  localparam int unsigned N  = 2000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                       in_valid, out_valid;
  logic signed [L-1:0][W-1:0] in_re, in_im;
  logic signed [WO-1:0]       out_re, out_im;

  rake_combiner #(.L_FINGERS(L), .W(W)) dut (.*);

  int checks = 0, failures = 0, cycle = 0, nout = 0;
  longint exp_re[$], exp_im[$];
  int     exp_cyc[$];
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_re.size() == 0) begin
      failures++; $display("FAIL: unexpected output");
    end else begin
      longint er, ei;
      int ec;
      er = exp_re.pop_front(); ei = exp_im.pop_front(); ec = exp_cyc.pop_front();
      if (longint'(out_re) != er || longint'(out_im) != ei || cycle - ec != 1) begin
        failures++;
        $display("FAIL: got (%0d,%0d) after %0d, expected (%0d,%0d)", out_re, out_im, cycle - ec, er, ei);
      end
    end
    nout++;
  end

  initial begin
    longint sr, si, vr, vi;
    in_valid = 0; in_re = '0; in_im = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      sr = 0; si = 0;
      for (int k = 0; k < L; k++) begin
        case (n % 10)
          0:       begin vr = -(64'sd1 <<< (W - 1)); vi = (64'sd1 <<< (W - 1)) - 1; end
          default: begin vr = longint'($urandom_range(0, (1 << W) - 1)) - (1 << (W - 1));
                         vi = longint'($urandom_range(0, (1 << W) - 1)) - (1 << (W - 1)); end
        endcase
        in_re[k] = W'(vr); in_im[k] = W'(vi);
        sr += vr; si += vi;
      end
      if (in_valid) begin
        exp_re.push_back(sr); exp_im.push_back(si); exp_cyc.push_back(cycle);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_re.size() != 0 || nout == 0) begin
      failures++; $display("FAIL: %0d sums missing", exp_re.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
