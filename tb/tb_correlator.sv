// tb_correlator: self-checking test of the integrate-and-dump despreader.
//
// Random samples and code chips are fed with random idle cycles and random
// symbol lengths from 1 to SF chips, including full-scale samples that
// exercise the accumulator's full width. The testbench keeps its own running
// sum of +/- sample per symbol and checks each dumped value, and that it is
// valid exactly one cycle after the symbol's last chip was sampled.
module tb_correlator;
  localparam int unsigned W  = 6;
  localparam int unsigned SF = 16;
  localparam int unsigned WO = W + $clog2(SF) + 1;
  localparam int unsigned NSYM = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 chip_valid, chip_last, code;
  logic signed [W-1:0]  in_re, in_im;
  logic                 out_valid;
  logic signed [WO-1:0] out_re, out_im;

  correlator #(.W(W), .SF(SF)) dut (.*);

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
        $display("FAIL: got (%0d,%0d) after %0d cycles, expected (%0d,%0d) after 1",
                 out_re, out_im, cycle - ec, er, ei);
      end
    end
    nout++;
  end

  initial begin
    longint ar, ai, sr, si;
    int len;
    bit full;
    chip_valid = 0; chip_last = 0; code = 0; in_re = '0; in_im = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = 0; s < NSYM; s++) begin
      len  = (s % 4 == 0) ? SF : $urandom_range(1, SF);
      full = (s % 7 == 3);     // full-scale symbol: every chip at the extreme
      ar = 0; ai = 0;
      for (int c = 0; c < len; c++) begin
        @(negedge clk);
        while ($urandom_range(0, 4) == 0) begin
          chip_valid = 0; chip_last = 1; code = 1'($urandom);
          in_re = W'($urandom); in_im = W'($urandom);
          @(negedge clk);
        end
        chip_valid = 1;
        chip_last  = (c == len - 1);
        code       = full ? 1'b1 : 1'($urandom);
        sr = full ? -(64'sd1 <<< (W - 1)) : longint'($urandom_range(0, (1 << W) - 1)) - (1 << (W - 1));
        si = full ? (64'sd1 <<< (W - 1)) - 1 : longint'($urandom_range(0, (1 << W) - 1)) - (1 << (W - 1));
        in_re = W'(sr); in_im = W'(si);
        ar += code ? -sr : sr;
        ai += code ? -si : si;
        if (chip_last) begin
          exp_re.push_back(ar); exp_im.push_back(ai); exp_cyc.push_back(cycle);
        end
      end
    end
    @(negedge clk) chip_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (nout != NSYM) begin
      failures++; $display("FAIL: %0d of %0d symbols dumped", nout, NSYM);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
