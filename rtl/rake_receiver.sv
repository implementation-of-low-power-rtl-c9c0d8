// rake_receiver: RAKE receiver for one user.
//
// The received baseband signal enters a tapped delay line. Each of the
// L_FINGERS fingers reads the line at its own tap, so it sees the signal
// component of one propagation path; the fingers need not be evenly spaced.
// Every finger despreads with the user's code, weights the result by the
// conjugate channel estimate of its path with a three-multiplier complex
// multiplier, and the combiner adds the L weighted outputs (maximum-ratio
// combining) into the statistic handed to the decision device.
//
// Timing convention (this design's choice): code and sym_last are aligned to
// the latest path to be combined, and delay[k] is that path's delay minus path
// k's delay, in chips. All fingers then see the same code chip and dump in the
// same cycle, which is equivalent to running each finger with the code shifted
// to its own path delay, and no de-skew buffer is needed before the combiner.
//
// Interface: rx_re/rx_im, code, sym_last and delay are sampled on the rising
// edge when chip_valid is high, so a new delay applies from that chip on;
// chip_valid may be low in any cycle (the line and the correlators then
// hold). alpha_re[k]/alpha_im[k] are alpha_k*, already conjugated; they are
// sampled when the correlators dump, on the second rising edge after the one
// that took the sym_last chip, so they should be steady around that point of
// the symbol. sym_valid pulses 4 + PIPELINE cycles after the chip_valid cycle
// carrying sym_last, with sym_re/sym_im held until the next symbol.
// rst_n is a synchronous active-low reset.
module rake_receiver #(
  parameter int unsigned L_FINGERS = rake_pkg::L_FINGERS,
  parameter int unsigned W_SAMPLE  = rake_pkg::W_SAMPLE,
  parameter int unsigned W_ALPHA   = rake_pkg::W_ALPHA,
  parameter int unsigned SF        = rake_pkg::SF,
  parameter int unsigned MAX_DELAY = rake_pkg::MAX_DELAY,
  parameter bit          PIPELINE  = rake_pkg::PIPELINE,
  localparam int unsigned DW       = (MAX_DELAY > 1) ? $clog2(MAX_DELAY) : 1,
  localparam int unsigned WF       = W_ALPHA + rake_pkg::corr_width(W_SAMPLE, SF) + 1,
  localparam int unsigned WO       = WF + ((L_FINGERS > 1) ? $clog2(L_FINGERS) : 0)
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic                                     chip_valid,
  input  logic signed [W_SAMPLE-1:0]               rx_re,
  input  logic signed [W_SAMPLE-1:0]               rx_im,
  input  logic                                     code,
  input  logic                                     sym_last,
  input  logic        [L_FINGERS-1:0][DW-1:0]      delay,
  input  logic signed [L_FINGERS-1:0][W_ALPHA-1:0] alpha_re,
  input  logic signed [L_FINGERS-1:0][W_ALPHA-1:0] alpha_im,
  output logic                                     sym_valid,
  output logic signed [WO-1:0]                     sym_re,
  output logic signed [WO-1:0]                     sym_im
);

  // Delay line; its newest stored sample is one cycle behind the input, so
  // the chip strobe, code, symbol marker and finger taps are registered to
  // match.
  logic signed [L_FINGERS-1:0][W_SAMPLE-1:0] tap_re, tap_im;
  logic        [L_FINGERS-1:0][DW-1:0]       delay_q;

  delay_line #(.N_TAPS(L_FINGERS), .W(W_SAMPLE), .MAX_DELAY(MAX_DELAY)) u_line (
    .clk, .rst_n, .shift(chip_valid), .in_re(rx_re), .in_im(rx_im),
    .tap(delay_q), .out_re(tap_re), .out_im(tap_im)
  );

  logic chip_valid_q, code_q, sym_last_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      chip_valid_q <= 1'b0;
      code_q       <= 1'b0;
      sym_last_q   <= 1'b0;
      delay_q      <= '0;
    end else begin
      chip_valid_q <= chip_valid;
      if (chip_valid) begin
        code_q     <= code;
        sym_last_q <= sym_last;
        delay_q    <= delay;
      end
    end
  end

  // Fingers.
  logic        [L_FINGERS-1:0]         f_valid;
  logic signed [L_FINGERS-1:0][WF-1:0] f_re, f_im;

  for (genvar k = 0; k < L_FINGERS; k++) begin : g_finger
    rake_finger #(
      .W_SAMPLE(W_SAMPLE), .W_ALPHA(W_ALPHA), .SF(SF), .PIPELINE(PIPELINE)
    ) u_finger (
      .clk, .rst_n,
      .chip_valid(chip_valid_q), .chip_last(sym_last_q), .code(code_q),
      .r_re(tap_re[k]), .r_im(tap_im[k]),
      .alpha_re(alpha_re[k]), .alpha_im(alpha_im[k]),
      .out_valid(f_valid[k]), .out_re(f_re[k]), .out_im(f_im[k])
    );
  end

  // All fingers share one timing, so finger 0's valid stands for all.
  rake_combiner #(.L_FINGERS(L_FINGERS), .W(WF)) u_comb (
    .clk, .rst_n, .in_valid(f_valid[0]),
    .in_re(f_re), .in_im(f_im),
    .out_valid(sym_valid), .out_re(sym_re), .out_im(sym_im)
  );

  // The fingers of one receiver must always dump together.
  a_fingers_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    f_valid == '0 || f_valid == '1)
    else $error("rake_receiver: fingers out of step");

endmodule
