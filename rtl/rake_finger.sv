// rake_finger: one finger of a RAKE receiver.
//
// The finger despreads the (already delayed) received signal with the user's
// code in a correlator, then weights the symbol-rate correlation by the
// conjugate channel estimate alpha_k* of its path. The weighting is done by
// the three-multiplier strength-reduced complex multiplier (cmult_sr), which
// is the point of this design: the finger's complex multiplier dominates the
// receiver's power, and this form of it needs one real multiplier fewer.
//
// Interface: chip inputs as for correlator. alpha_re/alpha_im are sampled in
// the cycle the correlation is dumped, so a new weight applies to the next
// symbol output. out_valid pulses 2 + PIPELINE cycles after the chip_last
// chip; out_re/out_im are exact (W_ALPHA + correlator width + 1 bits).
module rake_finger #(
  parameter int unsigned W_SAMPLE = rake_pkg::W_SAMPLE,
  parameter int unsigned W_ALPHA  = rake_pkg::W_ALPHA,
  parameter int unsigned SF       = rake_pkg::SF,
  parameter bit          PIPELINE = rake_pkg::PIPELINE,
  localparam int unsigned WCORR   = rake_pkg::corr_width(W_SAMPLE, SF),
  localparam int unsigned WO      = W_ALPHA + WCORR + 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       chip_valid,
  input  logic                       chip_last,
  input  logic                       code,
  input  logic signed [W_SAMPLE-1:0] r_re,
  input  logic signed [W_SAMPLE-1:0] r_im,
  input  logic signed [W_ALPHA-1:0]  alpha_re,
  input  logic signed [W_ALPHA-1:0]  alpha_im,
  output logic                       out_valid,
  output logic signed [WO-1:0]       out_re,
  output logic signed [WO-1:0]       out_im
);

  logic                    corr_valid;
  logic signed [WCORR-1:0] corr_re, corr_im;

  correlator #(.W(W_SAMPLE), .SF(SF)) u_corr (
    .clk, .rst_n, .chip_valid, .chip_last, .code,
    .in_re(r_re), .in_im(r_im),
    .out_valid(corr_valid), .out_re(corr_re), .out_im(corr_im)
  );

  // A = alpha_k* (coefficient side of Fig. 2b), B = correlator output.
  cmult_sr #(.WA(W_ALPHA), .WB(WCORR), .PIPELINE(PIPELINE)) u_mult (
    .clk, .rst_n,
    .in_valid(corr_valid),
    .a_re(alpha_re), .a_im(alpha_im),
    .b_re(corr_re),  .b_im(corr_im),
    .out_valid, .c_re(out_re), .c_im(out_im)
  );

endmodule
