// correlator: integrate-and-dump despreader of one RAKE finger.
//
// Each valid chip, the complex input sample is multiplied by the current code
// chip of the user's signature sequence (+1 or -1, so the "multiplier" is a
// conditional negation) and added to an accumulator. On the chip flagged
// chip_last the accumulated sum, including that chip, is handed to the output
// and the accumulator starts again from zero. The despreading by the user's
// code is what the RAKE finger needs; the sign-flipping accumulator is this
// design's choice as the simplest circuit that does it.
//
// Interface: code = 0 means +1, code = 1 means -1. Inputs are sampled on the
// rising edge when chip_valid is high. out_valid pulses for one cycle, the
// cycle after the chip_last chip, with out_re/out_im held until the next
// symbol. The accumulator is W+clog2(SF)+1 bits, wide enough for SF chips of
// any W-bit sample; symbols longer than SF chips may wrap. rst_n is a
// synchronous active-low reset.
module correlator #(
  parameter int unsigned W  = rake_pkg::W_SAMPLE,
  parameter int unsigned SF = rake_pkg::SF,
  localparam int unsigned WO = rake_pkg::corr_width(W, SF)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 chip_valid,
  input  logic                 chip_last,
  input  logic                 code,
  input  logic signed [W-1:0]  in_re,
  input  logic signed [W-1:0]  in_im,
  output logic                 out_valid,
  output logic signed [WO-1:0] out_re,
  output logic signed [WO-1:0] out_im
);

  logic signed [WO-1:0] acc_re, acc_im;
  logic signed [WO-1:0] sum_re, sum_im;

  // Accumulator plus the despread current chip.
  always_comb begin
    sum_re = code ? acc_re - WO'(in_re) : acc_re + WO'(in_re);
    sum_im = code ? acc_im - WO'(in_im) : acc_im + WO'(in_im);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_re    <= '0;
      acc_im    <= '0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= chip_valid && chip_last;
      if (chip_valid) begin
        if (chip_last) begin
          out_re <= sum_re;
          out_im <= sum_im;
          acc_re <= '0;
          acc_im <= '0;
        end else begin
          acc_re <= sum_re;
          acc_im <= sum_im;
        end
      end
    end
  end

endmodule
