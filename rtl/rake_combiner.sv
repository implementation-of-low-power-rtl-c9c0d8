// rake_combiner: maximum-ratio combiner of a RAKE receiver.
//
// Each finger output is already weighted by the conjugate of its path's
// channel estimate, so combining is a plain sum of the L complex finger
// outputs. The sum goes to the decision device. Because all fingers of a
// receiver are aligned to dump in the same cycle, one valid input serves them
// all; the adder tree is left to synthesis.
//
// Interface: in_re[k]/in_im[k] are finger k's outputs, sampled on the rising
// edge when in_valid is high. out_valid and the sum follow one cycle later.
// The output is W + clog2(L_FINGERS) bits, so the sum never overflows.
// rst_n is a synchronous active-low reset.
module rake_combiner #(
  parameter int unsigned L_FINGERS = rake_pkg::L_FINGERS,
  parameter int unsigned W         = rake_pkg::W_ALPHA
                                   + rake_pkg::corr_width(rake_pkg::W_SAMPLE, rake_pkg::SF) + 1,
  localparam int unsigned WO       = W + ((L_FINGERS > 1) ? $clog2(L_FINGERS) : 0)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  input  logic signed [L_FINGERS-1:0][W-1:0] in_re,
  input  logic signed [L_FINGERS-1:0][W-1:0] in_im,
  output logic                               out_valid,
  output logic signed [WO-1:0]               out_re,
  output logic signed [WO-1:0]               out_im
);

  logic signed [WO-1:0] sum_re, sum_im;

  always_comb begin
    sum_re = '0;
    sum_im = '0;
    for (int k = 0; k < L_FINGERS; k++) begin
      sum_re += WO'(signed'(in_re[k]));
      sum_im += WO'(signed'(in_im[k]));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_re <= sum_re;
        out_im <= sum_im;
      end
    end
  end

endmodule
