// delay_line: tapped delay line of received chip samples.
//
// The received complex samples are shifted through a chain of MAX_DELAY
// registers, one step per valid chip. Each of the N_TAPS outputs picks one
// position of the chain with its own tap number, so the fingers of a RAKE
// receiver can be placed at unevenly spaced path delays. The register chain
// with one multiplexer per output is this design's own construction of the
// delay line.
//
// Interface: when shift is high the sample on in_re/in_im is captured on the
// rising edge. out_re[k]/out_im[k] is then the sample captured tap[k]+1 shifts
// ago (tap 0 is the newest stored sample); the outputs are combinational from
// the registers and the tap inputs. Tap values of MAX_DELAY or more read
// zero. rst_n is a synchronous active-low reset that clears the chain.
module delay_line #(
  parameter int unsigned N_TAPS    = rake_pkg::L_FINGERS,
  parameter int unsigned W         = rake_pkg::W_SAMPLE,
  parameter int unsigned MAX_DELAY = rake_pkg::MAX_DELAY,
  localparam int unsigned DW       = (MAX_DELAY > 1) ? $clog2(MAX_DELAY) : 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            shift,
  input  logic signed [W-1:0]             in_re,
  input  logic signed [W-1:0]             in_im,
  input  logic [N_TAPS-1:0][DW-1:0]       tap,
  output logic signed [N_TAPS-1:0][W-1:0] out_re,
  output logic signed [N_TAPS-1:0][W-1:0] out_im
);

  logic signed [MAX_DELAY-1:0][W-1:0] hist_re, hist_im;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hist_re <= '0;
      hist_im <= '0;
    end else if (shift) begin
      hist_re <= {hist_re[MAX_DELAY-2:0], in_re};
      hist_im <= {hist_im[MAX_DELAY-2:0], in_im};
    end
  end

  always_comb begin
    for (int k = 0; k < N_TAPS; k++) begin
      if (32'(tap[k]) < MAX_DELAY) begin
        out_re[k] = hist_re[tap[k]];
        out_im[k] = hist_im[tap[k]];
      end else begin
        out_re[k] = '0;
        out_im[k] = '0;
      end
    end
  end

endmodule
