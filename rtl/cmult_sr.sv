// cmult_sr: complex multiplier built with three real multipliers (strength
// reduction).
//
// The product C = A*B is normally four real multiplications and two additions.
// Rewriting it as
//     C_R = (A_R - A_I)*B_I + A_R*(B_R - B_I)
//     C_I = (A_R - A_I)*B_I + A_I*(B_R + B_I)
// shares the (A_R - A_I)*B_I term, so three multipliers and five adders do the
// job: three adders in front (B_R-B_I, B_R+B_I, A_R-A_I), two behind. Since a
// multiplier switches far more nodes than an adder, this saves power and area.
// In the RAKE finger, A is the conjugate channel weight and B the correlator
// output.
//
// The cost is a longer combinational path, two adders plus a multiplier. With
// PIPELINE = 1 (default, this design's choice) a register sits between the
// multipliers and the output adders, so each stage has at most one adder and
// one multiplier; with PIPELINE = 0 the whole expression is one stage.
//
// Interface: operands and in_valid are sampled on the rising clock edge;
// c_re/c_im and out_valid appear 1 + PIPELINE cycles later. One product per
// cycle. All arithmetic is two's complement and exact: the outputs carry
// WA+WB+1 bits, enough for any product of WA-bit and WB-bit complex numbers.
// rst_n is a synchronous active-low reset of the valid flags.
module cmult_sr #(
  parameter int unsigned WA       = rake_pkg::W_ALPHA,
  parameter int unsigned WB       = rake_pkg::corr_width(rake_pkg::W_SAMPLE, rake_pkg::SF),
  parameter bit          PIPELINE = rake_pkg::PIPELINE,
  localparam int unsigned WC      = WA + WB + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [WA-1:0] a_re,
  input  logic signed [WA-1:0] a_im,
  input  logic signed [WB-1:0] b_re,
  input  logic signed [WB-1:0] b_im,
  output logic                 out_valid,
  output logic signed [WC-1:0] c_re,
  output logic signed [WC-1:0] c_im
);

  // Products are WA+WB+1 bits wide. The two terms of each output sum may
  // each be that wide, but their sum is the true complex product, which always
  // fits in WC = WP bits, so the output adders are WC bits wide and exact.
  localparam int unsigned WP = WA + WB + 1;

  // Pre-adders.
  logic signed [WB:0]   b_diff, b_sum;   // B_R - B_I, B_R + B_I
  logic signed [WA:0]   a_diff;          // A_R - A_I
  // The three real products.
  logic signed [WP-1:0] p_r, p_i, p_c;   // A_R*(B_R-B_I), A_I*(B_R+B_I), (A_R-A_I)*B_I

  always_comb begin
    b_diff = (WB+1)'(b_re) - (WB+1)'(b_im);
    b_sum  = (WB+1)'(b_re) + (WB+1)'(b_im);
    a_diff = (WA+1)'(a_re) - (WA+1)'(a_im);
    p_r    = WP'(a_re)   * WP'(b_diff);
    p_i    = WP'(a_im)   * WP'(b_sum);
    p_c    = WP'(a_diff) * WP'(b_im);
  end

  // Optional pipeline register after the multipliers.
  logic                 m_valid;
  logic signed [WP-1:0] m_r, m_i, m_c;

  if (PIPELINE) begin : g_pipe
    always_ff @(posedge clk) begin
      if (!rst_n) m_valid <= 1'b0;
      else        m_valid <= in_valid;
      if (in_valid) begin
        m_r <= p_r;
        m_i <= p_i;
        m_c <= p_c;
      end
    end
  end else begin : g_comb
    always_comb begin
      m_valid = in_valid;
      m_r     = p_r;
      m_i     = p_i;
      m_c     = p_c;
    end
  end

  // Post-adders and output register.
  logic signed [WC-1:0] s_re, s_im;
  always_comb begin
    s_re = m_c + m_r;
    s_im = m_c + m_i;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= m_valid;
    if (m_valid) begin
      c_re <= s_re;
      c_im <= s_im;
    end
  end

endmodule
