// rake_bank: the RAKE receiver bank of a CDMA base station.
//
// A base station needs one RAKE receiver per active user. All K_USERS
// receivers listen to the same received baseband signal; each has its own
// signature sequence, symbol timing, finger delays and channel weights, and
// produces its own combined statistic for a decision device. With the default
// 50 users of 5 fingers this is 250 complex multipliers, each built with three
// real multipliers instead of four, which is where the bank saves most of its
// power and area. Users are not assumed to be symbol-synchronous.
//
// Interface: chip_valid, rx_re and rx_im are common. code[u] and sym_last[u]
// are user u's code chip (1 = -1) and symbol-end marker, aligned to that
// user's latest path; delay[u][k] and alpha_re/alpha_im[u][k] set finger k of
// user u (see rake_receiver). sym_valid[u] pulses 4 + PIPELINE cycles after
// user u's sym_last chip, with sym_re[u]/sym_im[u] valid then and held.
// rst_n is a synchronous active-low reset.
module rake_bank #(
  parameter int unsigned K_USERS   = rake_pkg::K_USERS,
  parameter int unsigned L_FINGERS = rake_pkg::L_FINGERS,
  parameter int unsigned W_SAMPLE  = rake_pkg::W_SAMPLE,
  parameter int unsigned W_ALPHA   = rake_pkg::W_ALPHA,
  parameter int unsigned SF        = rake_pkg::SF,
  parameter int unsigned MAX_DELAY = rake_pkg::MAX_DELAY,
  parameter bit          PIPELINE  = rake_pkg::PIPELINE,
  localparam int unsigned DW       = (MAX_DELAY > 1) ? $clog2(MAX_DELAY) : 1,
  localparam int unsigned WO       = W_ALPHA + rake_pkg::corr_width(W_SAMPLE, SF) + 1
                                   + ((L_FINGERS > 1) ? $clog2(L_FINGERS) : 0)
) (
  input  logic                                                  clk,
  input  logic                                                  rst_n,
  input  logic                                                  chip_valid,
  input  logic signed [W_SAMPLE-1:0]                            rx_re,
  input  logic signed [W_SAMPLE-1:0]                            rx_im,
  input  logic        [K_USERS-1:0]                             code,
  input  logic        [K_USERS-1:0]                             sym_last,
  input  logic        [K_USERS-1:0][L_FINGERS-1:0][DW-1:0]      delay,
  input  logic signed [K_USERS-1:0][L_FINGERS-1:0][W_ALPHA-1:0] alpha_re,
  input  logic signed [K_USERS-1:0][L_FINGERS-1:0][W_ALPHA-1:0] alpha_im,
  output logic        [K_USERS-1:0]                             sym_valid,
  output logic signed [K_USERS-1:0][WO-1:0]                     sym_re,
  output logic signed [K_USERS-1:0][WO-1:0]                     sym_im
);

  for (genvar u = 0; u < K_USERS; u++) begin : g_user
    rake_receiver #(
      .L_FINGERS(L_FINGERS), .W_SAMPLE(W_SAMPLE), .W_ALPHA(W_ALPHA),
      .SF(SF), .MAX_DELAY(MAX_DELAY), .PIPELINE(PIPELINE)
    ) u_rx (
      .clk, .rst_n, .chip_valid, .rx_re, .rx_im,
      .code(code[u]), .sym_last(sym_last[u]),
      .delay(delay[u]), .alpha_re(alpha_re[u]), .alpha_im(alpha_im[u]),
      .sym_valid(sym_valid[u]), .sym_re(sym_re[u]), .sym_im(sym_im[u])
    );
  end

endmodule
