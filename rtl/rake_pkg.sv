// rake_pkg: default sizes shared by the RAKE receiver modules.
//
// The user and finger counts are the upper ends of the typical base-station
// figures (30 to 50 users, 3 to 5 resolvable paths per user), and the 6-bit
// sample width is the upper end of the 4 to 6 bits known to be enough for
// CDMA baseband signals. The weight width, spreading factor and delay-line
// length are this design's own choices. Every module takes these as the
// defaults of typed parameters, so any of them can be overridden per instance.
package rake_pkg;

  localparam int unsigned K_USERS   = 50; // active users per base station
  localparam int unsigned L_FINGERS = 5;  // fingers (resolved paths) per user
  localparam int unsigned W_SAMPLE  = 6;  // received baseband sample width
  localparam int unsigned W_ALPHA   = 6;  // channel-weight width (alpha_k*)
  localparam int unsigned SF        = 64; // chips per symbol (sizes the correlator)
  localparam int unsigned MAX_DELAY = 32; // delay-line length in chips
  localparam bit          PIPELINE  = 1'b1; // register inside the SR multiplier

  // Width of a correlator output: SF products of a W-bit sample and +/-1.
  function automatic int unsigned corr_width(int unsigned w, int unsigned sf);
    return w + $clog2(sf) + 1;
  endfunction

endpackage
