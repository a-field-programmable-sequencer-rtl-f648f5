// state_transition_decoder - chooses which of the four address paths of the
// PMU selector is switched on in the current cycle.
//
// The document gives the decoder's inputs (the SCC bits read from the Flag
// Field, the carry flag CF[1] and the condition input CND) and its output
// (one of four selector switches on, Fig. 5 shows codes X00..X11 mapped to
// one-hot patterns 0001..1000). It says the count stops at a word with CF=1
// and that with CND=1 at such a word the external register is loaded again
// (Fig. 8(b)). The rules below are this design's reading:
//
//   en = 0                  -> current address (the PMU waits)
//   en = 1, cf1 = 1, cnd=1  -> external address (reload)
//   en = 1, cf1 = 1, cnd=0  -> current address (stop at the terminal word)
//   en = 1, cf1 = 0         -> path coded by SCC[1:0]
//
// The one-hot output bit i switches on path code i (see fpsm_pkg::path_e).
// Purely combinational.
module state_transition_decoder
  import fpsm_pkg::*;
(
  input  logic [1:0] scc,    // SCC[1:0] of the current word
  input  logic       cf1,    // CF[1] of the current word
  input  logic       cnd,    // condition input
  input  logic       en,     // PMU enable
  output logic [3:0] sw_on   // one-hot selector switch control
);

  path_e path;

  always_comb begin
    if (!en)            path = PATH_CUR;
    else if (cf1 && cnd) path = PATH_EXT;
    else if (cf1)        path = PATH_CUR;
    else                 path = path_e'(scc);
    sw_on = 4'b0001 << path;
  end

endmodule
