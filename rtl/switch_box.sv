// switch_box - Switch Box (SB) of the FPSM array (Fig. 6).
//
// Signals travel in 4-bit nibbles. The SB takes IN1, IN2, IN3 from the PMU
// west of it and one nibble from the SB to the north. The Input Selector
// places one of these four on each of the four global wires g1..g4. The
// Output Selector drives OUT1..OUT5 to the PMU east of it, each chosen from
// IN1, IN2 (the direct cascade path) and g1..g4; this design adds two
// constant choices (all zeros, all ones) so that an input such as EN can be
// tied off. One global wire, chosen by south_sel, goes to the SB south.
//
// Bus Switch: the document's global wires are bidirectional. Here each wire
// is a pair of one-way lanes (eastward and westward) and every SB sets, per
// wire, whether its g is local, driven from its input selector to both
// neighbours, taken from the west lane and passed east, or taken from the
// east lane and passed west. A lane that an SB does not drive carries zero.
//
// The configuration register (sb_cfg_t, 35 bits used) is written and read
// as three 16-bit words by the MCU Interface (cfg_we, cfg_idx). Besides the
// routing it holds the mode bits of the PMU east of this SB, since the
// document keeps PMU connections and mode selection in SB registers. Reset
// clears it: every PMU then is plain memory and all routing is local.
// Routing is combinational; only the register is clocked.
module switch_box
  import fpsm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // configuration access
  input  logic        cfg_we,
  input  logic [1:0]  cfg_idx,
  input  logic [15:0] cfg_wdata,
  output logic [15:0] cfg_rdata,
  output sb_cfg_t     cfg,
  // local wiring
  input  nib_t [2:0]  in,        // IN1..IN3 from the west PMU
  input  nib_t        north,     // from the north SB
  output nib_t [4:0]  out,       // OUT1..OUT5 to the east PMU
  output nib_t        south,     // to the south SB
  // global wiring (g1..g4), one lane per direction
  input  nib_t [3:0]  west_i,    // eastward lane arriving from the west SB
  output nib_t [3:0]  west_o,    // westward lane leaving to the west SB
  input  nib_t [3:0]  east_i,    // westward lane arriving from the east SB
  output nib_t [3:0]  east_o     // eastward lane leaving to the east SB
);

  logic [16*SB_CFG_WORDS-1:0] cfg_q;
  nib_t [3:0] isel_v;   // input selector outputs
  nib_t [3:0] g;        // global wires at this SB

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg_q <= '0;
    else if (cfg_we && cfg_idx < 2'(SB_CFG_WORDS)) cfg_q[16*cfg_idx +: 16] <= cfg_wdata;
  end

  assign cfg       = sb_cfg_t'(cfg_q);
  assign cfg_rdata = (cfg_idx < 2'(SB_CFG_WORDS)) ? cfg_q[16*cfg_idx +: 16] : 16'h0;

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      unique case (isel_e'(cfg.isel[2*k +: 2]))
        ISEL_IN1:   isel_v[k] = in[0];
        ISEL_IN2:   isel_v[k] = in[1];
        ISEL_IN3:   isel_v[k] = in[2];
        ISEL_NORTH: isel_v[k] = north;
      endcase
    end
  end

  // Bus switch
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      west_o[k] = '0;
      east_o[k] = '0;
      unique case (bsw_e'(cfg.bsw[2*k +: 2]))
        BSW_LOCAL: g[k] = isel_v[k];
        BSW_DRIVE: begin
          g[k]      = isel_v[k];
          west_o[k] = isel_v[k];
          east_o[k] = isel_v[k];
        end
        BSW_FROM_WEST: begin
          g[k]      = west_i[k];
          east_o[k] = west_i[k];
        end
        BSW_FROM_EAST: begin
          g[k]      = east_i[k];
          west_o[k] = east_i[k];
        end
      endcase
    end
  end

  // Output selector
  always_comb begin
    for (int j = 0; j < 5; j++) begin
      unique case (osel_e'(cfg.osel[3*j +: 3]))
        OSEL_IN1:  out[j] = in[0];
        OSEL_IN2:  out[j] = in[1];
        OSEL_G1:   out[j] = g[0];
        OSEL_G2:   out[j] = g[1];
        OSEL_G3:   out[j] = g[2];
        OSEL_G4:   out[j] = g[3];
        OSEL_ZERO: out[j] = 4'h0;
        OSEL_ONES: out[j] = 4'hF;
      endcase
    end
  end

  assign south = g[cfg.south_sel];

endmodule
