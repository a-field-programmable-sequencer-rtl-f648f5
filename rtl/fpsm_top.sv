// fpsm_top - Field Programmable Sequencer and Memory (FPSM).
//
// An array of ROWS x COLS Programmable Memory Units (PMUs). In every row a
// switch box (SB) stands west of each PMU and one more at the east end, so a
// row reads SB PMU SB PMU ... PMU SB (Fig. 2). SB (r,c) feeds PMU (r,c) with
// OUT1..OUT5 and holds its mode bits; PMU (r,c) sends IN1..IN3 to SB (r,c+1).
// Global wires run along each row between neighbouring SBs; one global wire
// of each SB goes to the SB below it. The west-most SB of a row takes its
// IN1..IN3 from row_in (external events), the top row's SBs take their north
// input from north_in. The east-most SB of a row drives edge_out and a JK
// flip-flop (J = OUT1[0], K = OUT2[0]) whose output is pulse_out.
//
// The CPU reaches the FPSM through the bus state controller (window select:
// CME for the memory window, CPE for the peripheral window) and the MCU
// Interface (PMU array decoder, wait cycles, Data Out selection, SB register
// access, INT). An unconfigured PMU is 256 words of RAM in the memory window;
// a PMU configured as a peripheral is one word in the peripheral window.
// All PMUs share CLK, RST and the global EN.
//
// COLS = 4 follows the document; ROWS (n in the document) and the window
// addresses are this design's choice. See mcu_interface for the address map
// and the access timing.
module fpsm_top
  import fpsm_pkg::*;
#(
  parameter int unsigned  COLS     = 4,
  parameter int unsigned  ROWS     = 4,
  parameter logic [15:0]  MEM_BASE = 16'h8000,
  parameter logic [15:0]  PER_BASE = 16'hC000
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           en,
  // CPU bus
  input  logic                           mae,
  input  logic                           cpu_req,
  input  logic                           cpu_we,
  input  logic [15:0]                    cpu_addr,
  input  logic [15:0]                    cpu_wdata,
  output logic                           cpu_busy,
  output logic                           cpu_ready,
  output logic [15:0]                    cpu_rdata,
  output logic                           irq,
  // array edges
  input  nib_t [COLS:0]                  north_in,
  input  nib_t [ROWS-1:0][2:0]           row_in,
  output nib_t [ROWS-1:0][4:0]           edge_out,
  output nib_t [COLS:0]                  south_out,
  output logic [ROWS-1:0]                pulse_out
);

  localparam int unsigned NPMU = ROWS * COLS;
  localparam int unsigned NSB  = ROWS * (COLS + 1);

  logic        cme, cpe;
  logic [15:0] win_addr;

  logic [NPMU-1:0]      pmu_sel, pmu_mode, pmu_cflag;
  logic                 pmu_we;
  logic [7:0]           pmu_addr;
  word_t                pmu_wdata;
  word_t [NPMU-1:0]     pmu_rdata;
  logic [NSB-1:0]       sb_we;
  logic [1:0]           sb_idx;
  logic [15:0]          sb_wdata;
  logic [NSB-1:0][15:0] sb_rdata;

  bus_state_controller #(
    .MEM_BASE (MEM_BASE),
    .MEM_WORDS(NPMU * 256),
    .PER_BASE (PER_BASE),
    .PER_WORDS((NPMU + 2) * 256)
  ) u_bsc (
    .mae     (mae),
    .addr    (cpu_addr),
    .cme     (cme),
    .cpe     (cpe),
    .win_addr(win_addr)
  );

  mcu_interface #(.NPMU(NPMU), .NSB(NSB)) u_mif (
    .clk      (clk),
    .rst_n    (rst_n),
    .cpu_req  (cpu_req),
    .cpu_we   (cpu_we),
    .win_addr (win_addr),
    .cpu_wdata(cpu_wdata),
    .cme      (cme),
    .cpe      (cpe),
    .cpu_busy (cpu_busy),
    .cpu_ready(cpu_ready),
    .cpu_rdata(cpu_rdata),
    .irq      (irq),
    .pmu_sel  (pmu_sel),
    .pmu_we   (pmu_we),
    .pmu_addr (pmu_addr),
    .pmu_wdata(pmu_wdata),
    .pmu_rdata(pmu_rdata),
    .pmu_mode (pmu_mode),
    .pmu_cflag(pmu_cflag),
    .sb_we    (sb_we),
    .sb_idx   (sb_idx),
    .sb_wdata (sb_wdata),
    .sb_rdata (sb_rdata)
  );

  // Each SB's wires live in its own generate scope, so that the eastward,
  // westward and southward chains are separate signals.
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c <= COLS; c++) begin : g_sb
      localparam int unsigned S = r * (COLS + 1) + c;

      nib_t [2:0] in_w;
      nib_t       north, south;
      nib_t [4:0] out_w;
      nib_t [3:0] west_i, west_o, east_i, east_o;
      sb_cfg_t    cfg;

      if (r == 0) begin : g_n_edge
        assign north = north_in[c];
      end else begin : g_n
        assign north = g_row[r-1].g_sb[c].south;
      end

      if (c == 0) begin : g_w_edge
        assign west_i = '0;
        assign in_w   = row_in[r];
      end else begin : g_w
        assign west_i = g_sb[c-1].east_o;
      end

      if (c == COLS) begin : g_e_edge
        assign east_i = '0;
      end else begin : g_e
        assign east_i = g_sb[c+1].west_o;
      end

      if (r == ROWS - 1) begin : g_s_edge
        assign south_out[c] = south;
      end

      switch_box u_sb (
        .clk      (clk),
        .rst_n    (rst_n),
        .cfg_we   (sb_we[S]),
        .cfg_idx  (sb_idx),
        .cfg_wdata(sb_wdata),
        .cfg_rdata(sb_rdata[S]),
        .cfg      (cfg),
        .in       (in_w),
        .north    (north),
        .out      (out_w),
        .south    (south),
        .west_i   (west_i),
        .west_o   (west_o),
        .east_i   (east_i),
        .east_o   (east_o)
      );
    end

    for (genvar c = 0; c < COLS; c++) begin : g_pmu
      localparam int unsigned P = r * COLS + c;

      assign pmu_mode[P] = g_sb[c].cfg.logic_mode;

      pmu u_pmu (
        .clk       (clk),
        .rst_n     (rst_n),
        .logic_mode(g_sb[c].cfg.logic_mode),
        .ext_src_sb(g_sb[c].cfg.ext_src_sb),
        .en_g      (en),
        .cpu_sel   (pmu_sel[P]),
        .cpu_we    (pmu_we),
        .cpu_addr  (pmu_addr),
        .cpu_wdata (pmu_wdata),
        .rd_word   (pmu_rdata[P]),
        .sb_out    (g_sb[c].out_w),
        .sb_in     (g_sb[c+1].in_w),
        .cflag     (pmu_cflag[P])
      );
    end

    assign edge_out[r] = g_sb[COLS].out_w;

    jk_ff u_jk (
      .clk  (clk),
      .rst_n(rst_n),
      .j    (g_sb[COLS].out_w[0][0]),
      .k    (g_sb[COLS].out_w[1][0]),
      .q    (pulse_out[r])
    );
  end

endmodule
