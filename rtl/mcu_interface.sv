// mcu_interface - MCU Interface of the FPSM (Sec. 3.1, Sec. 5).
//
// It turns a CPU bus access, already sorted into the memory window (cme) or
// the peripheral window (cpe) by the bus state controller, into an access to
// one PMU, to a switch box register or to its own registers. The window
// offset is split into a global address win_addr[15:8] (which PMU, the PMU
// array decoder) and a local address win_addr[7:0] (the word inside it).
//
//   memory window:      block g < NPMU, word l  -> word l of PMU g, if that
//                       PMU is in memory mode
//   peripheral window:  block g < NPMU, word 0  -> PMU g's one-word register
//                       (write: external register, read: Fout/Dout), if that
//                       PMU is configured as a peripheral
//                       block NPMU: word 0 INT mask, word 1 wait cycles,
//                       word 2 INT status (read only)
//                       block NPMU+1: word 4*s+i -> word i of SB s's register
// Anything else is accepted, ignored, and reads as zero.
//
// Timing: cpu_req is taken when cpu_busy is low. The next cycle (ACCESS)
// drives the PMU or register; then the interface waits 1 + wait_cycles
// cycles, latches the selected Data Out bus and raises cpu_ready for one
// cycle with cpu_rdata: cpu_ready is high 3 + wait_cycles clocks after the
// edge that takes the request. The wait count is the document's cycle-adjustment
// register, its reset value 0 and the handshake are this design's choices.
//
// INT (irq, registered) is high while any PMU in peripheral mode whose mask
// bit is set sits on a word with CF[1] = 1.
module mcu_interface
  import fpsm_pkg::*;
#(
  parameter int unsigned NPMU = 16,
  parameter int unsigned NSB  = 20
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // CPU side
  input  logic                   cpu_req,
  input  logic                   cpu_we,
  input  logic [15:0]            win_addr,
  input  logic [15:0]            cpu_wdata,
  input  logic                   cme,
  input  logic                   cpe,
  output logic                   cpu_busy,
  output logic                   cpu_ready,
  output logic [15:0]            cpu_rdata,
  output logic                   irq,
  // PMU array side
  output logic [NPMU-1:0]        pmu_sel,
  output logic                   pmu_we,
  output logic [7:0]             pmu_addr,
  output word_t                  pmu_wdata,
  input  word_t [NPMU-1:0]       pmu_rdata,
  input  logic [NPMU-1:0]        pmu_mode,
  input  logic [NPMU-1:0]        pmu_cflag,
  // switch box registers
  output logic [NSB-1:0]         sb_we,
  output logic [1:0]             sb_idx,
  output logic [15:0]            sb_wdata,
  input  logic [NSB-1:0][15:0]   sb_rdata
);

  localparam int unsigned SBW = (NSB > 1) ? $clog2(NSB) : 1;

  if (NPMU > 16 || NSB > 64) begin : g_chk
    $error("mcu_interface: at most 16 PMUs and 64 switch boxes");
  end

  typedef enum logic [1:0] {S_IDLE, S_ACCESS, S_WAIT, S_DONE} state_e;
  typedef enum logic [1:0] {T_NONE, T_PMU, T_REG, T_SB} target_e;

  state_e      state;
  target_e     tgt;
  logic        we_q;
  logic [7:0]  g_q, l_q;
  logic [15:0] wdata_q, rdata_q;
  logic [3:0]  wait_q, cnt;
  logic [15:0] int_mask;
  logic [15:0] rd_mux;
  target_e     tgt_d;
  logic [7:0]  g_d, l_d;

  assign g_d = win_addr[15:8];
  assign l_d = win_addr[7:0];

  // Address decode of a new request
  always_comb begin
    tgt_d = T_NONE;
    if (cme) begin
      if (32'(g_d) < NPMU && !pmu_mode[g_d[$clog2(NPMU)-1:0]]) tgt_d = T_PMU;
    end else if (cpe) begin
      if (32'(g_d) < NPMU) begin
        if (l_d == 8'h0 && pmu_mode[g_d[$clog2(NPMU)-1:0]]) tgt_d = T_PMU;
      end else if (32'(g_d) == NPMU) begin
        if (l_d < 8'd3) tgt_d = T_REG;
      end else if (32'(g_d) == NPMU + 1) begin
        if (32'(l_d[7:2]) < NSB && l_d[1:0] < 2'(SB_CFG_WORDS)) tgt_d = T_SB;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      tgt      <= T_NONE;
      we_q     <= 1'b0;
      g_q      <= '0;
      l_q      <= '0;
      wdata_q  <= '0;
      rdata_q  <= '0;
      cnt      <= '0;
      wait_q   <= '0;
      int_mask <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cpu_req) begin
          tgt     <= tgt_d;
          we_q    <= cpu_we;
          g_q     <= g_d;
          l_q     <= l_d;
          wdata_q <= cpu_wdata;
          state   <= S_ACCESS;
        end
        S_ACCESS: begin
          if (tgt == T_REG && we_q) begin
            if (l_q == 8'd0) int_mask <= wdata_q;
            if (l_q == 8'd1) wait_q   <= wdata_q[3:0];
          end
          cnt   <= wait_q;
          state <= S_WAIT;
        end
        S_WAIT: begin
          if (cnt == '0) begin
            rdata_q <= rd_mux;
            state   <= S_DONE;
          end else begin
            cnt <= cnt - 4'd1;
          end
        end
        S_DONE: state <= S_IDLE;
      endcase
    end
  end

  // Drive the PMU array and the SB registers
  always_comb begin
    pmu_sel = '0;
    sb_we   = '0;
    if (state == S_ACCESS && tgt == T_PMU) pmu_sel[g_q[$clog2(NPMU)-1:0]] = 1'b1;
    if (state == S_ACCESS && tgt == T_SB && we_q) sb_we[l_q[2 +: SBW]] = 1'b1;
  end

  assign pmu_we    = we_q;
  assign pmu_addr  = l_q;
  assign pmu_wdata = word_t'(wdata_q);
  assign sb_idx    = l_q[1:0];
  assign sb_wdata  = wdata_q;

  // Data Out selection
  always_comb begin
    rd_mux = 16'h0;
    unique case (tgt)
      T_PMU: rd_mux = pmu_rdata[g_q[$clog2(NPMU)-1:0]];
      T_SB:  rd_mux = sb_rdata[l_q[2 +: SBW]];
      T_REG: begin
        if (l_q == 8'd0) rd_mux = int_mask;
        if (l_q == 8'd1) rd_mux = {12'h0, wait_q};
        if (l_q == 8'd2) rd_mux = 16'(pmu_cflag & pmu_mode);
      end
      default: rd_mux = 16'h0;
    endcase
  end

  assign cpu_busy  = (state != S_IDLE);
  assign cpu_ready = (state == S_DONE);
  assign cpu_rdata = rdata_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) irq <= 1'b0;
    else        irq <= |(pmu_cflag & pmu_mode & int_mask[NPMU-1:0]);
  end

  // A request is only made while the interface is idle.
  a_req_idle: assert property (@(posedge clk) disable iff (!rst_n) cpu_req |-> !cpu_busy);

endmodule
