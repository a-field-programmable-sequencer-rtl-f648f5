// tb_mcu_interface - the MCU Interface against stand-in PMU and switch box
// read buses. Random accesses in the memory and peripheral windows are
// checked for: which PMU is selected (and that only in one cycle), the
// local address and data passed on, which switch box register is written,
// the Data Out bus returned, and the access time (cpu_ready 3 + wait cycles after the edge that takes the request), for
// several values of the wait-cycle register. INT must follow CF of PMUs in
// peripheral mode under the mask.
module tb_mcu_interface;
  import fpsm_pkg::*;
  localparam int NPMU = 16, NSB = 20;
  logic clk = 0, rst_n = 0;
  logic cpu_req = 0, cpu_we = 0, cme = 0, cpe = 0;
  logic [15:0] win_addr = 0, cpu_wdata = 0, cpu_rdata;
  logic cpu_busy, cpu_ready, irq;
  logic [NPMU-1:0] pmu_sel, pmu_mode = 0, pmu_cflag = 0;
  logic pmu_we;
  logic [7:0] pmu_addr;
  word_t pmu_wdata;
  word_t [NPMU-1:0] pmu_rdata;
  logic [NSB-1:0] sb_we;
  logic [1:0] sb_idx;
  logic [15:0] sb_wdata;
  logic [NSB-1:0][15:0] sb_rdata;
  int checks = 0, failures = 0;
  int wait_cycles = 0;
  logic [15:0] mask_model = 0;

  mcu_interface #(.NPMU(NPMU), .NSB(NSB)) dut (.clk(clk), .rst_n(rst_n), .cpu_req(cpu_req),
    .cpu_we(cpu_we), .win_addr(win_addr), .cpu_wdata(cpu_wdata), .cme(cme), .cpe(cpe),
    .cpu_busy(cpu_busy), .cpu_ready(cpu_ready), .cpu_rdata(cpu_rdata), .irq(irq),
    .pmu_sel(pmu_sel), .pmu_we(pmu_we), .pmu_addr(pmu_addr), .pmu_wdata(pmu_wdata),
    .pmu_rdata(pmu_rdata), .pmu_mode(pmu_mode), .pmu_cflag(pmu_cflag), .sb_we(sb_we),
    .sb_idx(sb_idx), .sb_wdata(sb_wdata), .sb_rdata(sb_rdata));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One access; records what the array side saw.
  task automatic access(logic m, logic w, logic [15:0] a, logic [15:0] d,
                        output logic [15:0] rd, output int sel_pmu, output int sel_cnt,
                        output int sb_hit, output int cycles);
    @(negedge clk);
    cme = ~m; cpe = m; cpu_we = w; win_addr = a; cpu_wdata = d; cpu_req = 1;
    sel_pmu = -1; sel_cnt = 0; sb_hit = -1; cycles = 0;
    @(negedge clk);
    cpu_req = 0; cme = 0; cpe = 0; win_addr = 16'hFFFF;
    cycles = 1;
    while (!cpu_ready && cycles < 40) begin
      for (int p = 0; p < NPMU; p++) if (pmu_sel[p]) begin
        sel_pmu = p; sel_cnt++;
        if (pmu_addr != a[7:0] || pmu_we != w || pmu_wdata != d) begin
          failures++; $display("FAIL PMU bus contents");
        end
      end
      for (int s = 0; s < NSB; s++) if (sb_we[s]) begin
        sb_hit = s;
        if (sb_idx != a[1:0] || sb_wdata != d) begin failures++; $display("FAIL SB bus contents"); end
      end
      @(negedge clk); cycles++;
    end
    rd = cpu_rdata;
  endtask

  initial begin
    logic [15:0] rd;
    int sp, sc, sh, cyc;
    for (int p = 0; p < NPMU; p++) pmu_rdata[p] = word_t'(16'($urandom));
    for (int s = 0; s < NSB; s++) sb_rdata[s] = 16'($urandom);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      // set the wait-cycle register
      wait_cycles = (round == 0) ? 0 : (round == 1 ? 3 : 7);
      access(1, 1, 16'(NPMU * 256 + 1), 16'(wait_cycles), rd, sp, sc, sh, cyc);
      access(1, 0, 16'(NPMU * 256 + 1), 16'h0, rd, sp, sc, sh, cyc);
      chk(rd == 16'(wait_cycles), "wait register readback");
      chk(cyc == 3 + wait_cycles, "access time");
      for (int t = 0; t < 150; t++) begin
        int g, l, kind;
        logic m, w;
        logic [15:0] d;
        pmu_mode = 16'($urandom);
        kind = $urandom_range(0, 2);
        w = 1'($urandom); d = 16'($urandom);
        if (kind == 0) begin      // memory window
          m = 0; g = $urandom_range(0, NPMU + 2); l = $urandom_range(0, 255);
        end else if (kind == 1) begin // peripheral window, PMU word
          m = 1; g = $urandom_range(0, NPMU - 1); l = ($urandom_range(0, 3) == 0) ? 5 : 0;
        end else begin            // peripheral window, SB register
          m = 1; g = NPMU + 1; l = $urandom_range(0, 4 * NSB + 3);
        end
        access(m, w, {8'(g), 8'(l)}, d, rd, sp, sc, sh, cyc);
        chk(cyc == 3 + wait_cycles, "access time");
        if (kind == 0) begin
          if (g < NPMU && !pmu_mode[g]) begin
            chk(sp == g && sc == 1, "memory window select");
            chk(rd == pmu_rdata[g], "memory window read");
          end else begin
            chk(sp == -1 && rd == 0, "memory window miss");
          end
        end else if (kind == 1) begin
          if (pmu_mode[g] && l == 0) begin
            chk(sp == g && sc == 1, "peripheral word select");
            chk(rd == pmu_rdata[g], "peripheral word read");
          end else chk(sp == -1 && rd == 0, "peripheral word miss");
        end else begin
          if (l / 4 < NSB && l % 4 < 3) begin
            chk(sh == (w ? l / 4 : -1), "SB register write");
            chk(rd == sb_rdata[l / 4], "SB register read");
          end else chk(sh == -1 && rd == 0, "SB register miss");
          chk(sp == -1, "no PMU on SB access");
        end
      end
    end
    // INT
    mask_model = 16'h00F0;
    access(1, 1, 16'(NPMU * 256), mask_model, rd, sp, sc, sh, cyc);
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      pmu_mode = 16'($urandom); pmu_cflag = 16'($urandom);
      @(negedge clk);
      chk(irq == |(pmu_mode & pmu_cflag & mask_model), "INT");
    end
    access(1, 0, 16'(NPMU * 256 + 2), 16'h0, rd, sp, sc, sh, cyc);
    chk(rd == (pmu_mode & pmu_cflag), "INT status");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
