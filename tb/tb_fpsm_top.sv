// tb_fpsm_top - end-to-end test of the whole FPSM at its default size
// (4 x 4 PMUs, 20 switch boxes). All configuration goes through the CPU bus:
// PMU words in the memory window, switch box registers and external
// registers in the peripheral window.
//
//  1. 16-count with interrupt: PMU 13 walks words 0..15 by the increment
//     path and stops at word 16 (CF = 1); INT must rise 16 + 1 cycles after
//     EN (the interrupt output is registered).
//  2. PWM on three cascaded PMUs of row 0 (divider C, period T, width X)
//     with the JK flip-flop at the row's east end, for (C,T,X) = (5,10,5)
//     and (15,10,3): the pulse must have period C*T and low time C*X.
//     Meanwhile the CPU uses PMU 15 as RAM (memory window, wait cycles).
//  3. 16-bit free-run counter on PMUs 4 and 5 (the carry of the lower
//     enables the upper) and event capture on PMUs 8 and 9: PMU 8 is an
//     8-bit free-run timer, PMU 9 takes its Dout when an external event,
//     routed from row 1 through a south wire into row 2, pulses its EN.
//  4. FIFO write side on PMUs 8 (write pointer) and 9 (data store): the
//     data PMU writes its register at the pointer's address on a strobe.
//  5. Combinational logic from a truth table on PMU 12: the word at address
//     {b, a} holds a + b (4-bit adder), then the same PMU is reloaded with
//     an 8-bit rotate-left table. Every word takes the external path with
//     the address from the switch box, so the output follows the input one
//     clock later; it is watched at the row's east edge (edge_out[3]).
//  6. 24-bit counter on PMUs 12, 13, 14 of row 3, started just below a
//     carry into the top byte. The top PMU needs both carries: EN is the
//     carry of the lowest PMU (a global wire), CND the carry of the middle
//     one; its words hold (CF = 1) unless CND, and then jump to their own
//     Dout, looped back from the switch box east of it on two westward
//     global wires.
// Every mechanism is counted; one that never happens counts as a failure.
module tb_fpsm_top;
  import fpsm_pkg::*;

  localparam logic [15:0] MEMB = 16'h8000;
  localparam logic [15:0] PERB = 16'hC000;
  localparam int NPMU = 16;

  logic clk = 0, rst_n = 0, en = 0;
  logic mae = 0, cpu_req = 0, cpu_we = 0;
  logic [15:0] cpu_addr = 0, cpu_wdata = 0, cpu_rdata;
  logic cpu_busy, cpu_ready, irq;
  nib_t [4:0] north_in = '0;
  nib_t [3:0][2:0] row_in = '0;
  nib_t [3:0][4:0] edge_out;
  nib_t [4:0] south_out;
  logic [3:0] pulse_out;

  int checks = 0, failures = 0;
  int cycle = 0;
  // mechanism counters
  int n_mem_rw = 0, n_wait = 0, n_irq = 0, n_inc_walk = 0, n_pwm = 0, n_jk = 0;
  int n_cascade = 0, n_capture = 0, n_south = 0, n_fifo = 0, n_reload = 0, n_stop = 0;
  int n_lut = 0, n_wide = 0;

  fpsm_top dut (
    .clk(clk), .rst_n(rst_n), .en(en), .mae(mae), .cpu_req(cpu_req), .cpu_we(cpu_we),
    .cpu_addr(cpu_addr), .cpu_wdata(cpu_wdata), .cpu_busy(cpu_busy), .cpu_ready(cpu_ready),
    .cpu_rdata(cpu_rdata), .irq(irq), .north_in(north_in), .row_in(row_in),
    .edge_out(edge_out), .south_out(south_out), .pulse_out(pulse_out));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  // ---------------------------------------------------------------- CPU bus
  task automatic cpu(logic w, logic [15:0] a, logic [15:0] d, output logic [15:0] rd,
                     output int lat);
    @(negedge clk);
    mae = 1; cpu_req = 1; cpu_we = w; cpu_addr = a; cpu_wdata = d;
    @(negedge clk);
    mae = 0; cpu_req = 0;
    lat = 1;
    while (!cpu_ready) begin @(negedge clk); lat++; end
    rd = cpu_rdata;
  endtask

  task automatic wr(logic [15:0] a, logic [15:0] d);
    logic [15:0] rd; int lat;
    cpu(1, a, d, rd, lat);
  endtask

  task automatic rd16(logic [15:0] a, output logic [15:0] d);
    int lat;
    cpu(0, a, 16'h0, d, lat);
  endtask

  function automatic logic [15:0] mem_a(int p, int l);
    return MEMB + 16'(p * 256 + l);
  endfunction
  function automatic logic [15:0] per_a(int p);
    return PERB + 16'(p * 256);
  endfunction
  function automatic logic [15:0] reg_a(int l);
    return PERB + 16'(NPMU * 256 + l);
  endfunction
  function automatic logic [15:0] sb_a(int s, int i);
    return PERB + 16'((NPMU + 1) * 256 + s * 4 + i);
  endfunction

  function automatic logic [15:0] mk(logic cf1, path_e p, logic [2:0] seq, logic [7:0] d);
    return {cf1, 1'b0, 1'b0, p, seq, d};
  endfunction

  // Switch box register: isel {g4..g1}, osel {OUT5..OUT1}, bsw {g4..g1}
  task automatic sb_cfg(int s, logic mode, logic ext_sb, logic [1:0] south,
                        logic [7:0] bsw, logic [14:0] osel, logic [7:0] isel);
    logic [47:0] v;
    v = {13'h0, mode, ext_sb, south, bsw, osel, isel};
    for (int i = 0; i < 3; i++) wr(sb_a(s, i), v[16*i +: 16]);
  endtask

  localparam logic [2:0] O_IN1 = OSEL_IN1, O_IN2 = OSEL_IN2, O_G1 = OSEL_G1, O_G2 = OSEL_G2,
                         O_G3 = OSEL_G3, O_G4 = OSEL_G4, O_0 = OSEL_ZERO, O_1 = OSEL_ONES;
  localparam logic [1:0] I_IN1 = ISEL_IN1, I_IN2 = ISEL_IN2, I_IN3 = ISEL_IN3, I_N = ISEL_NORTH;
  localparam logic [1:0] B_L = BSW_LOCAL, B_D = BSW_DRIVE, B_W = BSW_FROM_WEST,
                         B_E = BSW_FROM_EAST;

  // A down counter with reload (divider / period / width PMUs of the PWM).
  //   addr >= 2 : data = addr - 1
  //   addr 1    : terminal (CF=1, reload on CND) if reload1, else passes to 0;
  //               SEQ0 = 1 (the pulse to the next PMU)
  //   addr 0    : CF=1, holds until CND; SEQ0 = seq_at0
  task automatic load_down_counter(int p, logic reload1, logic seq_at0);
    for (int a = 255; a >= 0; a--) begin
      if (a >= 2)      wr(mem_a(p, a), mk(0, PATH_INT, 3'b000, 8'(a - 1)));
      else if (a == 1) wr(mem_a(p, a), mk(reload1, PATH_INT, 3'b001, 8'd0));
      else             wr(mem_a(p, a), mk(1, PATH_CUR, {2'b0, seq_at0}, 8'd0));
    end
  endtask

  // Up counter over 256 words; word 255 reloads from the external register
  // and raises SEQ0 (the carry).
  task automatic load_up_counter(int p);
    for (int a = 255; a >= 0; a--) begin
      if (a == 255) wr(mem_a(p, a), mk(1, PATH_INT, 3'b001, 8'd0));
      else          wr(mem_a(p, a), mk(0, PATH_INT, 3'b000, 8'(a + 1)));
    end
  endtask

  task automatic do_reset();
    en = 0;
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
  endtask

  // ------------------------------------------------------- 1. 16-count/INT
  task automatic test_count16();
    int n;
    logic [15:0] d;
    do_reset();
    for (int a = 16; a >= 0; a--)
      wr(mem_a(13, a), a == 16 ? mk(1, PATH_CUR, 3'b0, 8'd16) : mk(0, PATH_INC, 3'b0, 8'(a + 1)));
    // SB(3,1) = 16 feeds PMU 13: peripheral mode, EN = 1, CND = 0, WE = 0
    sb_cfg(16, 1, 0, 2'd0, {B_L, B_L, B_L, B_L}, {O_0, O_0, O_1, O_0, O_0}, 8'h0);
    wr(reg_a(0), 16'(1 << 13));   // INT mask
    rd16(reg_a(0), d);
    chk(d == 16'(1 << 13), "INT mask readback");
    chk(irq == 0, "no INT before start");
    @(negedge clk);
    en = 1;
    n = 0;
    while (!irq && n < 100) begin @(negedge clk); n++; end
    chk(n == 17, "INT 16 counts (+1 registered) after EN");
    if (n == 17) begin n_irq++; n_inc_walk++; n_stop++; end
    rd16(per_a(13), d);
    chk(d[7:0] == 8'd16 && d[15], "counter stopped at 16 with CF");
    rd16(reg_a(2), d);
    chk(d == 16'(1 << 13), "INT status");
    repeat (10) @(negedge clk);
    rd16(per_a(13), d);
    chk(d[7:0] == 8'd16, "counter stays stopped");
  endtask

  // --------------------------------------------------------------- 2. PWM
  task automatic setup_pwm();
    do_reset();
    load_down_counter(0, 1, 0);   // divider
    load_down_counter(1, 1, 1);   // period
    load_down_counter(2, 0, 0);   // width
    // SB0 -> PMU0: EN = 1, CND = 1
    sb_cfg(0, 1, 0, 2'd0, {B_L, B_L, B_L, B_L}, {O_0, O_1, O_1, O_0, O_0}, 8'h0);
    // SB1 -> PMU1: g1 = IN3 (CFLAG1) driven east; EN = g1, CND = 1
    sb_cfg(1, 1, 0, 2'd0, {B_L, B_L, B_L, B_D}, {O_0, O_1, O_G1, O_0, O_0},
           {I_IN1, I_IN1, I_IN1, I_IN3});
    // SB2 -> PMU2: g1 from west (CFLAG1), g2 = IN3 (CFLAG2) driven east;
    //              EN = g1, CND = g2
    sb_cfg(2, 1, 0, 2'd0, {B_L, B_L, B_D, B_W}, {O_0, O_G2, O_G1, O_0, O_0},
           {I_IN1, I_IN1, I_IN3, I_IN1});
    // SB3: g2 from west, g3 = IN3 (CFLAG3) driven east; PMU3 stays memory
    sb_cfg(3, 0, 0, 2'd0, {B_L, B_D, B_W, B_L}, {O_0, O_0, O_0, O_0, O_0},
           {I_IN1, I_IN3, I_IN1, I_IN1});
    // SB4 (east end): g2, g3 from west; OUT1 = g3 (J), OUT2 = g2 (K)
    sb_cfg(4, 0, 0, 2'd0, {B_L, B_W, B_W, B_L}, {O_0, O_0, O_0, O_G2, O_G3}, 8'h0);
  endtask

  // Measure two full periods of pulse_out[0] after settling.
  task automatic measure_pwm(int c, int t, int x);
    int fall0, rise, fall1, lim;
    lim = 0;
    // wait for a falling edge (start of a low period)
    for (int k = 0; k < 2; k++) begin
      while (!(pulse_out[0] == 1) && lim < 20000) begin @(negedge clk); lim++; end
      while (!(pulse_out[0] == 0) && lim < 20000) begin @(negedge clk); lim++; end
    end
    fall0 = cycle;
    while (!(pulse_out[0] == 1) && lim < 20000) begin @(negedge clk); lim++; end
    rise = cycle;
    while (!(pulse_out[0] == 0) && lim < 20000) begin @(negedge clk); lim++; end
    fall1 = cycle;
    chk(fall1 - fall0 == c * t, $sformatf("PWM period %0d, expected %0d", fall1 - fall0, c * t));
    chk(rise - fall0 == c * x, $sformatf("PWM low time %0d, expected %0d", rise - fall0, c * x));
    if (fall1 - fall0 == c * t && rise - fall0 == c * x) begin n_pwm++; n_jk++; n_reload++; end
  endtask

  task automatic test_pwm();
    int lat;
    logic [15:0] d, rd;
    logic [15:0] ram [64];
    setup_pwm();
    wr(per_a(0), 16'd5);    // C
    wr(per_a(1), 16'd10);   // T
    wr(per_a(2), 16'd5);    // X
    @(negedge clk);
    en = 1;                 // trigger
    // the CPU uses PMU 15 as RAM while the PWM runs, with 2 wait cycles
    wr(reg_a(1), 16'd2);
    for (int i = 0; i < 64; i++) begin
      ram[i] = 16'($urandom);
      cpu(1, mem_a(15, i * 3), ram[i], rd, lat);
      chk(lat == 5, "access time with 2 wait cycles");
      if (lat == 5) n_wait++;
    end
    for (int i = 0; i < 64; i++) begin
      rd16(mem_a(15, i * 3), d);
      chk(d == ram[i], "RAM readback beside running peripherals");
      if (d == ram[i]) n_mem_rw++;
    end
    wr(reg_a(1), 16'd0);
    measure_pwm(5, 10, 5);
    // Fig. 18 setting: change the registers only
    en = 0;
    setup_pwm();
    wr(per_a(0), 16'd15);
    wr(per_a(1), 16'd10);
    wr(per_a(2), 16'd3);
    @(negedge clk);
    en = 1;
    measure_pwm(15, 10, 3);
  endtask

  // ------------------------------------- 3. 16-bit counter and capture
  task automatic test_counter_capture();
    logic [15:0] lo1, hi1, c1;
    int t0, t1, gap, ev1;
    do_reset();
    load_up_counter(4);
    load_up_counter(5);
    load_up_counter(8);
    for (int a = 255; a >= 0; a--) wr(mem_a(9, a), mk(0, PATH_EXT, 3'b0, 8'(a)));
    // row 1: SB5 -> PMU4 EN = 1, CND = 1; g4 = IN1 (event from row_in[1]) to south
    sb_cfg(5, 1, 0, 2'd3, {B_L, B_L, B_L, B_L}, {O_0, O_1, O_1, O_0, O_0},
           {I_IN1, I_IN1, I_IN1, I_IN1});
    // SB6 -> PMU5: EN = PMU4 SEQ0 (IN3 on g1), CND = 1
    sb_cfg(6, 1, 0, 2'd0, {B_L, B_L, B_L, B_L}, {O_0, O_1, O_G1, O_0, O_0},
           {I_IN1, I_IN1, I_IN1, I_IN3});
    // row 2: SB10 -> PMU8 free run; g1 = north (event) driven east
    sb_cfg(10, 1, 0, 2'd0, {B_L, B_L, B_L, B_D}, {O_0, O_1, O_1, O_0, O_0},
           {I_IN1, I_IN1, I_IN1, I_N});
    // SB11 -> PMU9: address = Dout of PMU8 (IN2:IN1), EN = event (g1 from west)
    sb_cfg(11, 1, 1, 2'd0, {B_L, B_L, B_L, B_W}, {O_0, O_0, O_G1, O_IN2, O_IN1}, 8'h0);
    wr(per_a(4), 16'd0);
    wr(per_a(5), 16'd0);
    wr(per_a(8), 16'd0);
    @(negedge clk);
    en = 1;
    t0 = cycle;
    // two events, gap cycles apart
    repeat (37) @(negedge clk);
    row_in[1][0] = 4'h1;
    @(negedge clk);
    row_in[1][0] = 4'h0;
    gap = 100 + $urandom_range(0, 100);
    repeat (gap - 1) @(negedge clk);
    row_in[1][0] = 4'h1; ev1 = cycle;
    @(negedge clk);
    row_in[1][0] = 4'h0;
    repeat (3) @(negedge clk);
    rd16(per_a(9), c1);
    chk(c1[7:0] == 8'(ev1 - t0 + 1), $sformatf("capture value %0d", c1[7:0]));
    if (c1[7:0] == 8'(ev1 - t0 + 1)) begin n_capture++; n_south++; end
    // freeze everything and read the 16-bit counter
    repeat (600) @(negedge clk);
    en = 0;
    t1 = cycle;
    rd16(per_a(4), lo1);
    rd16(per_a(5), hi1);
    // after k enabled cycles: lower word = k mod 256 (address), Dout = addr + 1
    begin
      int k;
      k = t1 - t0;
      chk(lo1[7:0] == 8'((k % 256) + 1), $sformatf("lower counter %0d k=%0d", lo1[7:0], k));
      chk(hi1[7:0] == 8'((k / 256) + 1), $sformatf("upper counter %0d", hi1[7:0]));
      if (hi1[7:0] == 8'((k / 256) + 1) && k >= 256) n_cascade++;
    end
  endtask

  // --------------------------------------------------------------- 4. FIFO
  // PMU 8 is the write pointer: a ring of +1 steps, advanced by a write
  // strobe on row_in[2] IN1. PMU 9 stores the data: its address follows the
  // pointer's Dout (IN2:IN1), and the same strobe, carried on global wire g1,
  // is its write enable; the data is what the CPU put in its register.
  task automatic test_fifo();
    logic [15:0] d;
    logic [7:0] vals [8];
    do_reset();
    for (int a = 255; a >= 0; a--) wr(mem_a(8, a), mk(0, PATH_INC, 3'b000, 8'(a)));
    for (int a = 255; a >= 0; a--) wr(mem_a(9, a), mk(0, PATH_EXT, 3'b000, 8'h00));
    // SB10 -> PMU8: EN = strobe (IN1); g1 = strobe driven east
    sb_cfg(10, 1, 0, 2'd0, {B_L, B_L, B_L, B_D}, {O_0, O_0, O_IN1, O_0, O_0}, 8'h0);
    // SB11 -> PMU9: address = IN2:IN1, EN = 1, CND = 0, WE = g1 (from west)
    sb_cfg(11, 1, 1, 2'd0, {B_L, B_L, B_L, B_W}, {O_G1, O_0, O_1, O_IN2, O_IN1}, 8'h0);
    @(negedge clk);
    en = 1;
    for (int i = 0; i < 8; i++) begin
      vals[i] = 8'($urandom);
      wr(per_a(9), {8'h0, vals[i]});
      @(negedge clk);
      row_in[2][0] = 4'h1;
      @(negedge clk);
      row_in[2][0] = 4'h0;
    end
    en = 0;
    sb_cfg(11, 0, 0, 2'd0, 8'h0, 15'h0, 8'h0);   // back to memory mode
    for (int i = 0; i < 8; i++) begin
      rd16(mem_a(9, i), d);
      chk(d[7:0] == vals[i], $sformatf("FIFO entry %0d: %h, expected %h", i, d[7:0], vals[i]));
      if (d[7:0] == vals[i]) n_fifo++;
    end
  endtask

  // ---------------------------------------------- 5. truth-table logic
  task automatic load_lut(int p, bit rotate);
    sb_cfg(15, 0, 0, 2'd0, 8'h0, 15'h0, 8'h0);    // memory mode for loading
    for (int a = 255; a >= 0; a--) begin
      logic [7:0] f;
      f = rotate ? {8'(a)} << 1 | 8'(a) >> 7 : 8'(a[3:0] + a[7:4]);
      wr(mem_a(p, a), mk(0, PATH_EXT, 3'b000, f));
    end
    // SB15 -> PMU12: address = IN2:IN1 (row_in[3]), EN = 1, CND = 0, WE = 0
    sb_cfg(15, 1, 1, 2'd0, 8'h0, {O_0, O_0, O_1, O_IN2, O_IN1}, 8'h0);
  endtask

  task automatic test_lut();
    logic [15:0] d;
    do_reset();
    // Dout of PMU12 (IN1, IN2 of SB16) carried east on g1/g2 to edge_out[3]
    sb_cfg(16, 0, 0, 2'd0, {B_L, B_L, B_D, B_D}, 15'h0, {I_IN1, I_IN1, I_IN2, I_IN1});
    sb_cfg(17, 0, 0, 2'd0, {B_L, B_L, B_W, B_W}, 15'h0, 8'h0);
    sb_cfg(18, 0, 0, 2'd0, {B_L, B_L, B_W, B_W}, 15'h0, 8'h0);
    sb_cfg(19, 0, 0, 2'd0, {B_L, B_L, B_W, B_W}, {O_0, O_0, O_0, O_G2, O_G1}, 8'h0);
    for (int r = 0; r < 2; r++) begin
      load_lut(12, r == 1);
      @(negedge clk);
      en = 1;
      for (int i = 0; i < 20; i++) begin
        logic [3:0] a, b;
        logic [7:0] v, exp;
        a = 4'($urandom); b = 4'($urandom);
        v = {b, a};
        exp = (r == 1) ? {v[6:0], v[7]} : 8'(a + b);
        row_in[3][0] = a;
        row_in[3][1] = b;
        @(negedge clk);
        chk({edge_out[3][1], edge_out[3][0]} == exp,
            $sformatf("%s %h: Dout %h one clock later, expected %h",
                      r == 1 ? "rotate" : "add", v, {edge_out[3][1], edge_out[3][0]}, exp));
        rd16(per_a(12), d);
        chk(d[7:0] == exp, $sformatf("%s %h: read %h, expected %h",
                                      r == 1 ? "rotate" : "add", v, d[7:0], exp));
        if (d[7:0] == exp) n_lut++;
      end
      en = 0;
    end
  endtask

  // ------------------------------------------------ 6. 24-bit counter
  task automatic test_counter24();
    logic [15:0] d0, d1, d2;
    int t0, k;
    logic [23:0] start, exp;
    do_reset();
    load_up_counter(12);
    load_up_counter(13);
    for (int a = 255; a >= 0; a--) wr(mem_a(14, a), mk(1, PATH_CUR, 3'b000, 8'(a + 1)));
    // start position: the last word the CPU touched in each PMU
    start = {8'd7, 8'd255, 8'(250 + $urandom_range(0, 4))};
    rd16(mem_a(12, start[7:0]), d0);
    rd16(mem_a(13, start[15:8]), d0);
    rd16(mem_a(14, start[23:16]), d0);
    // SB15 -> PMU12: EN = 1, CND = 1
    sb_cfg(15, 1, 0, 2'd0, 8'h0, {O_0, O_1, O_1, O_0, O_0}, 8'h0);
    // SB16 -> PMU13: g4 = IN3 (low carry) driven east; EN = g4, CND = 1
    sb_cfg(16, 1, 0, 2'd0, {B_D, B_L, B_L, B_L}, {O_0, O_1, O_G4, O_0, O_0},
           {I_IN3, I_IN1, I_IN1, I_IN1});
    // SB17 -> PMU14: g4 from west (low carry), g3 = IN3 (middle carry),
    //   g1/g2 from east (own Dout); address = g2:g1, EN = g4, CND = g3
    sb_cfg(17, 1, 1, 2'd0, {B_W, B_L, B_E, B_E}, {O_0, O_G3, O_G4, O_G2, O_G1},
           {I_IN1, I_IN3, I_IN1, I_IN1});
    // SB18: g1 = IN1, g2 = IN2 of PMU14 driven west
    sb_cfg(18, 0, 0, 2'd0, {B_L, B_L, B_D, B_D}, 15'h0, {I_IN1, I_IN1, I_IN2, I_IN1});
    @(negedge clk);
    en = 1;
    t0 = cycle;
    repeat (20 + $urandom_range(0, 20)) @(negedge clk);
    en = 0;
    k = cycle - t0;
    exp = start + 24'(k);
    rd16(per_a(12), d0);
    rd16(per_a(13), d1);
    rd16(per_a(14), d2);
    // each PMU sits on word "field" whose Data is field + 1
    chk(d0[7:0] == exp[7:0] + 8'd1, $sformatf("24-bit counter low %h, expected %h", d0[7:0], exp[7:0] + 8'd1));
    chk(d1[7:0] == exp[15:8] + 8'd1, $sformatf("24-bit counter mid %h, expected %h", d1[7:0], exp[15:8] + 8'd1));
    chk(d2[7:0] == exp[23:16] + 8'd1, $sformatf("24-bit counter top %h, expected %h", d2[7:0], exp[23:16] + 8'd1));
    if (d2[7:0] == exp[23:16] + 8'd1 && exp[23:16] != start[23:16]) n_wide++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    test_count16();
    test_pwm();
    test_counter_capture();
    test_fifo();
    test_lut();
    test_counter24();
    chk(n_mem_rw > 0, "mechanism: memory-mode RAM access");
    chk(n_wait > 0, "mechanism: wait cycles");
    chk(n_irq > 0, "mechanism: interrupt");
    chk(n_inc_walk > 0, "mechanism: increment path");
    chk(n_stop > 0, "mechanism: stop at terminal word");
    chk(n_reload > 0, "mechanism: reload from external register");
    chk(n_pwm > 0, "mechanism: PWM");
    chk(n_jk > 0, "mechanism: JK output");
    chk(n_cascade > 0, "mechanism: carry cascade");
    chk(n_capture > 0, "mechanism: capture (external address path)");
    chk(n_south > 0, "mechanism: south wire / global wires");
    chk(n_fifo > 0, "mechanism: external write");
    chk(n_lut > 0, "mechanism: truth-table logic");
    chk(n_wide > 0, "mechanism: two-level carry (EN and CND)");
    $display("mechanisms: mem_rw=%0d wait=%0d irq=%0d inc=%0d stop=%0d reload=%0d pwm=%0d jk=%0d cascade=%0d capture=%0d south=%0d fifo=%0d lut=%0d wide=%0d",
             n_mem_rw, n_wait, n_irq, n_inc_walk, n_stop, n_reload, n_pwm, n_jk, n_cascade,
             n_capture, n_south, n_fifo, n_lut, n_wide);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
