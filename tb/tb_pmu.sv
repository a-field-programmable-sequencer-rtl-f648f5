// tb_pmu - one Programmable Memory Unit in both of its modes.
//  1. Memory mode: 256 random words written by the CPU and read back.
//  2. 3-bit down counter (the N-ary counter example): words 0..7 hold
//     Data = address - 1 (000 -> 111), CF[1] = 1 only at 000. With the
//     external register at 5 and one CND pulse the PMU must pass 5,4,3,2,1,0
//     and stop at 000 six cycles after the load, raising CF. Then every
//     N from 0 to 7 is loaded in turn and must stop after N + 1 cycles.
//  3. 16-count up counter: words 0..15 hold Data = address + 1, word 16 is
//     terminal; after EN rises CF must appear 16 cycles later.
//  4. Increment path: reload from the external register at a terminal word
//     with CND, then walk words 100..111 by +1 (12 cycles).
//  5. Capture: every word selects the external address taken from the
//     switch box (OUT2:OUT1) and holds its own address as data; with EN
//     pulsed the PMU must hold the address present at the pulse.
//  6. External write: the external register written into the Data Field at
//     the address from the switch box, read back through the sequencer and
//     in memory mode.
module tb_pmu;
  import fpsm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic logic_mode = 0, ext_src_sb = 0, en_g = 1;
  logic cpu_sel = 0, cpu_we = 0;
  logic [7:0] cpu_addr = 0;
  word_t cpu_wdata = '0, rd_word;
  nib_t [4:0] sb_out = '0;
  nib_t [2:0] sb_in;
  logic cflag;
  int checks = 0, failures = 0;
  word_t ref_mem [256];

  pmu dut (.clk(clk), .rst_n(rst_n), .logic_mode(logic_mode), .ext_src_sb(ext_src_sb),
    .en_g(en_g), .cpu_sel(cpu_sel), .cpu_we(cpu_we), .cpu_addr(cpu_addr), .cpu_wdata(cpu_wdata),
    .rd_word(rd_word), .sb_out(sb_out), .sb_in(sb_in), .cflag(cflag));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t mk(logic cf1, path_e p, logic [2:0] seq, logic [7:0] d);
    word_t w;
    w.flag.cf = {cf1, 1'b0};
    w.flag.scc = {1'b0, p};
    w.flag.seq = seq;
    w.data = d;
    return w;
  endfunction

  task automatic cpu_wr(logic [7:0] a, word_t w);
    @(negedge clk);
    cpu_sel = 1; cpu_we = 1; cpu_addr = a; cpu_wdata = w;
    if (!logic_mode) ref_mem[a] = w;
    @(negedge clk);
    cpu_sel = 0; cpu_we = 0;
  endtask

  task automatic cpu_rd(logic [7:0] a, output word_t w);
    @(negedge clk);
    cpu_sel = 1; cpu_we = 0; cpu_addr = a;
    @(negedge clk);
    cpu_sel = 0;
    w = rd_word;
  endtask

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic set_ctl(logic we, logic cnd, logic en);
    sb_out[2] = {3'b0, en};
    sb_out[3] = {3'b0, cnd};
    sb_out[4] = {3'b0, we};
  endtask

  initial begin
    word_t w;
    int n;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // 1. memory mode
    for (int a = 0; a < 256; a++) cpu_wr(8'(a), word_t'(16'($urandom)));
    for (int a = 0; a < 256; a++) begin
      cpu_rd(8'(a), w);
      chk(w == ref_mem[a], "memory readback");
    end
    // 2. 3-bit down counter
    for (int a = 0; a < 8; a++) cpu_wr(8'(a), mk(a == 0, PATH_INT, 3'b0, 8'((a + 7) % 8)));
    cpu_rd(8'd0, w);
    logic_mode = 1;
    cpu_wr(8'd0, mk(0, PATH_INT, 3'b0, 8'd5));   // external register = 5
    set_ctl(0, 0, 1);
    repeat (4) begin
      @(posedge clk); #1;
      chk(rd_word.data == 8'd7 && cflag, "stopped at 000");
    end
    @(negedge clk); set_ctl(0, 1, 1);
    @(negedge clk); set_ctl(0, 0, 1);
    chk(rd_word.data == 8'd4 && !cflag, "loaded 5");
    n = 1;
    while (!cflag && n < 20) begin
      chk(rd_word.data == 8'(5 - n), "down count data");
      @(negedge clk); n++;
    end
    chk(n == 6, "stops in six cycles");
    chk(rd_word.data == 8'b111 && cflag, "Data Field 111 at 000");
    repeat (5) @(negedge clk);
    chk(rd_word.data == 8'b111 && cflag, "stays stopped");
    // N-ary counter: any N <= 7 loaded from the external register stops
    // after N + 1 cycles on word 000
    for (int nn = 0; nn < 8; nn++) begin
      cpu_wr(8'd0, mk(0, PATH_INT, 3'b0, 8'(nn)));
      @(negedge clk); set_ctl(0, 1, 1);
      @(negedge clk); set_ctl(0, 0, 1);
      n = 1;
      while (!cflag && n < 20) begin @(negedge clk); n++; end
      chk(n == nn + 1, $sformatf("N-ary counter N=%0d stops after %0d cycles", nn, n));
    end
    // 3. 16-count up counter
    logic_mode = 0;
    set_ctl(0, 0, 0);
    for (int a = 0; a < 16; a++) cpu_wr(8'(a), mk(0, PATH_INT, 3'b0, 8'(a + 1)));
    cpu_wr(8'd16, mk(1, PATH_CUR, 3'b0, 8'd16));
    cpu_rd(8'd0, w);
    logic_mode = 1;
    @(negedge clk);
    set_ctl(0, 0, 1);
    n = 0;
    while (!cflag && n < 40) begin @(negedge clk); n++; end
    chk(n == 16, "carry after 16 counts");
    chk(rd_word.data == 8'd16, "count value 16");
    // 4. increment path
    for (int a = 100; a < 112; a++) ref_mem[a] = mk(a == 111, PATH_INC, 3'b0, 8'($urandom));
    logic_mode = 0; set_ctl(0, 0, 0);
    for (int a = 100; a < 112; a++) cpu_wr(8'(a), ref_mem[a]);
    cpu_rd(8'd16, w);
    logic_mode = 1;
    cpu_wr(8'd0, mk(0, PATH_INT, 3'b0, 8'd100));
    set_ctl(0, 1, 1);
    @(negedge clk); set_ctl(0, 0, 1);
    chk(rd_word == ref_mem[100], "reload 100");
    n = 0;
    while (!cflag && n < 40) begin
      chk(rd_word == ref_mem[8'(100 + n)], "increment walk");
      @(negedge clk); n++;
    end
    chk(n == 11 && rd_word == ref_mem[111], "increment reaches 111");
    // 5. capture from the switch box
    logic_mode = 0; set_ctl(0, 0, 0);
    for (int a = 0; a < 256; a++) cpu_wr(8'(a), mk(0, PATH_EXT, 3'b101, 8'(a)));
    logic_mode = 1; ext_src_sb = 1;
    for (int t = 0; t < 30; t++) begin
      logic [7:0] v;
      @(negedge clk);
      v = 8'($urandom);
      {sb_out[1], sb_out[0]} = v;
      set_ctl(0, 0, 1);
      @(negedge clk);
      set_ctl(0, 0, 0);
      {sb_out[1], sb_out[0]} = 8'($urandom);
      chk(rd_word.data == v, "captured address");
      chk(sb_in[0] == v[3:0] && sb_in[1] == v[7:4] && sb_in[2] == 4'b0101, "IN1..IN3");
      repeat (2) @(negedge clk);
      chk(rd_word.data == v, "capture held");
    end
    // 6. external write
    for (int t = 0; t < 20; t++) begin
      logic [7:0] a, d;
      @(negedge clk);
      a = 8'($urandom); d = 8'($urandom);
      cpu_wr(8'd0, mk(0, PATH_INT, 3'b0, d));   // external register = data
      @(negedge clk);
      {sb_out[1], sb_out[0]} = a;
      set_ctl(1, 0, 1);
      ref_mem[a] = mk(0, PATH_EXT, 3'b101, d);
      @(negedge clk);
      set_ctl(0, 0, 0);
      chk(rd_word.data == d, "external write");
    end
    logic_mode = 0; ext_src_sb = 0;
    for (int a = 0; a < 256; a++) begin
      cpu_rd(8'(a), w);
      if (a > 111 || a < 100) chk(w.data == ref_mem[a].data, "external write readback");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
