// tb_add_flag_control - drives the Add/Flag Control unit with random flag
// fields, CND, EN, external and internal addresses and CPU loads, and checks
// the address flip-flop each cycle against an independent model of the four
// address paths (internal, +1, current, external) and of the CF[1] stop and
// reload rules. Each path must be taken at least once.
module tb_add_flag_control;
  import fpsm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic run, en, cnd, cpu_load;
  logic [7:0] ext_addr, int_addr, cpu_addr, addr_q, next_addr;
  flag_t fout;
  logic [3:0] sw_on;
  logic [7:0] model;
  int checks = 0, failures = 0;
  int taken [4];

  add_flag_control dut (.clk(clk), .rst_n(rst_n), .run(run), .en(en), .cnd(cnd),
    .ext_addr(ext_addr), .int_addr(int_addr), .fout(fout), .cpu_load(cpu_load),
    .cpu_addr(cpu_addr), .addr_q(addr_q), .next_addr(next_addr), .sw_on(sw_on));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_next;
    int path;
    run = 0; en = 0; cnd = 0; cpu_load = 0; ext_addr = 0; int_addr = 0; cpu_addr = 0; fout = '0;
    model = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (addr_q !== 8'h00) failures++;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      run = ($urandom_range(0, 9) != 0);
      en = ($urandom_range(0, 4) != 0);
      cnd = 1'($urandom);
      cpu_load = 1'($urandom);
      ext_addr = 8'($urandom); int_addr = 8'($urandom); cpu_addr = 8'($urandom);
      fout = flag_t'(8'($urandom));
      fout.cf[1] = ($urandom_range(0, 3) == 0);
      // reference
      if (!en) path = 2;
      else if (fout.cf[1] && cnd) path = 3;
      else if (fout.cf[1]) path = 2;
      else path = int'(fout.scc[1:0]);
      case (path)
        0: exp_next = int_addr;
        1: exp_next = model + 8'd1;
        2: exp_next = model;
        default: exp_next = ext_addr;
      endcase
      #1;
      checks++;
      if (next_addr !== exp_next) begin
        failures++;
        $display("FAIL i=%0d next=%h exp=%h", i, next_addr, exp_next);
      end
      if (run) taken[path]++;
      @(posedge clk);
      if (run) model = exp_next;
      else if (cpu_load) model = cpu_addr;
      #1;
      checks++;
      if (addr_q !== model) begin
        failures++;
        $display("FAIL i=%0d addr_q=%h exp=%h", i, addr_q, model);
      end
    end
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (taken[p] == 0) begin failures++; $display("FAIL path %0d never taken", p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
