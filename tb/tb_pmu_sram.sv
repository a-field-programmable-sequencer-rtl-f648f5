// tb_pmu_sram - writes all 256 words (whole words and single fields) and
// reads them back against a reference array.
module tb_pmu_sram;
  logic clk = 0;
  logic we_flag = 0, we_data = 0;
  logic [7:0] waddr = 0, wflag = 0, wdata = 0, raddr = 0, rflag, rdata;
  logic [7:0] ref_flag [256];
  logic [7:0] ref_data [256];
  int checks = 0, failures = 0;

  pmu_sram dut (.clk(clk), .we_flag(we_flag), .we_data(we_data), .waddr(waddr),
                .wflag(wflag), .wdata(wdata), .raddr(raddr), .rflag(rflag), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < 256; a++) begin
      raddr = 8'(a);
      #1;
      checks++;
      if (rflag !== ref_flag[a] || rdata !== ref_data[a]) begin
        failures++;
        $display("FAIL a=%0d got %h/%h exp %h/%h", a, rflag, rdata, ref_flag[a], ref_data[a]);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we_flag = 1; we_data = 1; waddr = 8'(a);
      wflag = 8'($urandom); wdata = 8'($urandom);
      ref_flag[a] = wflag; ref_data[a] = wdata;
    end
    @(negedge clk); we_flag = 0; we_data = 0;
    check_all();
    // field writes
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we_flag = 1'($urandom); we_data = 1'($urandom); waddr = 8'($urandom);
      wflag = 8'($urandom); wdata = 8'($urandom);
      if (we_flag) ref_flag[waddr] = wflag;
      if (we_data) ref_data[waddr] = wdata;
    end
    @(negedge clk); we_flag = 0; we_data = 0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
