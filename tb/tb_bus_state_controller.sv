// tb_bus_state_controller - sweeps the whole 16-bit address space with and
// without MAE and checks CME, CPE and the window offset against the window
// bounds.
module tb_bus_state_controller;
  localparam logic [15:0] MB = 16'h8000, PB = 16'hC000;
  localparam int MW = 4096, PW = 4608;
  logic mae;
  logic [15:0] addr, win_addr;
  logic cme, cpe;
  logic e_cme, e_cpe;
  logic [15:0] e_win;
  int checks = 0, failures = 0;

  bus_state_controller dut (.mae(mae), .addr(addr), .cme(cme), .cpe(cpe), .win_addr(win_addr));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hit_m = 0, hit_p = 0;
    for (int m = 0; m < 2; m++) begin
      for (int a = 0; a < 65536; a++) begin
        mae = 1'(m); addr = 16'(a);
        #1;
        e_cme = 0; e_cpe = 0; e_win = 0;
        if (m == 1 && a >= int'(MB) && a < int'(MB) + MW) begin e_cme = 1; e_win = 16'(a - int'(MB)); end
        else if (m == 1 && a >= int'(PB) && a < int'(PB) + PW) begin e_cpe = 1; e_win = 16'(a - int'(PB)); end
        hit_m += int'(e_cme); hit_p += int'(e_cpe);
        checks++;
        if (cme !== e_cme || cpe !== e_cpe || win_addr !== e_win) begin
          failures++;
          if (failures < 10) $display("FAIL mae=%0d addr=%h cme=%b cpe=%b win=%h", m, addr, cme, cpe, win_addr);
        end
      end
    end
    checks++;
    if (hit_m != MW || hit_p != PW) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
