// tb_switch_box - writes random configurations into the switch box register
// through its three 16-bit words, reads them back, and for each one drives
// random IN1..IN3, north and global-wire inputs and compares OUT1..OUT5,
// south and the east/west global lanes with an independent model of the
// input selector, bus switch and output selector. Reset must leave all
// routing local and the PMU in memory mode.
module tb_switch_box;
  import fpsm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [1:0] cfg_idx = 0;
  logic [15:0] cfg_wdata = 0, cfg_rdata;
  sb_cfg_t cfg;
  nib_t [2:0] in;
  nib_t north, south;
  nib_t [4:0] out;
  nib_t [3:0] west_i, west_o, east_i, east_o;
  int checks = 0, failures = 0;
  logic [47:0] cfg_model;

  switch_box dut (.clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_idx(cfg_idx),
    .cfg_wdata(cfg_wdata), .cfg_rdata(cfg_rdata), .cfg(cfg), .in(in), .north(north),
    .out(out), .south(south), .west_i(west_i), .west_o(west_o), .east_i(east_i), .east_o(east_o));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic nib_t src_of(int code, nib_t [2:0] i3, nib_t n);
    case (code)
      0: return i3[0];
      1: return i3[1];
      2: return i3[2];
      default: return n;
    endcase
  endfunction

  task automatic check_routing();
    nib_t [3:0] g, e_w, e_e;
    nib_t [4:0] e_out;
    nib_t s;
    int osel, bsw;
    for (int k = 0; k < 4; k++) begin
      s = src_of(int'(cfg_model[2*k +: 2]), in, north);
      bsw = int'(cfg_model[23 + 2*k +: 2]);
      e_w[k] = 0; e_e[k] = 0;
      case (bsw)
        0: g[k] = s;
        1: begin g[k] = s; e_w[k] = s; e_e[k] = s; end
        2: begin g[k] = west_i[k]; e_e[k] = west_i[k]; end
        default: begin g[k] = east_i[k]; e_w[k] = east_i[k]; end
      endcase
    end
    for (int j = 0; j < 5; j++) begin
      osel = int'(cfg_model[8 + 3*j +: 3]);
      case (osel)
        0: e_out[j] = in[0];
        1: e_out[j] = in[1];
        2, 3, 4, 5: e_out[j] = g[osel-2];
        6: e_out[j] = 4'h0;
        default: e_out[j] = 4'hF;
      endcase
    end
    checks++;
    if (out !== e_out || south !== g[cfg_model[32:31]] || west_o !== e_w || east_o !== e_e) begin
      failures++;
      $display("FAIL cfg=%h out=%h/%h south=%h/%h west_o=%h/%h east_o=%h/%h", cfg_model,
               out, e_out, south, g[cfg_model[32:31]], west_o, e_w, east_o, e_e);
    end
    checks++;
    if (cfg.logic_mode !== cfg_model[34] || cfg.ext_src_sb !== cfg_model[33]) failures++;
  endtask

  initial begin
    in = '0; north = '0; west_i = '0; east_i = '0;
    cfg_model = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (cfg !== '0) failures++;
    for (int t = 0; t < 200; t++) begin
      for (int w = 0; w < 3; w++) begin
        @(negedge clk);
        cfg_we = 1; cfg_idx = 2'(w); cfg_wdata = 16'($urandom);
        cfg_model[16*w +: 16] = cfg_wdata;
      end
      @(negedge clk);
      cfg_we = 0;
      for (int w = 0; w < 3; w++) begin
        cfg_idx = 2'(w); #1;
        checks++;
        if (cfg_rdata !== cfg_model[16*w +: 16]) begin failures++; $display("FAIL readback %0d", w); end
      end
      for (int v = 0; v < 10; v++) begin
        in = 12'($urandom); north = 4'($urandom); west_i = 16'($urandom); east_i = 16'($urandom);
        #1 check_routing();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
