// tb_state_transition_decoder - exhaustive check of the selector decoder:
// all 32 combinations of SCC[1:0], CF[1], CND and EN against the rule table
// (hold when disabled, reload at a terminal word when CND is set, stop at a
// terminal word otherwise, else the path coded by SCC).
module tb_state_transition_decoder;
  logic [1:0] scc;
  logic cf1, cnd, en;
  logic [3:0] sw_on, exp_sw;
  int checks = 0, failures = 0;

  state_transition_decoder dut (.scc(scc), .cf1(cf1), .cnd(cnd), .en(en), .sw_on(sw_on));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {scc, cf1, cnd, en} = 5'(v);
      #1;
      // expected: one-hot, bit0 internal, bit1 +1, bit2 current, bit3 external
      if (!en)             exp_sw = 4'b0100;
      else if (cf1 && cnd) exp_sw = 4'b1000;
      else if (cf1)        exp_sw = 4'b0100;
      else case (scc)
        2'b00: exp_sw = 4'b0001;
        2'b01: exp_sw = 4'b0010;
        2'b10: exp_sw = 4'b0100;
        default: exp_sw = 4'b1000;
      endcase
      checks++;
      if (sw_on !== exp_sw) begin
        failures++;
        $display("FAIL scc=%b cf1=%b cnd=%b en=%b sw_on=%b exp=%b", scc, cf1, cnd, en, sw_on, exp_sw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
