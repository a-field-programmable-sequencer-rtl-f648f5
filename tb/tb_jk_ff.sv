// tb_jk_ff - random J/K sequence against a reference model of the JK
// flip-flop (set, clear, toggle, hold), plus reset.
module tb_jk_ff;
  logic clk = 0, rst_n = 0, j = 0, k = 0, q;
  logic model;
  int checks = 0, failures = 0;

  jk_ff dut (.clk(clk), .rst_n(rst_n), .j(j), .k(k), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (q !== 1'b0) failures++;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      j = 1'($urandom); k = 1'($urandom);
      @(posedge clk);
      case ({j, k})
        2'b10: model = 1;
        2'b01: model = 0;
        2'b11: model = ~model;
        default: ;
      endcase
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL i=%0d j=%b k=%b q=%b exp=%b", i, j, k, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
