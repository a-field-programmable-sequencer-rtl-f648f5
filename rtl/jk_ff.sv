// jk_ff - JK flip-flop at the east end of an FPSM row, turning two PMU flags
// into a pulse output (the PWM of the document's example uses one).
//
// j = 1 sets q, k = 1 clears it, both toggle it, neither holds it; all on the
// rising clock edge. Reset clears q. The document shows the flip-flop by
// name only; its connection to OUT1[0] (J) and OUT2[0] (K) of the row's last
// switch box is this design's choice.
module jk_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic j,
  input  logic k,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else begin
      unique case ({j, k})
        2'b10:   q <= 1'b1;
        2'b01:   q <= 1'b0;
        2'b11:   q <= ~q;
        default: q <= q;
      endcase
    end
  end

endmodule
