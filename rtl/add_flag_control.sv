// add_flag_control - Add/Flag Control unit of a PMU: address selector, +1
// incrementer, address flip-flop and State Transition Decoder (Fig. 3(b)).
//
// Every enabled clock in peripheral mode (run = 1) the flip-flop takes one
// of four addresses: the external address, the internal address (Data Field
// of the word just read), the current address or the current address + 1.
// The choice comes from the decoder, fed by the Flag Field of the current
// word, CND and EN. In memory mode the flip-flop instead takes the CPU's
// local address when the CPU accesses this PMU (cpu_load). The memory word
// at addr_q is read combinationally, so one state transition takes one
// clock. next_addr is also the address written by an external write.
//
// Reset clears the address to 0 (reset value is this design's choice).
module add_flag_control
  import fpsm_pkg::*;
#(
  parameter int unsigned AW = PMU_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,        // peripheral (logic) mode
  input  logic          en,         // enable of the sequencer
  input  logic          cnd,        // condition input
  input  logic [AW-1:0] ext_addr,   // external address
  input  logic [AW-1:0] int_addr,   // Data Field of the current word
  input  flag_t         fout,       // Flag Field of the current word
  input  logic          cpu_load,   // memory-mode CPU access
  input  logic [AW-1:0] cpu_addr,
  output logic [AW-1:0] addr_q,     // address flip-flop
  output logic [AW-1:0] next_addr,  // selected address
  output logic [3:0]    sw_on       // selector switches (one-hot)
);

  logic [AW-1:0] inc_addr;

  state_transition_decoder u_std (
    .scc  (fout.scc[1:0]),
    .cf1  (fout.cf[1]),
    .cnd  (cnd),
    .en   (en),
    .sw_on(sw_on)
  );

  assign inc_addr = addr_q + AW'(1);

  always_comb begin
    unique case (1'b1)
      sw_on[PATH_INT]: next_addr = int_addr;
      sw_on[PATH_INC]: next_addr = inc_addr;
      sw_on[PATH_EXT]: next_addr = ext_addr;
      default:         next_addr = addr_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        addr_q <= '0;
    else if (run)      addr_q <= next_addr;
    else if (cpu_load) addr_q <= cpu_addr;
  end

  // The selector has exactly one switch on.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(sw_on));

endmodule
