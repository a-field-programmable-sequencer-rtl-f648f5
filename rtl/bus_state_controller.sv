// bus_state_controller - the address window select of the MCU's Bus State
// Controller as far as the FPSM is concerned (Fig. 13).
//
// When the MCU's address controller flags an access to the FPSM's part of
// the address space (mae), the address is compared with two windows. Inside
// the memory window the controller raises CME (Memory Window Enable: the
// access goes over the Memory Bus to PMUs used as RAM); inside the
// peripheral window it raises CPE (Peripheral Window Enable: the access goes
// over the Peripheral Bus to PMUs configured as peripherals and to the
// FPSM's registers). win_addr is the address relative to the window's base.
// Purely combinational. Window bases and sizes are this design's choice; the
// document only says that the FPSM occupies part of the MCU address space.
module bus_state_controller #(
  parameter logic [15:0] MEM_BASE  = 16'h8000,
  parameter int unsigned MEM_WORDS = 4096,   // 16 PMUs x 256 words
  parameter logic [15:0] PER_BASE  = 16'hC000,
  parameter int unsigned PER_WORDS = 4608    // 18 blocks of 256 words
) (
  input  logic        mae,
  input  logic [15:0] addr,
  output logic        cme,
  output logic        cpe,
  output logic [15:0] win_addr
);

  logic [16:0] mem_off, per_off;

  assign mem_off = {1'b0, addr} - {1'b0, MEM_BASE};
  assign per_off = {1'b0, addr} - {1'b0, PER_BASE};

  always_comb begin
    cme      = 1'b0;
    cpe      = 1'b0;
    win_addr = 16'h0;
    if (mae) begin
      if (!mem_off[16] && mem_off < 17'(MEM_WORDS)) begin
        cme      = 1'b1;
        win_addr = mem_off[15:0];
      end else if (!per_off[16] && per_off < 17'(PER_WORDS)) begin
        cpe      = 1'b1;
        win_addr = per_off[15:0];
      end
    end
  end

endmodule
