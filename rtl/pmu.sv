// pmu - Programmable Memory Unit: a 256 x 16 memory and the Add/Flag Control
// unit that sequences its address (Fig. 3(b) of the FPSM architecture).
//
// Memory mode (logic_mode = 0, the reset state): the PMU is plain RAM. A CPU
// access (cpu_sel) loads the local address into the address flip-flop and,
// for a write, stores the 16-bit word there. Read data (rd_word) is the word
// at the address flip-flop, valid the cycle after the access.
//
// Peripheral mode (logic_mode = 1): the PMU is a Moore machine. Each clock in
// which it is enabled the address flip-flop takes the external, internal,
// current or incremented address, as the Flag Field of the current word, CND
// and EN direct (see state_transition_decoder). The sequencer starts from the
// address the flip-flop holds when the mode is switched, i.e. the last word
// the CPU accessed, or 0 after reset. The external address comes from the
// PMU's external register (written by the CPU through the PMU's one-word
// peripheral address) or, when ext_src_sb = 1, from OUT2:OUT1 of the switch
// box west of it. A CPU read returns the current word (Fout, Dout).
//
// Switch-box side: the PMU receives OUT1..OUT5 (4 bits each): OUT2:OUT1 the
// external address, OUT3[0] EN, OUT4[0] CND and OUT5[0] an external write
// enable. An external write stores the external register into the Data Field
// at the address the PMU moves to (the data store of a FIFO, whose pointers
// are other PMUs). EN is the AND of the global EN and OUT3[0].
// It sends IN1 = Dout[3:0], IN2 = Dout[7:4] and IN3 = {CF[1], SEQ[2:0]} of
// the current word to the switch box east of it, so the SEQ[0] bit of a word
// is the signal with which this PMU enables or conditions the next one.
// These outputs depend only on the address flip-flop and the memory, so no
// combinational path crosses a PMU.
//
// Memory organisation, the word fields, the four paths, the EN/CND/Ext.
// address inputs and the SEQ bits controlling other PMUs follow the
// document. The nibble assignment of OUT1..OUT5 and IN1..IN3, the external
// write port and the reset values are this design's choices.
module pmu
  import fpsm_pkg::*;
#(
  parameter int unsigned AW = PMU_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration (held in the switch box register)
  input  logic          logic_mode,
  input  logic          ext_src_sb,
  // global enable from the MCU Interface
  input  logic          en_g,
  // CPU access through the MCU Interface
  input  logic          cpu_sel,
  input  logic          cpu_we,
  input  logic [AW-1:0] cpu_addr,
  input  word_t         cpu_wdata,
  output word_t         rd_word,
  // switch box side
  input  nib_t [4:0]    sb_out,     // OUT1..OUT5 of the west switch box
  output nib_t [2:0]    sb_in,      // IN1..IN3 of the east switch box
  output logic          cflag       // CF[1] of the current word
);

  logic [AW-1:0] addr_q, next_addr, ext_addr, ext_reg;
  logic [3:0]    sw_on;      // selector switches, for observation
  logic [7:0]    fout_raw;
  logic [7:0]    dout;
  flag_t         fout;
  logic          en, cnd, ext_we;
  logic [7:0]    sb_addr;

  assign fout     = flag_t'(fout_raw);
  assign sb_addr  = {sb_out[1], sb_out[0]};
  assign en       = en_g & sb_out[OUT_EN][0];
  assign cnd      = sb_out[OUT_CND][0];
  assign ext_we   = logic_mode & en & sb_out[OUT_WE][0];
  assign ext_addr = ext_src_sb ? sb_addr[AW-1:0] : ext_reg;

  add_flag_control #(.AW(AW)) u_afc (
    .clk      (clk),
    .rst_n    (rst_n),
    .run      (logic_mode),
    .en       (en),
    .cnd      (cnd),
    .ext_addr (ext_addr),
    .int_addr (dout[AW-1:0]),
    .fout     (fout),
    .cpu_load (cpu_sel),
    .cpu_addr (cpu_addr),
    .addr_q   (addr_q),
    .next_addr(next_addr),
    .sw_on    (sw_on)
  );

  logic mem_we;
  assign mem_we = cpu_sel & cpu_we & ~logic_mode;

  pmu_sram #(.AW(AW), .DW(8)) u_mem (
    .clk    (clk),
    .we_flag(mem_we),
    .we_data(mem_we | ext_we),
    .waddr  (logic_mode ? next_addr : cpu_addr),
    .wflag  (cpu_wdata.flag),
    .wdata  (logic_mode ? ext_reg : cpu_wdata.data),
    .raddr  (addr_q),
    .rflag  (fout_raw),
    .rdata  (dout)
  );

  // External register: the one-word peripheral address of the PMU.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                             ext_reg <= '0;
    else if (cpu_sel && cpu_we && logic_mode) ext_reg <= cpu_wdata.data[AW-1:0];
  end

  assign rd_word = '{flag: fout, data: dout};
  assign sb_in   = {{fout.cf[1], fout.seq}, dout[7:4], dout[3:0]};
  assign cflag   = fout.cf[1];

endmodule
