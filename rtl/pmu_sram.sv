// pmu_sram - the memory of one PMU: 2**AW words of 16 bits, an 8-bit Flag
// Field and a DW-bit Data Field (256 x 16 = 4 Kbit by default, as in the
// document's test chip).
//
// One write port with a write enable per field (the CPU writes whole words;
// an external write from a switch box, used when the PMU is the data store
// of a FIFO, writes the Data Field only) and one read port. The read port
// is asynchronous on raddr, which in the PMU is the output of the address
// flip-flop, so together they behave as a synchronous SRAM with a
// registered address. A write is seen by a read of the same address in the
// next cycle. No reset: contents are undefined until written, like an SRAM.
module pmu_sram
  import fpsm_pkg::*;
#(
  parameter int unsigned AW = PMU_AW,
  parameter int unsigned DW = PMU_DW
) (
  input  logic          clk,
  input  logic          we_flag,
  input  logic          we_data,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wflag,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rflag,
  output logic [DW-1:0] rdata
);

  logic [7:0]    flag_mem [2**AW];
  logic [DW-1:0] data_mem [2**AW];

  always_ff @(posedge clk) begin
    if (we_flag) flag_mem[waddr] <= wflag;
    if (we_data) data_mem[waddr] <= wdata;
  end

  assign rflag = flag_mem[raddr];
  assign rdata = data_mem[raddr];

endmodule
