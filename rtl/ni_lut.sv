// ni_lut: the receive look-up table (LUT) of the NI, indexed by flow ID.
//
// Each entry tells the Recv Control where the data of one receive channel go
// (data base pointer) and which mutex to set once a buffer has fully arrived.
// The number of entries is the number of receive channels that can be open at
// once. The document builds the table either from SRAM or from registers and
// notes that registers save one cycle of receive latency; the SRAM parameter
// selects between the two:
//   SRAM = 1: synchronous read. rdata shows the entry addressed at the last
//             clock edge where re was high, and holds while re is low.
//   SRAM = 0: asynchronous read. rdata shows entry raddr in the same cycle.
// One write port (CPU configuration through the Slave Control) and one read
// port (lookup by the Recv Control). The entry format and the reset of the
// register variant are this design's choices; the SRAM variant is not reset,
// like an SRAM macro, so software must write an entry before using it (as the
// document requires).
module ni_lut
  import noc_pkg::*;
#(
  parameter int unsigned ENTRIES = 256,
  parameter bit          SRAM    = 1'b1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       we,
  input  logic [$clog2(ENTRIES)-1:0] waddr,
  input  lut_entry_t                 wdata,
  input  logic                       re,
  input  logic [$clog2(ENTRIES)-1:0] raddr,
  output lut_entry_t                 rdata
);
  lut_entry_t mem [ENTRIES];

  if (SRAM) begin : g_sram
    lut_entry_t rd_q;
    always_ff @(posedge clk) begin
      if (we) mem[waddr] <= wdata;
      if (re) rd_q <= mem[raddr];
    end
    assign rdata = rd_q;
  end else begin : g_regs
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(ENTRIES); i++) mem[i] <= '0;
      end else if (we) begin
        mem[waddr] <= wdata;
      end
    end
    assign rdata = mem[raddr];
  end

endmodule
