// ss_ram: simple dual-port memory bank, one write port and one read port,
// synchronous read (data one cycle after the address).  Used for every
// per-channel store of the processor: accumulated PSD (M1), noise power (M2),
// interfering power (M3) and the channel-specific number of averages.  Each
// store is split into eight banks of 128 words, one per datapath lane.
// Contents are not reset; every word is written before it is read.
module ss_ram #(
  parameter int DW    = 15,
  parameter int DEPTH = 128
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [DW-1:0]            wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [DW-1:0]            rdata
);
  logic [DW-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
