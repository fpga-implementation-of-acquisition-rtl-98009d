// acq_mag_memory: the store that holds one correlation's |u|^2 values.
//
// The correlator writes the N squared magnitudes of one satellite / frequency
// bin here, one per clock, at the sample index (the code phase). The peak
// detector then reads them back. One write port and one read port with a
// registered read (data appears the clock after the address), the shape of
// an FPGA block RAM. Depth N and width MAG_W are parameters; contents are
// not reset.
module acq_mag_memory #(
  parameter int unsigned N     = 32768,
  parameter int unsigned MAG_W = 64
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] waddr,
  input  logic [MAG_W-1:0]     wdata,
  input  logic [$clog2(N)-1:0] raddr,
  output logic [MAG_W-1:0]     rdata
);

  logic [MAG_W-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
