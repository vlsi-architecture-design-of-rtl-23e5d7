// pixel_ram: pixel memory with one write port and one synchronous read port.
//
// 2**AW words of DW bits. A write (we = 1) stores wdata at waddr at the clock
// edge. The read port registers mem[raddr] at every edge, so rdata shows the
// word addressed one clock earlier. Contents are not reset; the host loads
// them before a search. The motion estimation block uses one instance for the
// current 16x16 block (AW = 8, addressed by the pixel counters) and one for the
// reference search area (AW = 10, rows of 32 pixels). The architecture keeps
// the reference data in RAM; the organisation is this design's.
module pixel_ram #(
  parameter int AW = 8,
  parameter int DW = 8
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
