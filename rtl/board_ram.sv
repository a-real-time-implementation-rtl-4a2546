// Board memory block (A_Memory, B_Memory, S_Memory, LUT_Memory).
//
// A simple dual-port RAM: one write port used by the host download logic
// (or, for S_Memory, by the processing element) with NLANE byte/halfword
// lane enables, and one read port used by the scoring datapath. The read is
// synchronous: rdata shows mem[raddr] one clock after re. A write and a read
// of the same address in one clock return the old contents. The board's
// memories are described only by what they hold; the port arrangement and
// the synchronous read are this implementation's choices. Contents are not
// cleared at reset, as with SRAM chips.
module board_ram #(
  parameter int AW    = 10,
  parameter int DW    = 16,
  parameter int NLANE = 1
) (
  input  logic             clk,
  input  logic [NLANE-1:0] we,
  input  logic [AW-1:0]    waddr,
  input  logic [DW-1:0]    wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [DW-1:0]    rdata
);

  localparam int LW = DW / NLANE;

  logic [DW-1:0] mem [1 << AW];

  always_ff @(posedge clk) begin
    for (int l = 0; l < NLANE; l++) begin
      if (we[l]) mem[waddr][l*LW +: LW] <= wdata[l*LW +: LW];
    end
    if (re) rdata <= mem[raddr];
  end

endmodule
