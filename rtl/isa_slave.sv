// ISA I/O slave: turns PC I/O bus cycles into register strobes.
//
// The board sits on the PC's I/O bus as a slave occupying eight 16-bit
// I/O ports starting at BASE_ADDR. IOW#/IOR# are brought into the board
// clock domain with two flip-flops. On the board clock where a
// synchronised IOW# is first seen low, the address and data (stable for
// the whole strobe) are captured and a one-clock write strobe io_wr is
// issued with the register offset SA[3:1]. During a read the data bus
// driver is enabled (sd_oe) straight from the decoded address and IOR#,
// as a bus transceiver would be, and io_rdata, selected by the live
// address, is driven out. A bus cycle must last at least three board
// clocks (300 ns at 10 MHz); ISA I/O cycles are longer.
// That the board is an ISA slave follows the design; the port base, the
// 16-bit word ports on even addresses and the synchroniser are this
// implementation's choices.
module isa_slave #(
  parameter logic [9:0] BASE_ADDR = 10'h300
) (
  input  logic        clk,
  input  logic        rst_n,
  // ISA side
  input  logic [9:0]  sa,
  input  logic        aen,      // DMA cycle: ignore the address
  input  logic        iow_n,
  input  logic        ior_n,
  input  logic [15:0] sd_in,
  output logic [15:0] sd_out,
  output logic        sd_oe,
  // register side
  output logic [2:0]  io_addr,
  output logic        io_wr,
  output logic [15:0] io_wdata,
  input  logic [15:0] io_rdata
);

  logic hit;
  assign hit = !aen && sa[9:4] == BASE_ADDR[9:4];

  logic [2:0] iow_sync;   // two synchroniser stages and the previous value
  logic [2:0] wr_addr;
  logic       wr_pulse;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iow_sync <= 3'b111;
      wr_addr  <= '0;
      io_wdata <= '0;
      wr_pulse <= 1'b0;
    end else begin
      iow_sync <= {iow_sync[1:0], iow_n};
      wr_pulse <= 1'b0;
      // falling edge of the synchronised strobe
      if (iow_sync[2] && !iow_sync[1] && hit) begin
        wr_addr  <= sa[3:1];
        io_wdata <= sd_in;
        wr_pulse <= 1'b1;
      end
    end
  end

  assign io_wr   = wr_pulse;
  assign io_addr = wr_pulse ? wr_addr : sa[3:1];
  assign sd_oe   = hit && !ior_n;
  assign sd_out  = io_rdata;

endmodule
