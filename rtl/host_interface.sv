// Host interface: the board's register ports on the PC I/O bus.
//
// Eight 16-bit registers (map in vs_pkg). CTLPORT holds the four control
// bits Download, Start, FrameSync and End, all 0 at reset. Writing a data
// word while Download is 1 stores it in the selected memory (A, B or LUT)
// at the download address, which then increments, so a block of parameters
// is sent as one address followed by a stream of data writes. With Start at
// 1, setting FrameSync starts the scoring of one frame with the VQ index
// last written; the board clears FrameSync when the frame is done, which is
// how the host sees that the next index may be sent. The first frame after
// Start rises (or after an End) is the initialisation frame of an
// utterance. A VQ write carries the codebook number in bits 15:8 and the
// index in bits 7:0. Setting End publishes the recognised word once no frame is
// running; the board then clears End. Reads return the register selected
// by io_addr on the same clock.
// Writes arrive as one-clock strobes from the ISA slave, already in the
// board clock domain. CTLPORT's bits and the download follow the design;
// the register map, the self-clearing bits and the address auto-increment
// are this implementation's.
module host_interface
  import vs_pkg::*;
#(
  parameter int NCB = 1   // codebooks: one VQ index each per frame
) (
  input  logic               clk,
  input  logic               rst_n,
  // host bus
  input  logic [2:0]         io_addr,
  input  logic               io_wr,
  input  logic [15:0]        io_wdata,
  output logic [15:0]        io_rdata,
  // download to memories
  output logic               dl_we,
  output mem_sel_t           dl_mem,
  output logic [27:0]        dl_addr,
  output logic [15:0]        dl_data,
  // scoring control
  output logic [NCB-1:0][VQ_W-1:0] vq,
  output logic [WORD_AW:0]   nwords,
  output logic               frame_go,
  output logic               frame_init,
  output logic               end_req,
  input  logic               busy,
  input  logic               frame_done,
  input  logic               result_valid,
  input  logic [WORD_AW-1:0] result_word
);

  logic [3:0]  ctl;
  logic        first_pending;
  logic [27:0] addr;
  mem_sel_t    mem;
  logic        wr_ctl, wr_data;
  logic        frame_running;

  assign wr_ctl  = io_wr && reg_t'(io_addr) == REG_CTL;
  assign wr_data = io_wr && reg_t'(io_addr) == REG_DATA;

  // A frame starts on the clock after FrameSync is seen with Start, if idle.
  assign frame_go   = ctl[CTL_START] && ctl[CTL_FRAMESYNC] && !busy && !frame_running;
  assign frame_init = first_pending;
  assign end_req    = ctl[CTL_END] && !busy && !frame_running && !ctl[CTL_FRAMESYNC];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl           <= '0;
      first_pending <= 1'b0;
      frame_running <= 1'b0;
      addr          <= '0;
      mem           <= MEM_A;
      vq            <= '0;
      nwords        <= '0;
    end else begin
      if (frame_go) begin
        frame_running <= 1'b1;
        first_pending <= 1'b0;
      end
      if (frame_done) begin
        frame_running       <= 1'b0;
        ctl[CTL_FRAMESYNC]  <= 1'b0;
      end
      if (end_req) begin
        ctl[CTL_END]  <= 1'b0;
        first_pending <= 1'b1;
      end
      if (ctl[CTL_FRAMESYNC] && !ctl[CTL_START]) ctl[CTL_FRAMESYNC] <= 1'b0;
      if (wr_ctl) begin
        ctl <= io_wdata[3:0];
        if (io_wdata[CTL_START] && !ctl[CTL_START]) first_pending <= 1'b1;
      end
      if (io_wr) begin
        unique case (reg_t'(io_addr))
          REG_VQ:
            for (int c = 0; c < NCB; c++)
              if (int'(io_wdata[15:8]) == c) vq[c] <= io_wdata[VQ_W-1:0];
          REG_ADDR_LO: addr[15:0] <= io_wdata;
          REG_ADDR_HI: begin
            addr[27:16] <= io_wdata[11:0];
            mem         <= mem_sel_t'(io_wdata[15:14]);
          end
          REG_NWORDS:  nwords <= io_wdata[WORD_AW:0];
          REG_DATA:    if (ctl[CTL_DOWNLOAD]) addr <= addr + 1'b1;
          default: ;
        endcase
      end
    end
  end

  assign dl_we   = wr_data && ctl[CTL_DOWNLOAD];
  assign dl_mem  = mem;
  assign dl_addr = addr;
  assign dl_data = io_wdata;

  always_comb begin
    unique case (reg_t'(io_addr))
      REG_CTL:     io_rdata = {12'b0, ctl};
      REG_VQ:      io_rdata = 16'(vq[0]);
      REG_ADDR_LO: io_rdata = addr[15:0];
      REG_ADDR_HI: io_rdata = {mem, 2'b0, addr[27:16]};
      REG_NWORDS:  io_rdata = 16'(nwords);
      REG_STATUS:  io_rdata = {13'b0, first_pending, result_valid, busy || frame_running};
      REG_RESULT:  io_rdata = {result_valid, 4'b0, result_word};
      default:     io_rdata = '0;
    endcase
  end

endmodule
