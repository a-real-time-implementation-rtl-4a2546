// Viterbi scoring board: isolated-word HMM scorer, one state per clock.
//
// The host (a PC on the ISA I/O bus) downloads the word models through the
// register ports: transition metrics to A_Memory, output metrics to
// B_Memory (one bank per codebook), one entry per word to LUT_Memory. For
// every 10 ms speech frame it then writes the frame's VQ index (one per
// codebook) and sets FrameSync. The scoring controller walks every state
// of every word; for each state the metric unit fetches its transition
// metrics, its output metric (combined over the NCB codebooks) and its
// topology controls, S_Memory supplies the state's metric from the
// previous frame, and the processing element computes the new metric,
// which is written back to S_Memory. The word selector tracks the best
// final-state metric, and on End the board reports that word.
// Pipeline: state issued at clock c -> memories and topology ROM answer at
// c+1 (PE input) -> ACS at c+2 -> result written at the end of c+3. A frame
// of T states in total takes T + 7 clocks, so at 10 MHz about 100,000
// states fit in a 10 ms frame.
// The partition (ISA slave, host interface and controller; metric unit with
// the topology ROM; processing element with normaliser; four memories)
// follows the board's three-FPGA organisation. Memory sizes, register map,
// pipeline and the default of one codebook are this implementation's
// (see vs_pkg).
module viterbi_board
  import vs_pkg::*;
#(
  parameter int NCB = 1   // codebooks: VQ indices per frame, B_Memory banks
) (
  input  logic        clk,
  input  logic        rst_n,
  // PC I/O bus
  input  logic [9:0]  sa,
  input  logic        aen,
  input  logic        iow_n,
  input  logic        ior_n,
  input  logic [15:0] sd_in,
  output logic [15:0] sd_out,
  output logic        sd_oe,
  output logic        busy,
  output logic        frame_done,
  output logic        norm_active,
  output logic [15:0] result_metric  // best final-state metric of the published result
);

  // ---------------- host interface ----------------
  logic [2:0]         io_addr;
  logic               io_wr;
  logic [15:0]        io_wdata, io_rdata;

  isa_slave u_isa (
    .clk, .rst_n, .sa, .aen, .iow_n, .ior_n, .sd_in, .sd_out, .sd_oe,
    .io_addr, .io_wr, .io_wdata, .io_rdata
  );

  logic               dl_we;
  mem_sel_t           dl_mem;
  logic [27:0]        dl_addr;
  logic [15:0]        dl_data;
  logic [NCB-1:0][VQ_W-1:0] vq_host, vq;
  logic [WORD_AW:0]   nwords;
  logic               frame_go, frame_init, end_req;
  logic               result_valid;
  logic [WORD_AW-1:0] result_word;

  host_interface #(.NCB(NCB)) u_host (
    .clk, .rst_n, .io_addr, .io_wr, .io_wdata, .io_rdata,
    .dl_we, .dl_mem, .dl_addr, .dl_data,
    .vq (vq_host), .nwords, .frame_go, .frame_init, .end_req,
    .busy, .frame_done, .result_valid, .result_word
  );

  // ---------------- scoring controller ----------------
  logic                lut_re;
  logic [WORD_AW-1:0]  lut_raddr;
  logic [31:0]         lut_rdata;
  logic                issue_valid, issue_first, issue_last;
  logic [STATE_AW-1:0] issue_state;
  logic [LOC_W-1:0]    issue_j;
  logic [TOPO_W-1:0]   issue_topo;
  logic [WORD_AW-1:0]  issue_word;
  logic                frame_start, s_bank;

  scoring_controller u_ctrl (
    .clk, .rst_n,
    .go        (frame_go),
    .nwords,
    .lut_re, .lut_raddr,
    .lut_rdata (lut_entry_t'(lut_rdata[LUT_W-1:0])),
    .issue_valid, .issue_state, .issue_j, .issue_topo,
    .issue_first, .issue_last, .issue_word,
    .frame_start, .busy,
    .done      (frame_done),
    .s_bank
  );

  // The initialisation flag and the VQ index hold for the whole frame
  // they were given with.
  logic init_frame;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_frame <= 1'b0;
      vq         <= '0;
    end else if (frame_start) begin
      init_frame <= frame_init;
      vq         <= vq_host;
    end
  end

  // ---------------- memories ----------------
  logic                      a_re, b_re;
  logic [STATE_AW-1:0]       a_raddr;
  logic [NCB-1:0][STATE_AW+VQ_W-1:0] b_raddr;
  logic [NSLOT*TM_W-1:0]     a_rdata;
  ometric_t [NCB-1:0]        b_rdata;

  board_ram #(.AW(STATE_AW), .DW(NSLOT * TM_W), .NLANE(NSLOT)) u_a_mem (
    .clk,
    .we    ((dl_we && dl_mem == MEM_A) ? NSLOT'(1) << dl_addr[1:0] : '0),
    .waddr (dl_addr[STATE_AW+1:2]),
    .wdata ({NSLOT{dl_data[TM_W-1:0]}}),
    .re    (a_re),
    .raddr (a_raddr),
    .rdata (a_rdata)
  );

  // One B_Memory bank per codebook; the download address selects the bank
  // above the {state, VQ index} bits.
  for (genvar c = 0; c < NCB; c++) begin : g_b_mem
    board_ram #(.AW(STATE_AW + VQ_W), .DW(OM_W), .NLANE(1)) u_b_mem (
      .clk,
      .we    (dl_we && dl_mem == MEM_B && int'(dl_addr[27:STATE_AW+VQ_W]) == c),
      .waddr (dl_addr[STATE_AW+VQ_W-1:0]),
      .wdata (dl_data[OM_W-1:0]),
      .re    (b_re),
      .raddr (b_raddr[c]),
      .rdata (b_rdata[c])
    );
  end

  board_ram #(.AW(WORD_AW), .DW(32), .NLANE(2)) u_lut_mem (
    .clk,
    .we    ((dl_we && dl_mem == MEM_LUT) ? 2'(1) << dl_addr[0] : 2'b00),
    .waddr (dl_addr[WORD_AW:1]),
    .wdata ({2{dl_data}}),
    .re    (lut_re),
    .raddr (lut_raddr),
    .rdata (lut_rdata)
  );

  // S_Memory: two banks, read the previous frame's, write the other.
  logic                pe_out_valid;
  smetric_t            pe_out_metric;
  smetric_t            s_rdata;
  localparam int TAG_W = 1 + WORD_AW + STATE_AW;
  typedef struct packed {
    logic                last;
    logic [WORD_AW-1:0]  word;
    logic [STATE_AW-1:0] state;
  } tag_t;
  tag_t pe_out_tag, tag1;

  board_ram #(.AW(STATE_AW + 1), .DW(SM_W), .NLANE(1)) u_s_mem (
    .clk,
    .we    (pe_out_valid),
    .waddr ({~s_bank, pe_out_tag.state}),
    .wdata (pe_out_metric),
    .re    (issue_valid),
    .raddr ({s_bank, issue_state}),
    .rdata (s_rdata)
  );

  // ---------------- metric unit (addresses, topology ROM) ----------------
  topo_entry_t          topo1;
  tmetric_t [NSLOT-1:0] a1;
  ometric_t [NSLOT-1:0] b1;

  metric_unit #(.NCB(NCB)) u_metric (
    .clk,
    .issue_valid, .issue_state, .issue_j, .issue_topo, .vq,
    .a_re, .a_raddr, .a_rdata,
    .b_re, .b_raddr, .b_rdata,
    .topo (topo1), .a (a1), .b (b1)
  );

  // Issue information delayed to meet the memory data.
  logic valid1, first1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid1 <= 1'b0;
      first1 <= 1'b0;
      tag1   <= '0;
    end else begin
      valid1 <= issue_valid;
      first1 <= issue_first;
      tag1   <= '{last: issue_last, word: issue_word, state: issue_state};
    end
  end

  // ---------------- processing element ----------------
  processing_element #(.TAG_W(TAG_W)) u_pe (
    .clk, .rst_n, .frame_start,
    .in_valid    (valid1),
    .init        (init_frame),
    .first_state (first1),
    .in_tag      (tag1),
    .s_prev      (s_rdata),
    .topo        (topo1),
    .a           (a1),
    .b           (b1),
    .out_valid   (pe_out_valid),
    .out_tag     (pe_out_tag),
    .out_metric  (pe_out_metric),
    .norm_active
  );

  // ---------------- word selector ----------------
  word_selector u_sel (
    .clk, .rst_n, .frame_start,
    .in_valid   (pe_out_valid && pe_out_tag.last),
    .in_word    (pe_out_tag.word),
    .in_metric  (pe_out_metric),
    .frame_done,
    .end_req,
    .result_valid, .result_word, .result_metric
  );

endmodule
