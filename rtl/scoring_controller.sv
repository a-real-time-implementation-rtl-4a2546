// Scoring controller: sequences one frame of Viterbi scoring.
//
// On go it scores every word of the vocabulary for the current VQ index:
// it reads the word's LUT_Memory entry (first state address, number of
// states, topology) and issues the word's states one per clock, state 1
// first, so the processing element updates one state metric per clock.
// The next word's entry is fetched while the current word is issued, so
// words follow each other without a gap (every word needs at least two
// states). done pulses (total states) + 7 clocks after go: two clocks fetch
// the first entry and four drain the PE pipeline. S_Memory is split in two
// banks that swap roles every frame: the previous frame's metrics are read
// from bank s_bank while the new ones are written to the other.
// One state per clock and the LUT/S_Memory address generation follow the
// design; the prefetch, bank swapping and drain count are this
// implementation's. frame_start pulses on the clock go is taken; done
// pulses when the last metric of the frame has been written.
module scoring_controller
  import vs_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                go,
  input  logic [WORD_AW:0]    nwords,      // 1 .. 2^WORD_AW
  // LUT_Memory read port
  output logic                lut_re,
  output logic [WORD_AW-1:0]  lut_raddr,
  input  lut_entry_t          lut_rdata,
  // issued state
  output logic                issue_valid,
  output logic [STATE_AW-1:0] issue_state,
  output logic [LOC_W-1:0]    issue_j,
  output logic [TOPO_W-1:0]   issue_topo,
  output logic                issue_first,
  output logic                issue_last,
  output logic [WORD_AW-1:0]  issue_word,
  // frame status
  output logic                frame_start,
  output logic                busy,
  output logic                done,
  output logic                s_bank
);

  typedef enum logic [2:0] {IDLE, PRIME, LOAD, RUN, DRAIN} state_t;
  state_t st;

  lut_entry_t         cur;
  logic [LOC_W-1:0]   j;
  logic [WORD_AW-1:0] word;
  logic [WORD_AW:0]   fetch;
  logic [2:0]         drain;

  localparam int DRAIN_CYCLES = 4;

  assign frame_start = (st == IDLE) && go;
  assign busy        = (st != IDLE);
  assign lut_re      = 1'b1;
  assign lut_raddr   = fetch[WORD_AW-1:0];

  assign issue_valid = (st == RUN);
  assign issue_state = cur.base + STATE_AW'(j);
  assign issue_j     = j;
  assign issue_topo  = cur.topo;
  assign issue_first = (j == '0);
  assign issue_last  = ({1'b0, j} == cur.nstates - 1'b1);
  assign issue_word  = word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= IDLE;
      cur    <= '0;
      j      <= '0;
      word   <= '0;
      fetch  <= '0;
      drain  <= '0;
      done   <= 1'b0;
      s_bank <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE: if (go) begin
          fetch <= '0;
          st    <= PRIME;
        end
        PRIME: begin
          fetch <= 1;
          st    <= LOAD;
        end
        LOAD: begin
          cur  <= lut_rdata;
          j    <= '0;
          word <= '0;
          st   <= RUN;
        end
        RUN: begin
          if (issue_last) begin
            j <= '0;
            if ({1'b0, word} + 1'b1 < nwords) begin
              cur   <= lut_rdata;
              word  <= word + 1'b1;
              fetch <= fetch + 1'b1;
            end else begin
              drain <= 3'(DRAIN_CYCLES - 1);
              st    <= DRAIN;
            end
          end else begin
            j <= j + 1'b1;
          end
        end
        DRAIN: begin
          if (drain == '0) begin
            done   <= 1'b1;
            s_bank <= ~s_bank;
            st     <= IDLE;
          end else begin
            drain <= drain - 1'b1;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  // The LUT prefetch needs one clock to settle: words have two states or more.
  a_two_states: assert property (@(posedge clk) disable iff (!rst_n)
    issue_valid |-> cur.nstates >= 2);

endmodule
