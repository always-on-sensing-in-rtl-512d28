// stic_ctrl: the STIC controller that runs one stochastic computation per
// datum and ends it at a stream length the harvested energy can pay for.
//
// States: IDLE waits for a new datum ('in_valid' while 'in_ready'); the
// accepting clock raises 'start', which restarts the random sources, clears
// the processing unit's state and the ones counter, and lets the datapath
// latch the operands. RUN then enables the datapath ('run') for one clock per
// P stream bits. After each clock the number of cycles done is compared with
// the valid lengths 2^(MIN_LOG2 + i*LEVEL_STEP) / P. When it equals one of
// them, valid length i, the charging rate is checked ('check' pulses and the
// current 'level' from stic_precision_sel is used): if i >= level the stream
// is long enough for the energy available and the computation ends;
// otherwise it continues towards the next valid length. The longest length,
// 2^MAX_LOG2 bits, always ends it. The clock after the last RUN cycle,
// 'out_valid' pulses for one clock with 'out_idx' = i, the length used; the
// controller is back in IDLE in that same clock and can accept the next
// datum, so a datum of L bits takes L/P + 1 clocks. There is no backpressure
// on the result.
//
// The loop, the check at every valid length and the exit rule follow the
// design's SC_COMPUTATION procedure with p = 4 and lengths {16..256}. The
// valid/ready handshake, the one-clock IDLE step and the result pulse are
// this implementation's own choices.
module stic_ctrl
  import stic_pkg::*;
#(
  parameter int unsigned P          = 4,
  parameter int unsigned MAX_LOG2   = 8,
  parameter int unsigned MIN_LOG2   = 4,
  parameter int unsigned LEVEL_STEP = 1,
  localparam int unsigned NLEV      = num_levels(MAX_LOG2, MIN_LOG2, LEVEL_STEP),
  localparam int unsigned LW        = $clog2(NLEV),
  localparam int unsigned LOG2P     = $clog2(P),
  localparam int unsigned CNTW      = MAX_LOG2 - LOG2P + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [LW-1:0]    level,
  output logic             start,
  output logic             run,
  output logic             check,
  output logic             out_valid,
  output logic [LW-1:0]    out_idx
);

  typedef enum logic {S_IDLE, S_RUN} state_e;

  state_e          state;
  logic [CNTW-1:0] cnt;        // RUN cycles completed for this datum
  logic [CNTW-1:0] cnt_next;
  logic            at_valid;   // cnt_next is a valid length
  logic [LW-1:0]   valid_idx;  // ... and its index
  logic            finish;

  assign in_ready = (state == S_IDLE);
  assign start    = in_ready & in_valid;
  assign run      = (state == S_RUN);
  assign cnt_next = cnt + 1'b1;

  always_comb begin
    at_valid  = 1'b0;
    valid_idx = '0;
    for (int i = 0; i < NLEV; i++) begin
      if (cnt_next == CNTW'(valid_cycles(i, MIN_LOG2, LEVEL_STEP, LOG2P))) begin
        at_valid  = 1'b1;
        valid_idx = LW'(i);
      end
    end
    check  = run & at_valid;
    finish = check & ((valid_idx >= level) || (valid_idx == LW'(NLEV - 1)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (start) state <= S_RUN;
        end
        S_RUN: begin
          cnt <= cnt_next;
          if (finish) begin
            state     <= S_IDLE;
            out_valid <= 1'b1;
            out_idx   <= valid_idx;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial begin
    assert (MIN_LOG2 >= LOG2P) else $error("stic_ctrl: shortest stream shorter than P");
    assert ((1 << LOG2P) == P) else $error("stic_ctrl: P must be a power of two");
    assert ((MAX_LOG2 - MIN_LOG2) % LEVEL_STEP == 0)
      else $error("stic_ctrl: lengths must step evenly to the maximum");
  end

  // The producer must hold a datum until it is accepted.
  a_hold_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                 in_valid && !in_ready |=> in_valid);
  // A computation never runs past the longest valid length.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 run |-> cnt < CNTW'(1 << (MAX_LOG2 - LOG2P)));

endmodule
