// IN-AER state machine: receives events from the AER input bus and stores
// each one in the IFIFO with its time stamp.
//
// A four-phase handshake with active-high lines: when the synchronised
// aer_req is seen high the address on aer_addr is taken, the word
// {ticks since the previous event, address} is pushed and aer_ack is raised;
// aer_ack drops once aer_req has dropped. If the IFIFO is full the event is
// not acknowledged, so the sender is held back until room appears. A tick is
// one clock cycle, or 16 with presc set. The tick counter includes the cycle
// of the event itself and restarts at every stored event, so the stored time
// differences add up to the real time. When 65535 ticks pass without an
// event, the wait-only word (all ones) is stored and counting restarts; the
// OUT-AER machine reads that word as the same pause, so a captured stream
// can be replayed as it came.
//
// Follows the document: address in bits 15:0, the number of clock cycles
// since the last event in bits 31:16. This design's own choices: handshake
// polarity, synchronisation, the tick prescaler on this side, stalling on a
// full IFIFO and the wait-only word for long pauses (while the IFIFO is full
// at such a moment the counter holds and that time is lost).
module aer_in_fsm
  import pci_aer_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,
  input  logic            presc,
  // AER input bus
  input  logic [ADRW-1:0] aer_addr,
  input  logic            aer_req,
  output logic            aer_ack,
  // IFIFO write side
  output logic [EVW-1:0]  fifo_wdata,
  output logic            fifo_push,
  input  logic            fifo_full,
  // status
  output logic            stalled,    // request pending, IFIFO full
  output logic            overflow    // one-cycle pulse: wait-only word stored
);
  typedef enum logic {S_IDLE, S_ACK} state_t;

  state_t          state;
  logic            req_s, tick, take, wrap;
  logic [3:0]      pcnt;
  logic [TSW-1:0]  cnt;
  logic [TSW:0]    cnt_inc;

  aer_sync u_req_sync (.clk, .rst_n, .d(aer_req), .q(req_s));

  assign tick     = !presc || (pcnt == 4'(PRESCALE - 1));
  assign cnt_inc  = {1'b0, cnt} + (TSW+1)'(tick);
  assign take     = (state == S_IDLE) && enable && req_s && !fifo_full;
  assign wrap     = enable && !take && (cnt_inc == (TSW+1)'({TSW{1'b1}}));
  assign stalled  = (state == S_IDLE) && enable && req_s && fifo_full;
  assign fifo_push = take || (wrap && !fifo_full);

  always_comb begin
    if (take) fifo_wdata = {cnt_inc[TSW-1:0], aer_addr};
    else      fifo_wdata = WAIT_WORD;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pcnt <= '0;
    end else begin
      pcnt <= pcnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      aer_ack  <= 1'b0;
      overflow <= 1'b0;
    end else begin
      overflow <= 1'b0;
      if (!enable)                  cnt <= '0;
      else if (take)                cnt <= '0;
      else if (wrap && !fifo_full) begin
        cnt      <= '0;
        overflow <= 1'b1;
      end
      else if (!wrap)               cnt <= cnt_inc[TSW-1:0];

      unique case (state)
        S_IDLE: if (take) begin
          aer_ack <= 1'b1;
          state   <= S_ACK;
        end
        S_ACK: if (!req_s) begin
          aer_ack <= 1'b0;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_push_full: assert property (@(posedge clk) disable iff (!rst_n) fifo_push |-> !fifo_full);
endmodule
